// grid_top: one-dimensional digitizer interface.
//
// The interface finds the position of a pen cursor on an array of grid
// wires. A counter selects one wire at a time (GRID, the COUNT_DATA
// bus); the external grid electronics energize that wire and raise INT
// when the cursor's signal is detected. The controller then copies the
// count into the output register, clears the counter and signals DAV to
// the receiver. The receiver asks for the next measurement by raising
// RDY, which is synchronized before the controller sees it. If the sweep
// reaches the last wire without INT, the counter is cleared and the
// sweep starts again.
//
// Blocks: synchronizer (RDY -> SRDY), grid_fsm (controller), grid_ctr
// (grid counter with overflow ERR), grid_reg (output register). The
// structure and the block connections follow the design description;
// the rst_n input is this design's own addition.
//
// Interface: clk; rst_n (synchronous, active low, hold for two clocks);
// rdy in (asynchronous); int_det in (cursor detected, expected to change
// only in response to grid, so it is not synchronized); dav out; data
// out (last position); grid out (wire being energized).
// Timing: with INT seen while the counter holds N, data becomes N+1 (the
// counter also advances on the edge that leaves COUNT) and DAV returns
// three clocks after that edge, once the counter has been cleared.
// The all-ones count, 2**GRIDSIZE - 1, ends a sweep as an overflow.
module grid_top #(
  parameter int unsigned GRIDSIZE = digitizer_pkg::GRIDSIZE_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rdy,
  input  logic                int_det,
  output logic                dav,
  output logic [GRIDSIZE-1:0] data,
  output logic [GRIDSIZE-1:0] grid
);

  logic srdy, err;
  logic count, n_clr, n_ld;
  logic [GRIDSIZE-1:0] gridint;

  synchronizer u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .rdy  (rdy),
    .srdy (srdy)
  );

  grid_fsm u_fsm (
    .clk     (clk),
    .rst_n   (rst_n),
    .srdy    (srdy),
    .int_det (int_det),
    .errin   (err),
    .dav     (dav),
    .countout(count),
    .n_clr   (n_clr),
    .n_ld    (n_ld)
  );

  grid_ctr #(.SIZE(GRIDSIZE)) u_ctr (
    .clk       (clk),
    .count     (count),
    .n_clr     (n_clr),
    .err       (err),
    .count_data(gridint)
  );

  assign grid = gridint;

  grid_reg #(.SIZE(GRIDSIZE)) u_reg (
    .clk       (clk),
    .rst_n     (rst_n),
    .n_ld      (n_ld),
    .count_data(gridint),
    .data      (data)
  );

endmodule
