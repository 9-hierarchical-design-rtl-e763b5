// tb_grid_top: end-to-end test of the one-dimensional digitizer at its
// default size (4-bit grid counter, 16 wire positions).
//
// A behavioural grid model raises INT when the energized wire is the one
// under the cursor. The testbench plays the receiver: it waits for DAV,
// sometimes lingers before answering, raises RDY for one clock to ask
// for a measurement and waits for DAV again. For each measurement it
// picks a cursor position (0..2**GRIDSIZE-2) and a number of sweeps
// during which the cursor is absent, so that the counter overflows and
// the ERR path restarts the sweep.
//
// Checks per measurement:
//   - DAV stays high until the synchronized RDY is seen (RDY is not used
//     directly), then drops;
//   - DATA equals position + 1 (the counter also advances on the edge
//     that leaves Count) and does not change on a failed sweep;
//   - DAV returns exactly position + 4 + (2**GRIDSIZE + 1) * misses clocks after the
//     edge that synchronized RDY (a failed sweep costs 2**GRIDSIZE + 1
//     clocks: the sweep plus the ERR state);
//   - GRID is zero while waiting in READY.
// Each mechanism (a load, an overflow restart, a receiver that keeps
// the data waiting, the synchronizer delay) is counted and must occur.
module tb_grid_top;

  localparam int unsigned GS = digitizer_pkg::GRIDSIZE_DEFAULT;
  localparam int unsigned NPOS = 1 << GS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rdy = 1'b0;
  logic int_det;
  logic dav;
  logic [GS-1:0] data, grid;
  logic [GS-1:0] cursor_pos = '0;
  logic present = 1'b0;

  int checks = 0, failures = 0;
  int n_loads = 0, n_overflows = 0, n_waits = 0, n_sync_delay = 0;

  grid_top dut (.clk(clk), .rst_n(rst_n), .rdy(rdy), .int_det(int_det),
                .dav(dav), .data(data), .grid(grid));

  grid_sensor_model #(.GRIDSIZE(GS)) u_grid (.grid(grid), .cursor_pos(cursor_pos),
                                             .present(present), .int_det(int_det));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  task automatic measure(input int pos, input int misses, input int linger);
    int k, seen_over;
    logic [GS-1:0] old_data;
    old_data = data;
    check(dav === 1'b1, "DAV high while waiting for the receiver");
    check(grid === '0, "GRID cleared while waiting in READY");
    // the receiver takes its time; DAV must stay up
    for (int w = 0; w < linger; w++) begin
      @(negedge clk);
      check(dav === 1'b1 && data === old_data, "DAV and DATA held while receiver lingers");
    end
    if (linger > 0) n_waits++;
    cursor_pos = GS'(pos);
    present    = (misses == 0);
    rdy = 1'b1;
    #1;
    // RDY is not seen before it has passed the synchronizer
    check(dav === 1'b1, "DAV still high before RDY is synchronized");
    if (dav === 1'b1) n_sync_delay++;
    @(negedge clk);
    k = 0;
    rdy = 1'b0;
    check(dav === 1'b0, "DAV drops once SRDY is high");
    seen_over = 0;
    while (dav !== 1'b1 && k < 40 * NPOS) begin
      if (!present && grid == GS'(NPOS - 1)) begin
        seen_over++;
        n_overflows++;
        check(data === old_data, "DATA unchanged by a failed sweep");
        if (seen_over >= misses) present = 1'b1;
      end
      @(negedge clk);
      k++;
    end
    check(k == pos + 4 + (NPOS + 1) * misses,
          $sformatf("latency %0d clocks, expected %0d (pos %0d, misses %0d)",
                    k, pos + 4 + (NPOS + 1) * misses, pos, misses));
    check(data === GS'(pos + 1),
          $sformatf("DATA=%0d expected %0d", data, pos + 1));
    if (data === GS'(pos + 1)) n_loads++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(dav === 1'b1 && data === '0, "after reset: DAV high, DATA zero");
    // corner positions first, then random ones
    measure(0, 0, 0);
    measure(NPOS - 2, 0, 2);
    measure(5, 1, 0);
    measure(0, 2, 1);
    for (int i = 0; i < 200; i++)
      measure($urandom_range(0, NPOS - 2), ($urandom_range(0, 3) == 0) ? $urandom_range(1, 2) : 0,
              $urandom_range(0, 3));
    $display("loads=%0d overflows=%0d receiver_waits=%0d sync_delays=%0d",
             n_loads, n_overflows, n_waits, n_sync_delay);
    check(n_loads > 0, "a position was loaded");
    check(n_overflows > 0, "an overflow restart happened");
    check(n_waits > 0, "the receiver kept DAV waiting");
    check(n_sync_delay > 0, "the synchronizer delay was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
