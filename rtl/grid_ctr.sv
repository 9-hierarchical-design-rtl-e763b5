// grid_ctr: the grid counter. Its value selects the grid wire that is
// energized while the controller sweeps the array.
//
// A synchronous, active-low clear has priority over counting; with
// count high the counter adds one on each rising edge and wraps from all
// ones to zero. ERR is high whenever the count is all ones: the sweep has
// reached the last wire, which the controller treats as an overflow
// without cursor detection. ERR is decoded from the count, so it is a
// registered-state decode, valid one clock after the count changes.
// All of this follows the design description.
//
// Interface: clk, count (enable), n_clr (clear, active low),
// err out, count_data[SIZE-1:0] out.
module grid_ctr #(
  parameter int unsigned SIZE = digitizer_pkg::GRIDSIZE_DEFAULT
) (
  input  logic            clk,
  input  logic            count,
  input  logic            n_clr,
  output logic            err,
  output logic [SIZE-1:0] count_data
);

  logic [SIZE-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!n_clr)     cnt_q <= '0;
    else if (count) cnt_q <= cnt_q + 1'b1;
  end

  assign count_data = cnt_q;
  assign err        = (cnt_q == '1);

endmodule
