// grid_reg: the output register that holds the last cursor position for
// the receiver.
//
// On a rising clock edge with n_ld low the register copies count_data;
// otherwise it keeps its value. The load enable is part of the
// synchronous logic, not a gated clock, as the design description
// requires. The reset (synchronous, active low, to zero) is this
// design's own addition so that DATA is defined before the first
// measurement.
//
// Interface: clk, rst_n, n_ld (load, active low), count_data[SIZE-1:0]
// in, data[SIZE-1:0] out. Timing: data shows the loaded value one clock
// after the edge that sampled n_ld low.
module grid_reg #(
  parameter int unsigned SIZE = digitizer_pkg::GRIDSIZE_DEFAULT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            n_ld,
  input  logic [SIZE-1:0] count_data,
  output logic [SIZE-1:0] data
);

  always_ff @(posedge clk) begin
    if (!rst_n)     data <= '0;
    else if (!n_ld) data <= count_data;
  end

endmodule
