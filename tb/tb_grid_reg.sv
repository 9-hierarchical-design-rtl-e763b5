// tb_grid_reg: self-checking test of the output register.
//
// After reset the register must read zero. Then random count_data
// values are applied with a random active-low load; the register must
// take the value exactly on edges where n_ld is low and hold it
// otherwise.
module tb_grid_reg;

  localparam int unsigned SIZE = digitizer_pkg::GRIDSIZE_DEFAULT;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic n_ld = 1'b1;
  logic [SIZE-1:0] count_data = '0;
  logic [SIZE-1:0] data;
  logic [SIZE-1:0] expected;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  grid_reg dut (.clk(clk), .rst_n(rst_n), .n_ld(n_ld),
                               .count_data(count_data), .data(data));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count_data = 4'hA;
    n_ld = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (data !== '0) begin
      failures++;
      $display("FAIL reset: data=%h", data);
    end
    rst_n = 1'b1;
    expected = '0;
    for (int i = 0; i < 1000; i++) begin
      count_data = SIZE'($urandom);
      n_ld = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (!n_ld) begin
        expected = count_data;
        loads++;
      end else begin
        holds++;
      end
      checks++;
      if (data !== expected) begin
        failures++;
        $display("FAIL step %0d: data=%h expected %h (n_ld=%b)", i, data, expected, n_ld);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
