// tb_grid_ctr: self-checking test of the grid counter.
//
// Drives random count and n_clr values and compares count_data and err
// with a reference count kept in the testbench: clear wins over count,
// counting wraps at 2**SIZE, err is high exactly at the all-ones count.
// Counts how often clear, increment, hold, err and wrap were seen and
// fails if any of them never happened.
module tb_grid_ctr;

  localparam int unsigned SIZE = digitizer_pkg::GRIDSIZE_DEFAULT;

  logic clk = 1'b0;
  logic count = 1'b0, n_clr = 1'b0;
  logic err;
  logic [SIZE-1:0] count_data;
  int checks = 0, failures = 0;
  int n_clear = 0, n_inc = 0, n_hold = 0, n_err = 0, n_wrap = 0;
  int ref_cnt;

  grid_ctr dut (.clk(clk), .count(count), .n_clr(n_clr),
                               .err(err), .count_data(count_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);          // n_clr low over one edge: counter is zero
    ref_cnt = 0;
    for (int i = 0; i < 2000; i++) begin
      // clear rarely, so the counter often reaches all ones
      n_clr = ($urandom_range(0, 39) != 0);
      count = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (!n_clr) begin
        ref_cnt = 0;
        n_clear++;
      end else if (count) begin
        if (ref_cnt == (1 << SIZE) - 1) n_wrap++;
        ref_cnt = (ref_cnt + 1) % (1 << SIZE);
        n_inc++;
      end else begin
        n_hold++;
      end
      checks++;
      if (count_data !== SIZE'(ref_cnt)) begin
        failures++;
        $display("FAIL step %0d: count_data=%0d expected %0d", i, count_data, ref_cnt);
      end
      checks++;
      if (err !== (ref_cnt == (1 << SIZE) - 1)) begin
        failures++;
        $display("FAIL step %0d: err=%b at count %0d", i, err, ref_cnt);
      end
      if (err) n_err++;
    end
    $display("clear=%0d inc=%0d hold=%0d err=%0d wrap=%0d", n_clear, n_inc, n_hold, n_err, n_wrap);
    checks++;
    if (n_clear == 0 || n_inc == 0 || n_hold == 0 || n_err == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL: a counter function was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
