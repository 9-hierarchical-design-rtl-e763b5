// tb_testreg: the counter and the output register tested together, the
// register taking the live count as its input (the arrangement used to
// check the register before the controller exists).
//
// The counter is cleared, counted with random enables, and the register
// is loaded at random moments. After every clock the register must hold
// the count that was present on the last edge with n_ld low, and the
// counter must match a reference count.
module tb_testreg;

  localparam int unsigned GRIDSIZE = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic count = 1'b0, n_clr = 1'b0, n_ld = 1'b1;
  logic err;
  logic [GRIDSIZE-1:0] gridcnt, reg_count;
  int checks = 0, failures = 0, loads = 0;
  int ref_cnt, ref_reg;

  grid_ctr #(.SIZE(GRIDSIZE)) count_circuit (.clk(clk), .count(count), .n_clr(n_clr),
                                             .err(err), .count_data(gridcnt));
  grid_reg #(.SIZE(GRIDSIZE)) reg_circuit (.clk(clk), .rst_n(rst_n), .n_ld(n_ld),
                                           .count_data(gridcnt), .data(reg_count));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_cnt = 0;
    ref_reg = 0;
    for (int i = 0; i < 1000; i++) begin
      n_clr = ($urandom_range(0, 29) != 0);
      count = ($urandom_range(0, 1) != 0);
      n_ld  = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (!n_ld) begin
        ref_reg = ref_cnt;
        loads++;
      end
      if (!n_clr) ref_cnt = 0;
      else if (count) ref_cnt = (ref_cnt + 1) % (1 << GRIDSIZE);
      checks++;
      if (gridcnt !== GRIDSIZE'(ref_cnt) || reg_count !== GRIDSIZE'(ref_reg)) begin
        failures++;
        $display("FAIL step %0d: count=%0d reg=%0d expected %0d %0d", i, gridcnt, reg_count,
                 ref_cnt, ref_reg);
      end
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
