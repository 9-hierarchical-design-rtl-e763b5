// tb_synchronizer: self-checking test of the RDY synchronizer.
//
// Drives rdy with random values between clock edges and checks that
// srdy equals rdy as sampled one rising edge earlier (default single
// flip-flop), and that a two-stage instance lags by two edges. Also
// checks that reset clears the output.
module tb_synchronizer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rdy = 1'b0;
  logic srdy, srdy2;
  int checks = 0, failures = 0;

  synchronizer dut (.clk(clk), .rst_n(rst_n), .rdy(rdy), .srdy(srdy));
  synchronizer #(.STAGES(2)) dut2 (.clk(clk), .rst_n(rst_n), .rdy(rdy), .srdy(srdy2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hist1, hist2;   // rdy as sampled one and two edges ago

  initial begin
    rdy = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (srdy !== 1'b0 || srdy2 !== 1'b0) begin
      failures++;
      $display("FAIL reset: srdy=%b srdy2=%b", srdy, srdy2);
    end
    rst_n = 1'b1;
    hist1 = 1'b0;
    hist2 = 1'b0;
    for (int i = 0; i < 500; i++) begin
      rdy = 1'($urandom_range(0, 1));
      @(posedge clk);
      hist2 = hist1;
      hist1 = rdy;
      @(negedge clk);
      checks++;
      if (srdy !== hist1) begin
        failures++;
        $display("FAIL cycle %0d: srdy=%b expected %b", i, srdy, hist1);
      end
      if (i > 0) begin
        checks++;
        if (srdy2 !== hist2) begin
          failures++;
          $display("FAIL cycle %0d: 2-stage srdy=%b expected %b", i, srdy2, hist2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
