// tb_grid_fsm: self-checking test of the digitizer controller.
//
// A reference model of the state diagram, written with its own state
// numbering, runs beside the controller. Random srdy, int and err
// inputs are applied between clock edges; after every edge all four
// outputs are compared with the model's decode, and dav is checked
// again after srdy changes. Every transition of the diagram
// (READY->READY, READY->Count, Count->Count, Count->Load, Count->ERR,
// ERR->Count, Load->Reset, Reset->READY) must be taken at least once,
// and err must win over int in Count.
module tb_grid_fsm;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic srdy = 1'b0, int_det = 1'b0, errin = 1'b0;
  logic dav, countout, n_clr, n_ld;
  int checks = 0, failures = 0;

  // reference states
  localparam int R_READY = 0, R_COUNT = 1, R_LOAD = 2, R_ERR = 3, R_RESET = 4;
  int ref_state;
  int trans [8];   // coverage of the eight transitions
  int both_seen = 0;

  grid_fsm dut (.clk(clk), .rst_n(rst_n), .srdy(srdy), .int_det(int_det), .errin(errin),
                .dav(dav), .countout(countout), .n_clr(n_clr), .n_ld(n_ld));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(input string where);
    logic e_dav, e_cnt, e_nclr, e_nld;
    e_dav  = (ref_state == R_READY) && !srdy;
    e_cnt  = (ref_state == R_COUNT);
    e_nclr = !((ref_state == R_RESET) || (ref_state == R_ERR));
    e_nld  = (ref_state != R_LOAD);
    checks++;
    if ({dav, countout, n_clr, n_ld} !== {e_dav, e_cnt, e_nclr, e_nld}) begin
      failures++;
      $display("FAIL %s state %0d: dav/count/n_clr/n_ld=%b%b%b%b expected %b%b%b%b", where,
               ref_state, dav, countout, n_clr, n_ld, e_dav, e_cnt, e_nclr, e_nld);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    ref_state = R_RESET;
    check_outputs("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      srdy    = ($urandom_range(0, 2) == 0);
      int_det = ($urandom_range(0, 4) == 0);
      errin   = ($urandom_range(0, 5) == 0);
      #1;
      check_outputs("inputs");
      @(negedge clk);
      case (ref_state)
        R_READY: if (srdy) begin ref_state = R_COUNT; trans[1]++; end
                 else trans[0]++;
        R_COUNT: begin
          if (errin && int_det) both_seen++;
          if (errin) begin ref_state = R_ERR; trans[4]++; end
          else if (int_det) begin ref_state = R_LOAD; trans[3]++; end
          else trans[2]++;
        end
        R_LOAD:  begin ref_state = R_RESET; trans[6]++; end
        R_RESET: begin ref_state = R_READY; trans[7]++; end
        R_ERR:   begin ref_state = R_COUNT; trans[5]++; end
        default: ;
      endcase
      check_outputs("edge");
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (trans[t] == 0) begin
        failures++;
        $display("FAIL: transition %0d never taken", t);
      end
    end
    checks++;
    if (both_seen == 0) begin
      failures++;
      $display("FAIL: err and int never high together in Count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
