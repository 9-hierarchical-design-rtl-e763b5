// grid_fsm: the controller of the digitizer interface, a Moore machine
// with five states (see digitizer_pkg::state_t for the codes).
//
//   READY : DAV is high while SRDY is low (data is available and the
//           receiver has not asked for more). SRDY high starts a sweep.
//   COUNT : the counter runs. ERR (overflow) has priority and leads to
//           ERR; otherwise INT (cursor detected) leads to LOAD, and with
//           neither the sweep goes on.
//   LOAD  : n_ld is low, so the output register takes the count.
//   RESET : n_clr is low, the counter is cleared; then back to READY.
//   ERR   : n_clr is low, the counter is cleared; then a new sweep.
//
// Outputs are decoded from the state only, except DAV, which also needs
// SRDY low. The states, their codes, the transitions and the output
// decode follow the design description. The reset input is this
// design's own addition: rst_n low (synchronous) forces RESET, which
// also clears the counter, and the machine then waits in READY.
//
// Interface: clk, rst_n, srdy, int_det (INT), errin (ERR from counter);
// dav, countout (COUNT), n_clr (/CLR), n_ld (/LD). Timing: one
// transition per rising edge.
module grid_fsm
  import digitizer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic srdy,
  input  logic int_det,
  input  logic errin,
  output logic dav,
  output logic countout,
  output logic n_clr,
  output logic n_ld
);

  state_t state_q, state_d;

  always_comb begin
    unique case (state_q)
      ST_READY: state_d = srdy ? ST_COUNT : ST_READY;
      ST_COUNT: begin
        if (errin)        state_d = ST_ERR;
        else if (int_det) state_d = ST_LOAD;
        else              state_d = ST_COUNT;
      end
      ST_LOAD:  state_d = ST_RESET;
      ST_RESET: state_d = ST_READY;
      ST_ERR:   state_d = ST_COUNT;
      default:  state_d = ST_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_RESET;
    else        state_q <= state_d;
  end

  assign n_clr    = !((state_q == ST_RESET) || (state_q == ST_ERR));
  assign n_ld     = !(state_q == ST_LOAD);
  assign countout = (state_q == ST_COUNT);
  assign dav      = (state_q == ST_READY) && !srdy;

  // The counter is never enabled while it is being cleared or loaded.
  a_count_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                 countout |-> (n_clr && n_ld));
  // A load is always followed by a clear of the counter.
  a_load_then_clear: assert property (@(posedge clk) disable iff (!rst_n)
                                      !n_ld |=> !n_clr);

endmodule
