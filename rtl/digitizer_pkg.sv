// digitizer_pkg: types and constants shared by the one-dimensional
// digitizer interface.
//
// The grid width default (4 wires, counted by a 4-bit counter) and the
// five controller states with their 3-bit codes follow the design
// description. The reset input that the blocks share is this design's
// own addition; the original interface has none.
package digitizer_pkg;

  // Default number of counter bits; the grid has 2**GRIDSIZE_DEFAULT
  // addressable wires.
  localparam int unsigned GRIDSIZE_DEFAULT = 4;

  // Controller states with their state assignment.
  //   READY : waiting for the receiver, DAV shown while SRDY is low
  //   COUNT : sweeping the grid, counter enabled
  //   LOAD  : cursor found, count copied into the output register
  //   ERR   : counter ran over without a cursor, counter cleared
  //   RESET : counter cleared after a load
  typedef enum logic [2:0] {
    ST_READY = 3'b000,
    ST_COUNT = 3'b001,
    ST_LOAD  = 3'b011,
    ST_ERR   = 3'b010,
    ST_RESET = 3'b100
  } state_t;

endpackage
