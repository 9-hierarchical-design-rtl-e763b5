// grid_sensor_model: behavioural model of the grid of sense wires with
// its drive coil and detector, for simulation only (not synthesizable
// hardware: the real part is analog).
//
// The digitizer energizes the wire selected by grid; when that wire is
// the one under the pen cursor and the cursor is on the tablet, the
// detector reports INT. The model treats detection as immediate, so INT
// changes only when grid (a register output) changes and stays in step
// with the clock, as the design expects.
//
// Interface: grid (wire being energized), cursor_pos (wire under the
// cursor), present (cursor on the tablet), int_det out.
module grid_sensor_model #(
  parameter int unsigned GRIDSIZE = 4
) (
  input  logic [GRIDSIZE-1:0] grid,
  input  logic [GRIDSIZE-1:0] cursor_pos,
  input  logic                present,
  output logic                int_det
);

  assign int_det = present && (grid == cursor_pos);

endmodule
