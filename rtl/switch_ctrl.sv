// switch_ctrl: state of one single-track switch from the routing states of
// the two PEs it joins (the published switch table).
//
// For a switch between horizontal neighbours (SW2) the inputs are the
// vertical routing states (VRS) of the west and east PE; for a switch
// between vertical neighbours (SW1) they are the horizontal routing states
// (HRS) of the north and south PE, and the state applies in the turned
// frame of that switch (see st_switch).
//
// Routing state: 0 not on a path, 1 healthy on a south (east) path,
// 2 faulty origin of a south (east) path, 3 faulty origin of a north (west)
// path, 4 healthy on a north (west) path.
//
// The table, rows rs_w, columns rs_e = 0..4 (x: cannot occur):
//   0: b c c d d    1: d b d x x    2: d c x a x
//   3: c x a x d    4: c x x c b
// x marks a switch that no link uses. Two such pairs, (2,2) and (3,3), do
// occur: two neighbouring faulty PEs whose paths run side by side in the
// same direction. They are legal here and the switch lets the channel pass
// (state a). The other x pairs can only come from paths that cross or
// near-miss, which the placement rules exclude: for them, and for a routing
// state above 4, `legal` drops and the switch is parked in state b.
// Purely combinational.
module switch_ctrl
  import ftsw_pkg::*;
(
  input  rs_t       rs_w,
  input  rs_t       rs_e,
  output sw_state_e state,
  output logic      legal
);

  always_comb begin
    state = SW_B;
    legal = 1'b1;
    unique case ({rs_w, rs_e})
      {3'd0, 3'd0}: state = SW_B;
      {3'd0, 3'd1}: state = SW_C;
      {3'd0, 3'd2}: state = SW_C;
      {3'd0, 3'd3}: state = SW_D;
      {3'd0, 3'd4}: state = SW_D;
      {3'd1, 3'd0}: state = SW_D;
      {3'd1, 3'd1}: state = SW_B;
      {3'd1, 3'd2}: state = SW_D;
      {3'd2, 3'd0}: state = SW_D;
      {3'd2, 3'd2}: state = SW_A;
      {3'd2, 3'd1}: state = SW_C;
      {3'd2, 3'd3}: state = SW_A;
      {3'd3, 3'd0}: state = SW_C;
      {3'd3, 3'd2}: state = SW_A;
      {3'd3, 3'd3}: state = SW_A;
      {3'd3, 3'd4}: state = SW_D;
      {3'd4, 3'd0}: state = SW_C;
      {3'd4, 3'd3}: state = SW_C;
      {3'd4, 3'd4}: state = SW_B;
      default:      legal = 1'b0;
    endcase
  end

endmodule
