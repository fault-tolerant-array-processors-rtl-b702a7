// st_switch: one single-track switching element.
//
// A switch sits between two neighbouring PEs and has four terminals in its
// own frame: W and E face the two PEs, N and S continue the channel to the
// next switch. A terminal carries one track in each direction, so every
// terminal has an input and an output bus. The four states join the
// terminals in pairs:
//   a: N-S          (the channel passes straight by)
//   b: W-E          (the two PEs are linked directly)
//   c: W-S and N-E
//   d: W-N and S-E
// A terminal left out of the pair(s) drives zero. The four state names and
// their pictures come from the published switch function; which diagonal
// pair belongs to c and which to d was fixed here so that the published
// switch table (see switch_ctrl) builds every link correctly.
//
// Used for both switch kinds: the one between horizontal neighbours (SW2)
// is instanced as is, the one between vertical neighbours (SW1) is the same
// element turned so that its W/E terminals face the upper/lower PE and its
// N/S terminals continue the horizontal channel to the west/east.
//
// Purely combinational. DW is the width of one track direction; 8 bits
// follows the 8-bit data track of the one-track switch chip cited as the
// reference implementation.
module st_switch
  import ftsw_pkg::*;
#(
  parameter int DW = 8
) (
  input  sw_state_e         state,
  input  logic [DW-1:0]     t_in  [4],   // indexed by P_N/P_S/P_W/P_E
  output logic [DW-1:0]     t_out [4]
);

  always_comb begin
    t_out = '{default: '0};
    unique case (state)
      SW_A: begin
        t_out[P_N] = t_in[P_S];
        t_out[P_S] = t_in[P_N];
      end
      SW_B: begin
        t_out[P_W] = t_in[P_E];
        t_out[P_E] = t_in[P_W];
      end
      SW_C: begin
        t_out[P_W] = t_in[P_S];
        t_out[P_S] = t_in[P_W];
        t_out[P_N] = t_in[P_E];
        t_out[P_E] = t_in[P_N];
      end
      SW_D: begin
        t_out[P_W] = t_in[P_N];
        t_out[P_N] = t_in[P_W];
        t_out[P_S] = t_in[P_E];
        t_out[P_E] = t_in[P_S];
      end
    endcase
  end

endmodule
