// tb_switch_ctrl: checks the switch table against a derivation from the
// routing states. For a switch between PE W and PE E of row x, each
// healthy PE holds logical row x, x-1 or x+1 (routing state 0, 1 or 4);
// the other PE's routing state tells on which side of row x that logical
// row now sits in the other column (above, here or below). The W PE's link
// therefore leaves by E (state b), S (state c) or N (state d); with W idle,
// the E PE's need decides (N: c, S: d), and with both idle the channel
// passes straight (a). The combinations that cannot occur, because the
// paths behind them would cross or near-miss, must give `legal` low.
module tb_switch_ctrl;
  import ftsw_pkg::*;

  rs_t rs_w, rs_e;
  sw_state_e state;
  logic legal;
  int checks = 0, failures = 0;

  switch_ctrl dut (.rs_w, .rs_e, .state, .legal);

  // combinations that cannot occur, [rs_w][rs_e]: a south path (1, 2) in one
  // column beside a north path (3, 4) in the next that overlap
  bit never [5][5] = '{
    '{0, 0, 0, 0, 0},
    '{0, 0, 0, 1, 1},
    '{0, 0, 0, 0, 1},
    '{0, 1, 0, 0, 0},
    '{0, 1, 1, 0, 0}
  };

  function automatic bit holds(int rs, output int off);
    off = 0;
    case (rs)
      0: off = 0;
      1: off = -1;
      4: off = 1;
      default: return 0;
    endcase
    return 1;
  endfunction

  // side (-1 above, 0 level, +1 below) of logical row x+r in a column whose
  // PE at row x has routing state rs
  function automatic int side(int rs, int r);
    case (rs)
      0: return (r > 0) ? 1 : (r < 0) ? -1 : 0;
      1: return (r == -1) ? 0 : (r >= 0) ? 1 : -1;
      4: return (r == 1) ? 0 : (r <= 0) ? -1 : 1;
      2: return (r >= 0) ? 1 : -1;
      default: return (r <= 0) ? -1 : 1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++)
      for (int e = 0; e < 8; e++) begin
        rs_w = rs_t'(w);
        rs_e = rs_t'(e);
        #1;
        checks++;
        if (w > 4 || e > 4 || never[w][e]) begin
          if (legal !== 1'b0) begin
            failures++;
            $display("(%0d,%0d) should be illegal", w, e);
          end
        end else begin
          int ow, oe, s;
          sw_state_e exp;
          bit hw, he;
          hw = holds(w, ow);
          he = holds(e, oe);
          if (hw) begin
            s = side(e, ow);
            exp = (s == 0) ? SW_B : (s > 0) ? SW_C : SW_D;
          end else if (he) begin
            s = side(w, oe);
            exp = (s < 0) ? SW_C : SW_D;
          end else begin
            exp = SW_A;
          end
          if (legal !== 1'b1 || state !== exp) begin
            failures++;
            $display("(%0d,%0d): state %0d legal %0b, expected %0d", w, e, state, legal, exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
