// tb_st_switch: exhaustive state check of the single-track switch.
// For each of the four states and random data on all four terminals, every
// output terminal must carry the input of the terminal it is paired with,
// or zero when it is left open. The pairing is written here as a table of
// partners, separately from the design's case statement.
module tb_st_switch;
  import ftsw_pkg::*;

  localparam int DW = 8;
  sw_state_e     state;
  logic [DW-1:0] t_in  [4];
  logic [DW-1:0] t_out [4];
  int checks = 0, failures = 0;

  st_switch #(.DW(DW)) dut (.state, .t_in, .t_out);

  // partner[state][terminal]; 4 = open
  int partner [4][4] = '{
    '{1, 0, 4, 4},   // a: N-S
    '{4, 4, 3, 2},   // b: W-E
    '{3, 2, 1, 0},   // c: N-E, S-W
    '{2, 3, 0, 1}    // d: N-W, S-E
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 50; k++) begin
        state = sw_state_e'(s);
        for (int t = 0; t < 4; t++) t_in[t] = DW'($urandom);
        #1;
        for (int t = 0; t < 4; t++) begin
          logic [DW-1:0] exp;
          exp = (partner[s][t] == 4) ? '0 : t_in[partner[s][t]];
          checks++;
          if (t_out[t] !== exp) begin
            failures++;
            $display("state %0d terminal %0d: got %h expected %h", s, t, t_out[t], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
