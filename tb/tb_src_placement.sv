// tb_src_placement: 2-bit placement state of PE (4,5) in a single-spare
// 8 x 8 array. For each path event the testbench enumerates the PEs of the
// new path and of the PE's own east and south paths: a shared PE means that
// direction is closed by a creation and reopened by the cancellation.
// Checks the state after every event, the path choice and the four
// diagram states being reached.
module tb_src_placement;
  import ftsw_pkg::*;

  localparam int N = 8, M = 8, X = 4, Y = 5;

  logic clk = 0, rst_n = 0, upd_valid = 0;
  path_msg_t upd;
  logic h_ok, v_ok, choice_ok;
  dir_e choice;
  int checks = 0, failures = 0;
  bit seen [4] = '{0, 0, 0, 0};

  src_placement #(.N(N), .M(M), .X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit shares(int ax, int ay, dir_e ad, int bx, int by, dir_e bd);
    for (int i = 0; i <= N + 1 - ax + M + 1 - ay; i++) begin
      int cx = ax + ((ad == DIR_S) ? i : 0);
      int cy = ay + ((ad == DIR_E) ? i : 0);
      if (cx > N + 1 || cy > M + 1) break;
      for (int k = 0; k <= N + M + 2; k++) begin
        int dx = bx + ((bd == DIR_S) ? k : 0);
        int dy = by + ((bd == DIR_E) ? k : 0);
        if (dx > N + 1 || dy > M + 1) break;
        if (cx == dx && cy == dy) return 1;
      end
    end
    return 0;
  endfunction

  bit eh = 1, ev = 1;

  task automatic event_(msg_kind_e k, int ox, int oy, dir_e d);
    bit bh, bv;
    dir_e ec;
    bh = shares(X, Y, DIR_E, ox, oy, d);
    bv = shares(X, Y, DIR_S, ox, oy, d);
    if (k == MSG_DEACT) begin
      if (bh) eh = 0;
      if (bv) ev = 0;
    end else begin
      if (bh) eh = 1;
      if (bv) ev = 1;
    end
    upd = '{kind: k, ox: coord_t'(ox), oy: coord_t'(oy), dir: d};
    upd_valid = 1;
    @(posedge clk);
    #1 upd_valid = 0;
    checks++;
    if ({h_ok, v_ok} !== {eh, ev}) begin
      failures++;
      $display("after (%0d,%0d) dir %0d kind %0d: HV %b%b expected %b%b", ox, oy, d, k, h_ok, v_ok, eh, ev);
    end
    // lengths from (4,5): east 4, south 5
    ec = (eh && ev) ? DIR_E : ev ? DIR_S : eh ? DIR_E : DIR_NONE;
    checks++;
    if (choice !== ec || choice_ok !== (eh || ev)) begin
      failures++;
      $display("choice %0d expected %0d", choice, ec);
    end
    seen[{eh, ev}] = 1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // region B of an east path: row 4 to the right of (4,5)
    event_(MSG_DEACT, 4, 7, DIR_E);
    event_(MSG_REACT, 4, 7, DIR_E);
    // region C of an east path: (4,5) lies above row 6, right of column 3
    event_(MSG_DEACT, 6, 3, DIR_E);
    event_(MSG_REACT, 6, 3, DIR_E);
    // region A: the path through (4,5)
    event_(MSG_DEACT, 4, 2, DIR_E);
    event_(MSG_REACT, 4, 2, DIR_E);
    // vertical paths: B (same column below), C (left column, through row 4)
    event_(MSG_DEACT, 6, 5, DIR_S);
    event_(MSG_REACT, 6, 5, DIR_S);
    event_(MSG_DEACT, 2, 3, DIR_S);
    event_(MSG_DEACT, 3, 5, DIR_S);
    event_(MSG_REACT, 3, 5, DIR_S);
    event_(MSG_REACT, 2, 3, DIR_S);
    // random single events, each cancelled right away
    for (int k = 0; k < 500; k++) begin
      int ox, oy;
      dir_e d;
      ox = $urandom_range(1, N);
      oy = $urandom_range(1, M);
      d = $urandom_range(0, 1) ? DIR_E : DIR_S;
      event_(MSG_DEACT, ox, oy, d);
      event_(MSG_REACT, ox, oy, d);
    end
    checks++;
    if (!(seen[0] && seen[1] && seen[2] && seen[3])) begin
      failures++;
      $display("not all four placement states reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
