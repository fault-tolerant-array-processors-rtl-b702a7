// tb_placement_state: random creation and cancellation of compensation
// paths around one PE. The testbench keeps the list of live paths and, after
// every message, works out for each of the PE's four directions whether a
// path from it would share a PE with a live path (by enumerating the PEs of
// both paths) or near-miss one (opposite paths in neighbouring rows or
// columns that overlap); `allowed` must be the negation.
module tb_placement_state;
  import ftsw_pkg::*;

  localparam int N = 8, M = 8, X = 4, Y = 5;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0;
  path_msg_t upd;
  logic [3:0] allowed;
  logic [$clog2(2*(N+M)+1)-1:0] cnt [4];
  int checks = 0, failures = 0;

  placement_state #(.N(N), .M(M), .X(X), .Y(Y)) dut (.clk, .rst_n, .upd_valid, .upd, .allowed, .cnt);

  always #5 clk = ~clk;

  typedef struct { int x; int y; dir_e d; } path_t;
  path_t live [$];

  // mark the PEs of a path
  function automatic void cells(path_t p, ref bit map [N+2][M+2]);
    int x = p.x, y = p.y;
    forever begin
      map[x][y] = 1;
      case (p.d)
        DIR_N: x--;
        DIR_S: x++;
        DIR_W: y--;
        DIR_E: y++;
        default: return;
      endcase
      if (x < 0 || x > N + 1 || y < 0 || y > M + 1) return;
    end
  endfunction

  function automatic bit clash(path_t q, path_t p);
    bit a [N+2][M+2];
    bit b [N+2][M+2];
    int lo, hi;
    cells(q, a);
    cells(p, b);
    for (int i = 0; i < N + 2; i++)
      for (int j = 0; j < M + 2; j++)
        if (a[i][j] && b[i][j]) return 1;
    // near-miss: opposite horizontal paths in adjacent rows that overlap
    if ((q.d == DIR_E && p.d == DIR_W) || (q.d == DIR_W && p.d == DIR_E)) begin
      int ye = (q.d == DIR_E) ? q.y : p.y;
      int yw = (q.d == DIR_W) ? q.y : p.y;
      if ((q.x - p.x == 1 || p.x - q.x == 1) && ye < yw) return 1;
    end
    if ((q.d == DIR_S && p.d == DIR_N) || (q.d == DIR_N && p.d == DIR_S)) begin
      int xs = (q.d == DIR_S) ? q.x : p.x;
      int xn = (q.d == DIR_N) ? q.x : p.x;
      if ((q.y - p.y == 1 || p.y - q.y == 1) && xs < xn) return 1;
    end
    return 0;
  endfunction

  task automatic send(msg_kind_e k, path_t p);
    upd = '{kind: k, ox: coord_t'(p.x), oy: coord_t'(p.y), dir: p.d};
    upd_valid = 1;
    @(posedge clk);
    #1 upd_valid = 0;
  endtask

  task automatic compare();
    dir_e qd [4] = '{DIR_N, DIR_S, DIR_W, DIR_E};
    for (int d = 0; d < 4; d++) begin
      bit blocked = 0;
      path_t q;
      q.x = X; q.y = Y; q.d = qd[d];
      foreach (live[i]) if (clash(q, live[i])) blocked = 1;
      checks++;
      if (allowed[d] !== !blocked) begin
        failures++;
        $display("dir %0d: allowed %0b, expected %0b (live paths %0d)", d, allowed[d], !blocked, live.size());
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_t p;
    dir_e dirs [5] = '{DIR_N, DIR_S, DIR_W, DIR_E, DIR_NONE};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    compare();
    // directed: a horizontal path right below, an opposite near-miss,
    // and a path through the PE itself
    p.x = X + 1; p.y = 2; p.d = DIR_E; live.push_back(p); send(MSG_DEACT, p); compare();
    p.x = X; p.y = Y + 1; p.d = DIR_N; live.push_back(p); send(MSG_DEACT, p); compare();
    p.x = X; p.y = 1; p.d = DIR_E; live.push_back(p); send(MSG_DEACT, p); compare();
    while (live.size() > 0) begin
      p = live.pop_front();
      send(MSG_REACT, p);
      compare();
    end
    // random
    for (int k = 0; k < 2000; k++) begin
      if (live.size() > 0 && ($urandom_range(0, 2) == 0 || live.size() > 12)) begin
        int i = $urandom_range(0, live.size() - 1);
        p = live[i];
        live.delete(i);
        send(MSG_REACT, p);
      end else begin
        p.x = $urandom_range(1, N);
        p.y = $urandom_range(1, M);
        p.d = dirs[$urandom_range(0, 4)];
        live.push_back(p);
        send(MSG_DEACT, p);
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
