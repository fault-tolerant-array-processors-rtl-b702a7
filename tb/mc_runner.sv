// mc_runner: one size of the fault-injection experiment behind the
// published array-reliability table (deactivation only): faults are
// injected one at a time at random healthy PEs (spares included) until the
// array fails, TRIALS times. A reference model of the placement rules
// (explicit PE sets of every path, near-miss, shortest allowed path with
// ties N, S, W, E, spare fencing) predicts for every fault whether the array
// survives and which way the path goes; the array must agree, and after
// every survived fault every logical link must be routed correctly.
// With SINGLE set, the variant with one spare row and column is run.
// c_hist[i] counts trials that survived i faults, from which C_i follows.
module mc_runner
  import ftsw_pkg::*;
#(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int TRIALS = 50,
  parameter bit SINGLE = 1'b0     // single spare row/column variant
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int R = N + 2, C = M + 2, DW = 8, MAX_RETRY = 10;
  localparam int SETTLE = 2 * (N + M + 4) + 10;
  localparam int K = 2 * (N + M);

  logic rst_n = 0;
  logic [R-1:0][C-1:0] chk_valid = '0, chk_err = '0;
  logic [R-1:0][C-1:0] retry_req, dormant, pe_hold, faulty, on_path, log_valid;
  logic [R-1:0][C-1:0] take_job, give_job, msg_seen, cell_fail;
  logic [DW-1:0] pe_out [R][C][4], pe_in [R][C][4], ext_in [R][C][4], ext_out [R][C][4];
  coord_t log_x [R][C], log_y [R][C];
  logic array_failed, route_illegal;

  ft_array #(.N(N), .M(M), .SINGLE_SPARE(SINGLE)) dut (.*);

  always_comb
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++)
        for (int d = 0; d < 4; d++) begin
          pe_out[x][y][d] = log_valid[x][y] ? DW'((int'(log_x[x][y]) << 4) | int'(log_y[x][y])) : '1;
          ext_in[x][y][d] = '0;
        end

  int c_hist [K+2];

  typedef struct { int x; int y; dir_e d; } path_t;
  path_t live [$];

  function automatic void mark(path_t p, ref bit map [R][C]);
    int x = p.x, y = p.y;
    while (x >= 0 && x < R && y >= 0 && y < C) begin
      map[x][y] = 1;
      case (p.d)
        DIR_N: x--;
        DIR_S: x++;
        DIR_W: y--;
        DIR_E: y++;
        default: return;
      endcase
    end
  endfunction

  function automatic bit clash(path_t q, path_t p);
    bit a [R][C];
    bit b [R][C];
    mark(q, a);
    mark(p, b);
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++)
        if (a[i][j] && b[i][j]) return 1;
    if (q.d == DIR_E && p.d == DIR_W && absdiff(q.x, p.x) == 1 && q.y < p.y) return 1;
    if (q.d == DIR_W && p.d == DIR_E && absdiff(q.x, p.x) == 1 && p.y < q.y) return 1;
    if (q.d == DIR_S && p.d == DIR_N && absdiff(q.y, p.y) == 1 && q.x < p.x) return 1;
    if (q.d == DIR_N && p.d == DIR_S && absdiff(q.y, p.y) == 1 && p.x < q.x) return 1;
    return 0;
  endfunction

  function automatic bit covered(int x, int y);
    path_t q;
    q.x = x; q.y = y; q.d = DIR_NONE;
    foreach (live[i]) if (clash(q, live[i])) return 1;
    return 0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0dx%0d: %s", N, M, what);
    end
  endtask

  task automatic check_mesh();
    int hx [N+1][M+1];
    int hy [N+1][M+1];
    int cnt [N+1][M+1];
    int bad = 0;
    int i, j, x, y;
    for (i = 0; i <= N; i++) for (j = 0; j <= M; j++) cnt[i][j] = 0;
    for (x = 0; x < R; x++)
      for (y = 0; y < C; y++)
        if (pe_exists(x, y, N, M, SINGLE) && log_valid[x][y]) begin
          i = int'(log_x[x][y]);
          j = int'(log_y[x][y]);
          if (i >= 1 && i <= N && j >= 1 && j <= M) begin
            cnt[i][j]++;
            hx[i][j] = x;
            hy[i][j] = y;
          end else bad++;
        end
    for (i = 1; i <= N; i++) for (j = 1; j <= M; j++) if (cnt[i][j] != 1) bad++;
    if (bad == 0)
      for (i = 1; i <= N; i++)
        for (j = 1; j <= M; j++) begin
          x = hx[i][j];
          y = hy[i][j];
          if (i > 1 && pe_in[x][y][P_N] != DW'(((i - 1) << 4) | j)) bad++;
          if (i < N && pe_in[x][y][P_S] != DW'(((i + 1) << 4) | j)) bad++;
          if (j > 1 && pe_in[x][y][P_W] != DW'((i << 4) | (j - 1))) bad++;
          if (j < M && pe_in[x][y][P_E] != DW'((i << 4) | (j + 1))) bad++;
        end
    chk(bad == 0 && !route_illegal, "placement and routing after a fault");
  endtask

  initial begin
    dir_e dirs [4];
    int x, y, nf, best, len;
    bit exp_fail, dead;
    path_t p, q;
    checks = 0;
    failures = 0;
    done = 0;
    foreach (c_hist[i]) c_hist[i] = 0;
    // candidate directions in tie order; the single-spare variant has only
    // south and east paths, ties going south
    if (SINGLE) dirs = '{DIR_S, DIR_E, DIR_NONE, DIR_NONE};
    else        dirs = '{DIR_N, DIR_S, DIR_W, DIR_E};
    for (int t = 0; t < TRIALS; t++) begin
      rst_n = 0;
      live.delete();
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      nf = 0;
      dead = 0;
      while (!dead) begin
        // random healthy site
        do begin
          x = $urandom_range(0, R - 1);
          y = $urandom_range(0, C - 1);
        end while (!pe_exists(x, y, N, M, SINGLE) || faulty[x][y]);
        // reference decision
        exp_fail = 0;
        p.x = x; p.y = y; p.d = DIR_NONE;
        if (is_spare(x, y, N, M)) begin
          if (covered(x, y)) exp_fail = 1;
        end else if (covered(x, y)) begin
          exp_fail = 1;
        end else begin
          best = 1 << 30;
          for (int d = 0; d < 4; d++) begin
            bit ok;
            ok = 1;
            q.x = x; q.y = y; q.d = dirs[d];
            if (dirs[d] == DIR_NONE) continue;
            foreach (live[i]) if (clash(q, live[i])) ok = 0;
            len = int'(path_len(x, y, dirs[d], N, M));
            if (ok && len < best) begin
              best = len;
              p.d = dirs[d];
            end
          end
          if (p.d == DIR_NONE) exp_fail = 1;
        end
        // inject
        repeat (MAX_RETRY + 1) begin
          chk_valid[x][y] = 1;
          chk_err[x][y] = 1;
          @(posedge clk);
          #1 chk_valid = '0;
          chk_err = '0;
        end
        repeat (SETTLE) @(posedge clk);
        #1;
        chk(array_failed == exp_fail, $sformatf("fault %0d at (%0d,%0d): failed %0b, expected %0b", nf + 1, x, y, array_failed, exp_fail));
        if (exp_fail || array_failed) begin
          dead = 1;
        end else begin
          live.push_back(p);
          nf++;
          if (!is_spare(x, y, N, M)) begin
            int sx, sy;
            sx = x + ((p.d == DIR_S) ? 1 : (p.d == DIR_N) ? -1 : 0);
            sy = y + ((p.d == DIR_E) ? 1 : (p.d == DIR_W) ? -1 : 0);
            chk(on_path[sx][sy] && int'(log_x[sx][sy]) == x && int'(log_y[sx][sy]) == y,
                $sformatf("fault at (%0d,%0d) took direction %0d", x, y, p.d));
          end
          check_mesh();
        end
      end
      chk(nf <= K, "no more faults survived than there are spares");
      c_hist[nf]++;
    end
    $display("%0dx%0d logical, %s spares: faults survived per trial (histogram over %0d trials):", N, M, SINGLE ? "single" : "double", TRIALS);
    for (int i = 0; i <= K; i++) if (c_hist[i] > 0) $display("  %0d faults: %0d trials", i, c_hist[i]);
    done = 1;
  end
endmodule
