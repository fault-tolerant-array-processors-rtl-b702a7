// tb_ft_array: end-to-end run of the whole array at its default size
// (8 x 8 logical PEs on a 10 x 10 physical frame).
//
// Every PE model drives its current logical index on all four link ports.
// After each reconfiguration the testbench checks that
//  * every logical index 1..N x 1..M is held by exactly one healthy PE, at
//    most one step from its home position;
//  * every PE receives, on each port, the index of its logical neighbour on
//    that side: the switches and connecting elements have rebuilt the mesh;
//  * no switch sees an impossible pair of routing states and the array has
//    not failed.
// The scenario goes through a transient fault (retry, neighbours held), one
// permanent fault per path direction, the wavefront timing (a PE at
// Manhattan distance d from the fault applies the message d clocks after
// the fault PE), a recovery (reactivation), a failed spare, two faults
// declared in the same clock, and finally a fault that leaves no path, which
// must fail the array. Each mechanism is counted, and one that never
// happened counts as a failure.
module tb_ft_array;
  import ftsw_pkg::*;

  localparam int N = 8, M = 8, DW = 8, MAX_RETRY = 10;
  localparam int R = N + 2, C = M + 2;
  localparam int SETTLE = 2 * (N + M + 4) + 10;

  logic clk = 0, rst_n = 0;
  logic [R-1:0][C-1:0] chk_valid = '0, chk_err = '0;
  logic [R-1:0][C-1:0] retry_req, dormant, pe_hold, faulty, on_path, log_valid;
  logic [R-1:0][C-1:0] take_job, give_job, msg_seen, cell_fail;
  logic [DW-1:0] pe_out [R][C][4], pe_in [R][C][4], ext_in [R][C][4], ext_out [R][C][4];
  coord_t log_x [R][C], log_y [R][C];
  logic array_failed, route_illegal;

  ft_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic logic [DW-1:0] code(int i, int j);
    return DW'((i << 4) | j);
  endfunction

  // PE models: drive the held logical index
  always_comb
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++)
        for (int d = 0; d < 4; d++) begin
          pe_out[x][y][d] = log_valid[x][y] ? code(int'(log_x[x][y]), int'(log_y[x][y])) : '1;
          ext_in[x][y][d] = '0;
        end

  // mechanism counters
  int n_retry = 0, n_hold = 0, n_take = 0, n_give = 0, n_msg = 0;
  int n_declare = 0, n_transient = 0, n_recover = 0, n_spare = 0, n_fail = 0, n_simul = 0;
  int n_dir [4] = '{0, 0, 0, 0};
  int first_seen [R][C];

  always @(posedge clk) begin
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++) begin
        n_retry += int'(retry_req[x][y]);
        n_hold  += int'(pe_hold[x][y]);
        n_take  += int'(take_job[x][y]);
        n_give  += int'(give_job[x][y]);
        n_msg   += int'(msg_seen[x][y]);
        if (msg_seen[x][y] && first_seen[x][y] < 0) first_seen[x][y] = cyc;
      end
  end

  task automatic clear_seen();
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++) first_seen[x][y] = -1;
  endtask

  // whole-array consistency of placement and routing
  task automatic check_mesh(string tag);
    int holder_x [N+1][M+1];
    int holder_y [N+1][M+1];
    int cnt [N+1][M+1];
    int bad_map = 0, bad_link = 0;
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= M; j++) cnt[i][j] = 0;
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++)
        if (pe_exists(x, y, N, M) && log_valid[x][y]) begin
          int i = int'(log_x[x][y]), j = int'(log_y[x][y]);
          if (i < 1 || i > N || j < 1 || j > M || faulty[x][y] ||
              absdiff(i, x) + absdiff(j, y) > 1) bad_map++;
          else begin
            cnt[i][j]++;
            holder_x[i][j] = x;
            holder_y[i][j] = y;
          end
        end
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= M; j++) if (cnt[i][j] != 1) bad_map++;
    check(bad_map == 0, {tag, ": every logical index placed once, next to home"});
    if (bad_map == 0)
      for (int i = 1; i <= N; i++)
        for (int j = 1; j <= M; j++) begin
          int x = holder_x[i][j], y = holder_y[i][j];
          if (i > 1 && pe_in[x][y][P_N] != code(i - 1, j)) bad_link++;
          if (i < N && pe_in[x][y][P_S] != code(i + 1, j)) bad_link++;
          if (j > 1 && pe_in[x][y][P_W] != code(i, j - 1)) bad_link++;
          if (j < M && pe_in[x][y][P_E] != code(i, j + 1)) bad_link++;
        end
    check(bad_link == 0, $sformatf("%s: all logical links routed (%0d wrong)", tag, bad_link));
    check(!route_illegal && !array_failed, {tag, ": switches legal, array alive"});
  endtask

  // self-test results for a set of PEs, one per clock
  task automatic results(int xs [$], int ys [$], bit err, int times);
    repeat (times) begin
      foreach (xs[k]) begin
        chk_valid[xs[k]][ys[k]] = 1;
        chk_err[xs[k]][ys[k]]   = err;
      end
      @(posedge clk);
      #1 chk_valid = '0;
      chk_err = '0;
    end
  endtask

  task automatic permanent(int x, int y);
    results('{x}, '{y}, 1, MAX_RETRY + 1);
    n_declare++;
  endtask

  task automatic settle();
    repeat (SETTLE) @(posedge clk);
    #1;
  endtask

  // which direction the path of faulty PE (x,y) took, from its neighbours
  task automatic count_dir(int x, int y, dir_e exp);
    dir_e got = DIR_NONE;
    if (on_path[x-1][y] && !faulty[x-1][y] && int'(log_x[x-1][y]) == x) got = DIR_N;
    if (on_path[x+1][y] && !faulty[x+1][y] && int'(log_x[x+1][y]) == x) got = DIR_S;
    if (on_path[x][y-1] && !faulty[x][y-1] && int'(log_y[x][y-1]) == y) got = DIR_W;
    if (on_path[x][y+1] && !faulty[x][y+1] && int'(log_y[x][y+1]) == y) got = DIR_E;
    check(faulty[x][y] && got == exp, $sformatf("fault (%0d,%0d) took direction %0d, expected %0d", x, y, got, exp));
    if (got != DIR_NONE) n_dir[got]++;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, worst, dd;
    clear_seen();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    settle();
    check_mesh("fault-free");

    // ---- transient fault: two failed retries, then a pass
    results('{4}, '{4}, 1, 3);
    check(pe_hold[4][4] && pe_hold[3][4] && pe_hold[4][5] && !pe_hold[2][2], "retry suspends the PE and its neighbours");
    results('{4}, '{4}, 0, 1);
    n_transient++;
    settle();
    check(!faulty[4][4] && n_msg == 0, "transient fault leaves the array untouched");
    check_mesh("after transient");

    // ---- permanent fault at (2,2): shortest path north; wavefront timing
    clear_seen();
    permanent(2, 2);
    settle();
    count_dir(2, 2, DIR_N);
    t0 = first_seen[2][2];
    worst = 0;
    for (int x = 0; x < R; x++)
      for (int y = 0; y < C; y++)
        if (pe_exists(x, y, N, M)) begin
          dd = absdiff(x, 2) + absdiff(y, 2);
          if (first_seen[x][y] - t0 != dd) begin
            worst++;
            if (worst < 5) $display("(%0d,%0d) seen at %0d, origin at %0d", x, y, first_seen[x][y], t0);
          end
        end
    check(t0 >= 0 && worst == 0, $sformatf("wavefront: message at distance d after d clocks (%0d off)", worst));
    check_mesh("fault (2,2)");

    permanent(7, 6);  settle(); count_dir(7, 6, DIR_S); check_mesh("fault (7,6)");
    permanent(5, 8);  settle(); count_dir(5, 8, DIR_E); check_mesh("fault (5,8)");
    permanent(6, 1);  settle(); count_dir(6, 1, DIR_W); check_mesh("fault (6,1)");

    // ---- recovery of (7,6): reactivation gives the job back
    results('{7}, '{6}, 0, 1);
    n_recover++;
    settle();
    check(!faulty[7][6] && !on_path[8][6] && log_x[7][6] == 7, "recovered PE reactivated");
    check_mesh("recovery (7,6)");

    // ---- a second north path beside the first one
    permanent(2, 3);  settle(); count_dir(2, 3, DIR_N); check_mesh("fault (2,3)");

    // ---- failed spare (0,5) fences itself off; (1,5) may not go north
    results('{0}, '{5}, 1, MAX_RETRY + 1);
    n_spare++;
    settle();
    check(on_path[0][5] && !log_valid[0][5], "failed spare fenced");
    permanent(1, 5);  settle(); count_dir(1, 5, DIR_E); check_mesh("fault (1,5) beside failed spare");

    // ---- two faults in the same clock, far apart; messages cross
    results('{4, 7}, '{6, 3}, 1, MAX_RETRY + 1);
    n_declare += 2;
    n_simul++;
    settle();
    count_dir(4, 6, DIR_E);
    count_dir(7, 3, DIR_S);
    check_mesh("simultaneous faults (4,6),(7,3)");

    // ---- a PE on a path fails: no path left, the array fails
    permanent(1, 7);
    settle();
    check(array_failed, "fault on a path with no way out fails the array");
    n_fail += int'(array_failed);

    // ---- every mechanism happened
    check(n_retry > 0 && n_hold > 0, "retry and suspension happened");
    check(n_transient > 0 && n_recover > 0 && n_spare > 0 && n_simul > 0 && n_fail > 0,
          "transient, recovery, spare fence, simultaneous faults, failure happened");
    check(n_dir[0] > 0 && n_dir[1] > 0 && n_dir[2] > 0 && n_dir[3] > 0, "paths in all four directions");
    check(n_take > 0 && n_give > 0 && n_msg > 0, "job hand-over and wavefront happened");
    $display("retries %0d holds %0d declares %0d paths N%0d S%0d W%0d E%0d take %0d give %0d messages applied %0d",
             n_retry, n_hold, n_declare, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_take, n_give, n_msg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
