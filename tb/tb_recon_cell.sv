// tb_recon_cell: one reconfiguration cell, PE (3,3) of a 4 x 4 logical
// array, with its four neighbours played by the testbench. Covered:
//  * a passing south path: the cell joins it (routing state 1, logical
//    index one row up, job taken over) and relays the message only to its
//    southern child, one clock after accepting it; cancellation undoes it;
//  * its own permanent fault: after the retries the cell picks the
//    shortest allowed path, turns into a connecting element along it and
//    sends the message to all four neighbours; recovery cancels it;
//  * a path below it blocks south, so the next fault goes east;
//  * a path through it blocks everything, so the next fault fails the array;
//  * two messages offered together are taken one after the other;
//  * suspension during a retry.
// Expected values are worked out by hand from the array geometry.
module tb_recon_cell;
  import ftsw_pkg::*;

  localparam int N = 4, M = 4, X = 3, Y = 3, DW = 8, MAX_RETRY = 3;

  logic clk = 0, rst_n = 0;
  logic chk_valid = 0, chk_err = 0, retry_req, dormant;
  logic [3:0] hold_in = 0;
  logic hold_out, pe_hold;
  path_msg_t min [4];
  logic [3:0] min_valid = 0, min_ready;
  path_msg_t mout;
  logic [3:0] mout_valid, mout_ready = 4'hf;
  rs_t vrs, hrs;
  logic [3:0] allowed;
  logic on_path_o, faulty, log_valid, take_job, give_job, fail, msg_seen;
  dir_e path_dir_o;
  coord_t log_x, log_y;
  logic [DW-1:0] pe_out [4], pe_in [4], link_in [4], link_out [4];
  int checks = 0, failures = 0;

  recon_cell #(.N(N), .M(M), .X(X), .Y(Y), .DW(DW), .MAX_RETRY(MAX_RETRY)) dut (.*);

  always #5 clk = ~clk;

  int n_take = 0, n_give = 0;
  always @(posedge clk) begin
    n_take += int'(take_job);
    n_give += int'(give_job);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic path_msg_t mk(msg_kind_e k, int x, int y, dir_e d);
    return '{kind: k, ox: coord_t'(x), oy: coord_t'(y), dir: d};
  endfunction

  // offer a message from neighbour d and wait until it is taken
  task automatic offer(int d, path_msg_t m);
    min[d] = m;
    min_valid[d] = 1;
    do @(posedge clk); while (!min_ready[d]);
    #1 min_valid[d] = 0;
  endtask

  task automatic self_test(bit e);
    chk_valid = 1; chk_err = e;
    @(posedge clk);
    #1 chk_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 4; d++) begin
      min[d] = '0;
      pe_out[d] = DW'(8'h10 + d);
      link_in[d] = DW'(8'h20 + d);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(vrs == 0 && hrs == 0 && allowed == 4'hf && log_valid && log_x == 3 && log_y == 3, "reset state");
    check(link_out[P_E] == 8'h13 && pe_in[P_W] == 8'h22, "healthy PE drives its own links");

    // ---- a south path from (2,3) passes through this PE
    offer(P_N, mk(MSG_DEACT, 2, 3, DIR_S));
    #1;
    check(on_path_o && !faulty && vrs == 1 && hrs == 0, "joined south path, VRS 1");
    check(log_valid && log_x == 2 && log_y == 3, "holds logical (2,3)");
    check(take_job, "job taken over");
    check(mout_valid == 4'b0010 && mout == mk(MSG_DEACT, 2, 3, DIR_S), "relayed to the south child only");
    check(allowed == 4'b0000, "a path through the PE blocks every direction");
    @(posedge clk); #1;
    check(mout_valid == 0, "relay done after one clock");
    offer(P_N, mk(MSG_REACT, 2, 3, DIR_S));
    #1;
    check(!on_path_o && vrs == 0 && give_job && log_x == 3, "cancelled, job handed back");
    @(posedge clk); #1;
    check(allowed == 4'hf, "all directions allowed again");

    // ---- own permanent fault
    self_test(1);
    check(retry_req && hold_out && pe_hold, "first error starts a retry and suspends");
    for (int i = 0; i < MAX_RETRY; i++) self_test(1);
    check(dormant, "declared after the retry bound");
    repeat (2) @(posedge clk); #1;
    // lengths at (3,3): N 3, S 2, W 3, E 2; first shortest is south
    check(faulty && vrs == 2 && hrs == 0 && !log_valid, "faulty origin of a south path");
    check(mout_valid == 4'b1111 && mout == mk(MSG_DEACT, 3, 3, DIR_S), "fault announced to all neighbours");
    check(link_out[P_N] == link_in[P_S] && link_out[P_S] == link_in[P_N] && link_out[P_W] == 0 && link_out[P_E] == 0,
          "connecting element joins N and S");
    @(posedge clk); #1;
    self_test(1);
    check(faulty, "stays faulty while the self-test fails");
    self_test(0);
    repeat (2) @(posedge clk); #1;
    check(!faulty && vrs == 0 && mout_valid == 4'b1111 && mout.kind == MSG_REACT, "recovery cancels the path");
    check(link_out[P_N] == 8'h10, "PE drives its links again");
    repeat (2) @(posedge clk); #1;

    // ---- an east path in row 4 below blocks south; the fault goes east
    offer(P_S, mk(MSG_DEACT, 4, 1, DIR_E));
    #1;
    check(!on_path_o && mout_valid == 4'b0001, "relayed north only");
    // west would near-miss it (opposite paths, adjacent rows, overlapping)
    check(allowed == 4'b1001, $sformatf("south and west blocked by the path below, allowed %b", allowed));
    @(posedge clk);
    self_test(1);
    for (int i = 0; i < MAX_RETRY; i++) self_test(1);
    repeat (2) @(posedge clk); #1;
    check(faulty && hrs == 2 && vrs == 0, "faulty origin of an east path, HRS 2");
    check(link_out[P_W] == link_in[P_E] && link_out[P_E] == link_in[P_W] && link_out[P_N] == 0,
          "connecting element joins W and E");
    self_test(0);
    repeat (3) @(posedge clk); #1;
    offer(P_S, mk(MSG_REACT, 4, 1, DIR_E));
    repeat (2) @(posedge clk); #1;
    check(allowed == 4'hf && !faulty, "back to the initial state");

    // ---- two messages at once: north is taken first, then west
    min[P_N] = mk(MSG_DEACT, 1, 3, DIR_N);   // ends above, not through (3,3)
    min[P_W] = mk(MSG_DEACT, 3, 1, DIR_W);
    min_valid = 4'b0101;
    #1;
    check(min_ready == 4'b0001, "north offered first");
    @(posedge clk); #1 min_valid[P_N] = 0;
    @(posedge clk); #1;
    check(min_ready == 4'b0100, "west taken once the buffer is free");
    @(posedge clk); #1 min_valid[P_W] = 0;
    // path (3,1) W covers (3,0),(3,1): south path from (3,3)? no clash.
    // west from (3,3) intersects it; north path from (1,3) intersects N.
    @(posedge clk); #1;
    check(allowed == 4'b1010, "north and west blocked");

    // ---- a path through this PE: a fault here now fails the array
    offer(P_W, mk(MSG_DEACT, 3, 2, DIR_E));
    #1;
    check(on_path_o && hrs == 1 && log_y == 2, "healthy on an east path");
    @(posedge clk);
    self_test(1);
    for (int i = 0; i < MAX_RETRY; i++) self_test(1);
    @(posedge clk); #1;
    check(fail, "no path left: array failed");

    // ---- neighbour retry suspends this PE
    hold_in = 4'b0100;
    #1 check(pe_hold, "neighbour retry suspends the PE");
    hold_in = 0;

    check(n_take == 2 && n_give == 1, "job hand-over count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
