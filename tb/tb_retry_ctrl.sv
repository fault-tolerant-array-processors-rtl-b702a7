// tb_retry_ctrl: transient and permanent faults through the retry logic.
// A reference model in the testbench counts the failed retries itself and
// predicts every pulse (retry_req, transient, declare, recover) and level
// (retrying, dormant) one clock after each self-test result. Checks: a
// fault that clears after k < MAX_RETRY retries is transient; one that
// lasts MAX_RETRY retries is declared on exactly that result; a dormant PE
// reports recovery on its first clean self-test.
module tb_retry_ctrl;
  localparam int MAX_RETRY = 4;

  logic clk = 0, rst_n = 0;
  logic chk_valid = 0, chk_err = 0;
  logic retrying, dormant, retry_req, transient, declare, recover;
  int checks = 0, failures = 0;
  int n_transient = 0, n_declare = 0, n_recover = 0;

  retry_ctrl #(.MAX_RETRY(MAX_RETRY)) dut (.*);

  always #5 clk = ~clk;

  // reference
  int st = 0;   // 0 run, 1 retry, 2 dormant
  int fails = 0;

  task automatic check_result(bit e);
    bit x_rr = 0, x_tr = 0, x_de = 0, x_rc = 0;
    chk_valid = 1;
    chk_err   = e;
    case (st)
      0: if (e) begin st = 1; fails = 0; x_rr = 1; end
      1: if (!e) begin st = 0; x_tr = 1; end
         else if (fails + 1 >= MAX_RETRY) begin st = 2; x_de = 1; end
         else begin fails++; x_rr = 1; end
      default: if (!e) begin st = 0; x_rc = 1; end
    endcase
    @(posedge clk);
    #1 chk_valid = 0;
    checks++;
    if ({retry_req, transient, declare, recover, retrying, dormant} !==
        {x_rr, x_tr, x_de, x_rc, st == 1, st == 2}) begin
      failures++;
      $display("got rr%0b tr%0b de%0b rc%0b ry%0b do%0b, expected rr%0b tr%0b de%0b rc%0b ry%0b do%0b",
               retry_req, transient, declare, recover, retrying, dormant,
               x_rr, x_tr, x_de, x_rc, st == 1, st == 2);
    end
    n_transient += int'(transient);
    n_declare   += int'(declare);
    n_recover   += int'(recover);
    @(posedge clk);
    #1;
    checks++;
    if ({retry_req, transient, declare, recover} !== 4'b0) begin
      failures++;
      $display("pulse longer than one clock");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // transient: error, two failed retries, then a pass
    check_result(1); check_result(1); check_result(1); check_result(0);
    // permanent: error then MAX_RETRY failed retries
    check_result(1);
    for (int i = 0; i < MAX_RETRY; i++) check_result(1);
    // dormant self-tests, then recovery
    check_result(1); check_result(1); check_result(0);
    // random
    for (int k = 0; k < 3000; k++) check_result($urandom_range(0, 2) != 0);
    checks++;
    if (n_transient == 0 || n_declare == 0 || n_recover == 0) begin
      failures++;
      $display("an event never happened");
    end
    $display("transient %0d declare %0d recover %0d", n_transient, n_declare, n_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
