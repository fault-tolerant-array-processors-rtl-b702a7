// tb_reliability: the fault-injection experiment at two of the published
// logical array sizes, 4 x 4 and 8 x 8 (see mc_runner), and at 4 x 4 for
// the variant with a single spare row and column. Each trial injects
// permanent faults at random healthy PEs until the array fails; every
// decision of the array is compared with a reference model of the
// placement rules, and every survived fault is followed by a full routing
// check. Prints how many faults each trial survived, the data behind the
// probability C_i that i faults leave the array working.
module tb_reliability;
  logic clk = 0;
  always #5 clk = ~clk;

  int c4, f4, c8, f8, cs, fs;
  logic d4, d8, ds;

  mc_runner #(.N(4), .M(4), .TRIALS(200)) u4 (.clk, .checks(c4), .failures(f4), .done(d4));
  mc_runner #(.N(8), .M(8), .TRIALS(200)) u8 (.clk, .checks(c8), .failures(f8), .done(d8));
  mc_runner #(.N(4), .M(4), .TRIALS(200), .SINGLE(1'b1)) us (.clk, .checks(cs), .failures(fs), .done(ds));

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + cs, f4 + f8 + fs + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d4 && d8 && ds);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + cs, f4 + f8 + fs);
    $finish;
  end
endmodule
