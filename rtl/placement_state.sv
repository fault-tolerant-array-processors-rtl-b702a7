// placement_state: the 4-bit placement state of one PE, kept as four
// blocking counters so that paths can be cancelled again.
//
// Bit d of `allowed` says whether this PE, should it fail, may still start
// a compensation path in direction d (index P_N/P_S/P_W/P_E). Counter d
// holds how many established paths forbid that direction: paths that would
// be crossed (including any path through this PE itself) and opposite paths
// in a neighbouring row or column that would near-miss. Every wavefront
// message (upd_valid for one cycle) is tested against all four directions
// with ftsw_pkg::path_conflict; a deactivation message increments the
// counters it blocks, a reactivation (cancellation) decrements them, and a
// direction is allowed again when its counter returns to zero.
//
// The counter-per-direction scheme and the deactivate/reactivate update
// follow the published run-time algorithm; the exact blocking rule is
// derived here from the reconfigurability conditions (no intersection, no
// near-miss), and the counter width is this design's choice: wide enough
// for one path per spare PE, 2(N+M), which no direction can exceed.
//
// Timing: counters update on the clock edge that sees upd_valid; `allowed`
// is a registered-counter decode. Synchronous active-low reset clears all
// counters (every direction allowed).
module placement_state
  import ftsw_pkg::*;
#(
  parameter int N     = 8,     // logical rows
  parameter int M     = 8,     // logical columns
  parameter int X     = 1,     // physical row of this PE
  parameter int Y     = 1,     // physical column of this PE
  parameter int CNT_W = $clog2(2 * (N + M) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_valid,
  input  path_msg_t        upd,
  output logic [3:0]       allowed,
  output logic [CNT_W-1:0] cnt [4]
);

  localparam dir_e QDIR [4] = '{DIR_N, DIR_S, DIR_W, DIR_E};

  logic [3:0] hit;

  always_comb begin
    for (int d = 0; d < 4; d++)
      hit[d] = path_conflict(X, Y, QDIR[d], int'(upd.ox), int'(upd.oy), upd.dir, N, M);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '{default: '0};
    end else if (upd_valid) begin
      for (int d = 0; d < 4; d++)
        if (hit[d]) begin
          if (upd.kind == MSG_DEACT) cnt[d] <= cnt[d] + 1'b1;
          else                       cnt[d] <= cnt[d] - 1'b1;
        end
    end
  end

  always_comb
    for (int d = 0; d < 4; d++) allowed[d] = (cnt[d] == '0);

  // A cancellation must match an earlier creation.
  always_ff @(posedge clk)
    if (rst_n && upd_valid && upd.kind == MSG_REACT)
      for (int d = 0; d < 4; d++)
        assert (!(hit[d] && cnt[d] == '0)) else $error("placement counter underflow");

endmodule
