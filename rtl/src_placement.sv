// src_placement: 2-bit placement state of one PE in the variant with a
// single spare row (bottom) and a single spare column (right).
//
// With spares only to the south and east, a faulty PE can start an east or
// a south path, and paths must only avoid crossing. Each PE keeps two bits:
// H (a horizontal path may still pass through it) and V (a vertical one
// may). All PEs start in HV. A new east path from (ox,oy) changes a PE by
// the region it lies in:
//   A  the path itself (row ox, columns >= oy)     -> H and V cleared
//   B  the rest of row ox (columns < oy)           -> H cleared
//   C  rows above, columns >= oy                   -> V cleared
// and a south path works the same way with rows and columns swapped. This
// yields the published state diagram HV -> H'V (B), HV -> HV' (C),
// HV -> H'V' (A), H'V -> H'V' (A or C), HV' -> H'V' (A or B).
// A cancelled path (the PE behind it has recovered) sets back the bits its
// region cleared, the reverse (dashed) transitions. The two bits cannot
// remember a second path that blocks the same bit, so recovery is exact
// only when blockers do not overlap; the double-spare array (recon_cell)
// keeps counters for that reason.
//
// A failed spare (DIR_NONE, this design's addition) closes the direction of
// every PE whose path would end on it.
//
// On a fault, `choice` gives the path to take: the shorter of east and
// south when both are open (ties go south, this design's choice), the open
// one otherwise; `choice_ok` is low in state H'V', where the array fails.
//
// Physical rows 1..N+1 and columns 1..M+1; row N+1 and column M+1 are
// spares. Messages use ftsw_pkg::path_msg_t with dir DIR_E or DIR_S.
// Registered state, one update per upd_valid clock, synchronous reset.
module src_placement
  import ftsw_pkg::*;
#(
  parameter int N = 8,
  parameter int M = 8,
  parameter int X = 1,
  parameter int Y = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      upd_valid,
  input  path_msg_t upd,
  output logic      h_ok,
  output logic      v_ok,
  output dir_e      choice,
  output logic      choice_ok
);

  logic clr_h, clr_v;

  always_comb begin
    int ox, oy;
    ox = int'(upd.ox);
    oy = int'(upd.oy);
    clr_h = 1'b0;
    clr_v = 1'b0;
    if (upd.dir == DIR_E) begin
      if (X == ox && Y >= oy)     begin clr_h = 1'b1; clr_v = 1'b1; end  // A
      else if (X == ox && Y < oy) clr_h = 1'b1;                         // B
      else if (X < ox && Y >= oy) clr_v = 1'b1;                         // C
    end else if (upd.dir == DIR_S) begin
      if (Y == oy && X >= ox)     begin clr_h = 1'b1; clr_v = 1'b1; end  // A
      else if (Y == oy && X < ox) clr_v = 1'b1;                         // B
      else if (Y < oy && X >= ox) clr_h = 1'b1;                         // C
    end else begin
      // a failed spare: no path may end on it
      if (X == ox && Y == oy)     begin clr_h = 1'b1; clr_v = 1'b1; end
      else if (X == ox && Y < oy) clr_h = 1'b1;
      else if (Y == oy && X < ox) clr_v = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_ok <= 1'b1;
      v_ok <= 1'b1;
    end else if (upd_valid) begin
      if (upd.kind == MSG_DEACT) begin
        if (clr_h) h_ok <= 1'b0;
        if (clr_v) v_ok <= 1'b0;
      end else begin
        if (clr_h) h_ok <= 1'b1;
        if (clr_v) v_ok <= 1'b1;
      end
    end
  end

  localparam int LEN_E = M + 1 - Y;
  localparam int LEN_S = N + 1 - X;

  always_comb begin
    choice_ok = h_ok || v_ok;
    if (h_ok && v_ok) choice = (LEN_E < LEN_S) ? DIR_E : DIR_S;
    else if (v_ok)    choice = DIR_S;
    else if (h_ok)    choice = DIR_E;
    else              choice = DIR_NONE;
  end

endmodule
