// ftsw_pkg: types and geometry shared by the single-track-switch
// fault-tolerant array.
//
// Coordinates follow the array convention: x is the row (growing towards
// the south), y the column (growing towards the east). The physical array
// spans rows 0..N+1 and columns 0..M+1 without its four corners; row 0,
// row N+1, column 0 and column M+1 hold the spare PEs.
//
// A compensation path starts at a faulty PE and runs straight to the spare
// at the array edge in one of four directions. Two paths may not share a
// PE, and two opposite paths in neighbouring rows (columns) may not
// "near-miss" (overlap side by side). path_conflict() evaluates both rules;
// it is the combinational heart of the placement state. A path of direction
// DIR_NONE covers only its origin; this design uses it to fence off a spare
// that has itself failed (the distributed scheme in the literature is silent
// on spare failures, so that is this design's own choice).
package ftsw_pkg;

  localparam int COORD_W = 8;
  typedef logic [COORD_W-1:0] coord_t;

  // Port / direction index: also the index of the four link terminals of a
  // PE and of a switch.
  typedef enum logic [2:0] {
    DIR_N    = 3'd0,
    DIR_S    = 3'd1,
    DIR_W    = 3'd2,
    DIR_E    = 3'd3,
    DIR_NONE = 3'd4
  } dir_e;

  // Switch states: a joins N-S, b joins W-E, c joins W-S and N-E,
  // d joins W-N and S-E (terminal names in the switch's own frame).
  // The same four directions as plain array indices (2 bits wide).
  localparam logic [1:0] P_N = 2'd0, P_S = 2'd1, P_W = 2'd2, P_E = 2'd3;

  typedef enum logic [1:0] {SW_A = 2'd0, SW_B = 2'd1, SW_C = 2'd2, SW_D = 2'd3} sw_state_e;

  // Routing state 0..4 of a PE (vertical or horizontal), see recon_cell.
  typedef logic [2:0] rs_t;

  typedef enum logic {MSG_DEACT = 1'b0, MSG_REACT = 1'b1} msg_kind_e;

  // Message carried by the reconfiguration wavefront: where the faulty PE
  // is and which way its compensation path runs.
  typedef struct packed {
    msg_kind_e kind;
    coord_t    ox;
    coord_t    oy;
    dir_e      dir;
  } path_msg_t;

  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_W:   return DIR_E;
      DIR_E:   return DIR_W;
      default: return DIR_NONE;
    endcase
  endfunction

  // Length (number of PE steps) of the straight path from (x,y) to the
  // array edge in direction d.
  function automatic int unsigned path_len(int x, int y, dir_e d, int n, int m);
    case (d)
      DIR_N:   return x;
      DIR_S:   return n + 1 - x;
      DIR_W:   return y;
      DIR_E:   return m + 1 - y;
      default: return 0;
    endcase
  endfunction

  // Bounding box of a path: rows r0..r1, columns c0..c1.
  function automatic void path_box(int x, int y, dir_e d, int n, int m,
                                   output int r0, output int r1,
                                   output int c0, output int c1);
    r0 = x; r1 = x; c0 = y; c1 = y;
    case (d)
      DIR_N:   r0 = 0;
      DIR_S:   r1 = n + 1;
      DIR_W:   c0 = 0;
      DIR_E:   c1 = m + 1;
      default: ;
    endcase
  endfunction

  // True when PE (qx,qy) lies on the path starting at (px,py) in direction pd.
  function automatic logic pe_on_path(int qx, int qy, int px, int py, dir_e pd,
                                   int n, int m);
    int r0, r1, c0, c1;
    path_box(px, py, pd, n, m, r0, r1, c0, c1);
    return (qx >= r0) && (qx <= r1) && (qy >= c0) && (qy <= c1);
  endfunction

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // True when a path from (qx,qy) in direction qd may not coexist with an
  // existing path from (px,py) in direction pd: they intersect or near-miss.
  function automatic logic path_conflict(int qx, int qy, dir_e qd,
                                         int px, int py, dir_e pd,
                                         int n, int m);
    int qr0, qr1, qc0, qc1, pr0, pr1, pc0, pc1;
    logic inter, near;
    path_box(qx, qy, qd, n, m, qr0, qr1, qc0, qc1);
    path_box(px, py, pd, n, m, pr0, pr1, pc0, pc1);
    inter = (qr0 <= pr1) && (pr0 <= qr1) && (qc0 <= pc1) && (pc0 <= qc1);
    near  = ((qd == DIR_E) && (pd == DIR_W) && (absdiff(qx, px) == 1) && (qy < py)) ||
            ((qd == DIR_W) && (pd == DIR_E) && (absdiff(qx, px) == 1) && (py < qy)) ||
            ((qd == DIR_S) && (pd == DIR_N) && (absdiff(qy, py) == 1) && (qx < px)) ||
            ((qd == DIR_N) && (pd == DIR_S) && (absdiff(qy, py) == 1) && (px < qx));
    return inter || near;
  endfunction

  // Existence of a physical PE: inside the (N+2)x(M+2) frame, not a corner.
  // With `single` set, the variant with one spare row (N+1) and one spare
  // column (M+1) only: row 0 and column 0 are empty.
  function automatic logic pe_exists(int x, int y, int n, int m, bit single = 1'b0);
    logic in_frame, corner;
    in_frame = (x >= (single ? 1 : 0)) && (x <= n + 1) && (y >= (single ? 1 : 0)) && (y <= m + 1);
    corner = ((x == 0) || (x == n + 1)) && ((y == 0) || (y == m + 1));
    return in_frame && !corner;
  endfunction

  function automatic logic is_spare(int x, int y, int n, int m);
    return (x == 0) || (x == n + 1) || (y == 0) || (y == m + 1);
  endfunction

endpackage
