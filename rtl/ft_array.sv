// ft_array: fault-tolerant mesh array processor with single-track switches
// and distributed run-time reconfiguration.
//
// The physical array has (N+2) x (M+2) PE sites without the four corners:
// an N x M core plus a spare row above and below and a spare column left
// and right. Between every two neighbouring PEs sits one single-track switch
// (st_switch): SW2 between horizontal neighbours, SW1 between vertical ones.
// The switches between horizontal neighbours are chained up and down a
// vertical channel, those between vertical neighbours left and right along
// a horizontal channel; each channel holds a single track.
//
// When a PE is declared faulty, its logical index, and that of every PE
// beyond it in one straight direction, moves one step along a compensation
// path that ends in a spare. The faulty PE becomes a connecting element.
// Each switch sets itself from the routing states of its two PEs
// (switch_ctrl), so the links between logical neighbours are rebuilt
// without any central control. Everything a PE needs to know arrives by a
// wavefront of messages from the faulty PE (recon_cell), so the time to
// reconfigure depends on the distance to the fault, not on the array size.
//
// Follows the published design: the array frame with double spare rows and
// columns, the single-track switch and its table, the routing states, the
// placement state with counters, retry and reactivation, the wavefront.
// This design's own choices: the two-bus model of a track, the message link
// protocol, the boundary ports, all widths, the default size (the 8 x 8
// subarray the partitioning discussion uses as its example).
//
// SINGLE_SPARE = 1 builds the smaller variant with one spare row (N+1) and
// one spare column (M+1) only, where paths run east or south and each PE
// keeps the 2-bit placement state; row 0 and column 0 are then empty sites.
//
// Interface: per-site arrays are indexed [row][column][terminal], terminal
// P_N/P_S/P_W/P_E. pe_out/pe_in are the PE's own link ports; ext_in/ext_out
// are the terminals that face out of the array (no neighbouring PE); at
// other terminals ext_out is zero and ext_in is ignored. Missing corner sites
// drive zero everywhere. The data path is combinational from pe_out through
// switches and connecting elements to pe_in; control is registered.
//
// Circuit note: the track network is built from bidirectional multiplexers,
// so a tool sees structural loops through the switches and the connecting
// elements. No legal set of switch states closes one: every link is a
// simple path from one PE to its logical neighbour (route_illegal flags a
// switch whose two routing states cannot occur together).
module ft_array
  import ftsw_pkg::*;
#(
  parameter int N         = 8,
  parameter int M         = 8,
  parameter int DW        = 8,
  parameter int MAX_RETRY = 10,
  parameter bit SINGLE_SPARE = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // self-test results per PE
  input  logic [N+1:0][M+1:0]        chk_valid,
  input  logic [N+1:0][M+1:0]        chk_err,
  output logic [N+1:0][M+1:0]        retry_req,
  output logic [N+1:0][M+1:0]        dormant,
  output logic [N+1:0][M+1:0]        pe_hold,
  // PE link ports
  input  logic [DW-1:0]              pe_out  [N+2][M+2][4],
  output logic [DW-1:0]              pe_in   [N+2][M+2][4],
  input  logic [DW-1:0]              ext_in  [N+2][M+2][4],
  output logic [DW-1:0]              ext_out [N+2][M+2][4],
  // reconfiguration status per PE
  output logic [N+1:0][M+1:0]        faulty,
  output logic [N+1:0][M+1:0]        on_path,
  output logic [N+1:0][M+1:0]        log_valid,
  output coord_t                     log_x   [N+2][M+2],
  output coord_t                     log_y   [N+2][M+2],
  output logic [N+1:0][M+1:0]        take_job,
  output logic [N+1:0][M+1:0]        give_job,
  output logic [N+1:0][M+1:0]        msg_seen,
  output logic [N+1:0][M+1:0]        cell_fail,
  // whole array
  output logic                       array_failed,
  output logic                       route_illegal
);

  localparam int R = N + 2;
  localparam int C = M + 2;

  // Padded by one site on every side so that neighbour indexing never
  // leaves the arrays; padding and corners carry zeros.
  path_msg_t     msg_o  [R+2][C+2];
  logic [3:0]    mv_o   [R+2][C+2];
  logic [3:0]    mr_o   [R+2][C+2];
  logic          hold_o [R+2][C+2];
  logic [DW-1:0] lo     [R+2][C+2][4];   // PE link terminal outputs
  logic [DW-1:0] s2o    [R+2][C+2][4];   // SW2 right of site (x,y)
  logic [DW-1:0] s1o    [R+2][C+2][4];   // SW1 below site (x,y)
  rs_t           vrs    [R+2][C+2];
  rs_t           hrs    [R+2][C+2];
  logic [R+1:0][C+1:0] ill2, ill1;

  for (genvar gx = 0; gx < R + 2; gx++) begin : g_row
    for (genvar gy = 0; gy < C + 2; gy++) begin : g_col
      localparam int X = gx - 1;
      localparam int Y = gy - 1;
      localparam logic HERE = pe_exists(X, Y, N, M, SINGLE_SPARE);

      // ------------------------------------------------------- PE site
      if (HERE) begin : g_pe
        path_msg_t     min [4];
        logic [3:0]    min_valid, mout_ready, hold_in;
        logic [DW-1:0] li  [4];
        logic [DW-1:0] lout[4];
        logic [DW-1:0] pin [4];
        logic          fl;

        assign min[P_N] = msg_o[gx-1][gy];
        assign min[P_S] = msg_o[gx+1][gy];
        assign min[P_W] = msg_o[gx][gy-1];
        assign min[P_E] = msg_o[gx][gy+1];
        assign min_valid = {mv_o[gx][gy+1][P_W], mv_o[gx][gy-1][P_E],
                            mv_o[gx+1][gy][P_N], mv_o[gx-1][gy][P_S]};
        assign mout_ready = {mr_o[gx][gy+1][P_W], mr_o[gx][gy-1][P_E],
                             mr_o[gx+1][gy][P_N], mr_o[gx-1][gy][P_S]};
        assign hold_in = {hold_o[gx][gy+1], hold_o[gx][gy-1],
                          hold_o[gx+1][gy], hold_o[gx-1][gy]};

        // link terminals: from the neighbouring switch, or from outside
        assign li[P_N] = pe_exists(X - 1, Y, N, M, SINGLE_SPARE) ? s1o[gx-1][gy][P_E] : ext_in[X][Y][P_N];
        assign li[P_S] = pe_exists(X + 1, Y, N, M, SINGLE_SPARE) ? s1o[gx][gy][P_W]   : ext_in[X][Y][P_S];
        assign li[P_W] = pe_exists(X, Y - 1, N, M, SINGLE_SPARE) ? s2o[gx][gy-1][P_E] : ext_in[X][Y][P_W];
        assign li[P_E] = pe_exists(X, Y + 1, N, M, SINGLE_SPARE) ? s2o[gx][gy][P_W]   : ext_in[X][Y][P_E];

        recon_cell #(.N(N), .M(M), .X(X), .Y(Y), .DW(DW), .MAX_RETRY(MAX_RETRY),
                     .SINGLE_SPARE(SINGLE_SPARE)) u_cell (
          .clk, .rst_n,
          .chk_valid (chk_valid[X][Y]),
          .chk_err   (chk_err[X][Y]),
          .retry_req (retry_req[X][Y]),
          .dormant   (dormant[X][Y]),
          .hold_in,
          .hold_out  (hold_o[gx][gy]),
          .pe_hold   (pe_hold[X][Y]),
          .min, .min_valid,
          .min_ready (mr_o[gx][gy]),
          .mout      (msg_o[gx][gy]),
          .mout_valid(mv_o[gx][gy]),
          .mout_ready,
          .vrs       (vrs[gx][gy]),
          .hrs       (hrs[gx][gy]),
          .allowed   (),
          .on_path_o (on_path[X][Y]),
          .path_dir_o(),
          .faulty    (faulty[X][Y]),
          .log_valid (log_valid[X][Y]),
          .log_x     (log_x[X][Y]),
          .log_y     (log_y[X][Y]),
          .take_job  (take_job[X][Y]),
          .give_job  (give_job[X][Y]),
          .fail      (fl),
          .msg_seen  (msg_seen[X][Y]),
          .pe_out    (pe_out[X][Y]),
          .pe_in     (pin),
          .link_in   (li),
          .link_out  (lout)
        );

        assign cell_fail[X][Y] = fl;
        assign lo[gx][gy]      = lout;
        assign pe_in[X][Y]     = pin;
        assign ext_out[X][Y][P_N] = pe_exists(X - 1, Y, N, M, SINGLE_SPARE) ? '0 : lout[P_N];
        assign ext_out[X][Y][P_S] = pe_exists(X + 1, Y, N, M, SINGLE_SPARE) ? '0 : lout[P_S];
        assign ext_out[X][Y][P_W] = pe_exists(X, Y - 1, N, M, SINGLE_SPARE) ? '0 : lout[P_W];
        assign ext_out[X][Y][P_E] = pe_exists(X, Y + 1, N, M, SINGLE_SPARE) ? '0 : lout[P_E];
      end else begin : g_void
        assign msg_o[gx][gy]  = '0;
        assign mv_o[gx][gy]   = '0;
        assign mr_o[gx][gy]   = '0;
        assign hold_o[gx][gy] = 1'b0;
        assign lo[gx][gy]     = '{default: '0};
        assign vrs[gx][gy]    = '0;
        assign hrs[gx][gy]    = '0;
        if (X >= 0 && X < R && Y >= 0 && Y < C) begin : g_corner
          assign retry_req[X][Y] = 1'b0;
          assign dormant[X][Y]   = 1'b0;
          assign pe_hold[X][Y]   = 1'b0;
          assign faulty[X][Y]    = 1'b0;
          assign on_path[X][Y]   = 1'b0;
          assign log_valid[X][Y] = 1'b0;
          assign log_x[X][Y]     = '0;
          assign log_y[X][Y]     = '0;
          assign take_job[X][Y]  = 1'b0;
          assign give_job[X][Y]  = 1'b0;
          assign msg_seen[X][Y]  = 1'b0;
          assign cell_fail[X][Y] = 1'b0;
          assign pe_in[X][Y]     = '{default: '0};
          assign ext_out[X][Y]   = '{default: '0};
        end
      end

      // ------------------------------------ SW2: between (X,Y) and (X,Y+1)
      if (HERE && pe_exists(X, Y + 1, N, M, SINGLE_SPARE)) begin : g_sw2
        logic [DW-1:0] tin [4];
        sw_state_e     st;
        logic          legal;
        assign tin[P_W] = lo[gx][gy][P_E];
        assign tin[P_E] = lo[gx][gy+1][P_W];
        assign tin[P_N] = s2o[gx-1][gy][P_S];
        assign tin[P_S] = s2o[gx+1][gy][P_N];
        switch_ctrl u_ctrl (.rs_w(vrs[gx][gy]), .rs_e(vrs[gx][gy+1]), .state(st), .legal);
        st_switch #(.DW(DW)) u_sw (.state(st), .t_in(tin), .t_out(s2o[gx][gy]));
        assign ill2[gx][gy] = !legal;
      end else begin : g_nosw2
        assign s2o[gx][gy]  = '{default: '0};
        assign ill2[gx][gy] = 1'b0;
      end

      // ------------------------------------ SW1: between (X,Y) and (X+1,Y)
      // Turned frame: W faces the upper PE, E the lower PE, N continues the
      // channel to the west, S to the east.
      if (HERE && pe_exists(X + 1, Y, N, M, SINGLE_SPARE)) begin : g_sw1
        logic [DW-1:0] tin [4];
        sw_state_e     st;
        logic          legal;
        assign tin[P_W] = lo[gx][gy][P_S];
        assign tin[P_E] = lo[gx+1][gy][P_N];
        assign tin[P_N] = s1o[gx][gy-1][P_S];
        assign tin[P_S] = s1o[gx][gy+1][P_N];
        switch_ctrl u_ctrl (.rs_w(hrs[gx][gy]), .rs_e(hrs[gx+1][gy]), .state(st), .legal);
        st_switch #(.DW(DW)) u_sw (.state(st), .t_in(tin), .t_out(s1o[gx][gy]));
        assign ill1[gx][gy] = !legal;
      end else begin : g_nosw1
        assign s1o[gx][gy]  = '{default: '0};
        assign ill1[gx][gy] = 1'b0;
      end
    end
  end

  assign array_failed  = |cell_fail;
  assign route_illegal = |ill1 | |ill2;

endmodule
