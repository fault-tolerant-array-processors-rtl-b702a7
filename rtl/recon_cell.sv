// recon_cell: the distributed reconfiguration controller of one physical PE.
//
// Each PE of the array carries one cell. It
//  * watches the PE's self-test through retry_ctrl: errors are retried with
//    the neighbours suspended; a persistent error declares the PE faulty;
//  * on a declaration, picks a compensation path from its placement state
//    (the shortest allowed one; ties go N, S, W, E) and starts a wavefront
//    message (origin, direction). If no direction is allowed, or the PE is
//    already carrying another path, the array has failed (`fail`, sticky);
//  * relays every wavefront message through the mesh and applies it to its
//    own placement state (placement_state) and path membership;
//  * on recovery of a dormant PE, starts a cancellation message for its
//    path, which undoes all of the above;
//  * derives its routing states (VRS for the switches beside it, HRS for the
//    switches above and below it), its logical index and the job hand-over
//    pulses from its path membership;
//  * when it is the faulty origin of a path, turns the PE into a connecting
//    element: the two link terminals along the path are joined, the others
//    are silent.
// A spare PE has no path of its own; if it is declared faulty it fences
// itself off with a zero-length path (direction DIR_NONE).
//
// SINGLE_SPARE selects the variant with one spare row (south) and one spare
// column (east): only east and south paths, and the 2-bit placement state
// of src_placement instead of the counters of placement_state.
//
// Routing state (VRS; HRS is the same with east for south, west for north):
//   0 not on a vertical path, 1 healthy on a south path, 2 faulty origin of
//   a south path, 3 faulty origin of a north path, 4 healthy on a north path.
//
// Wavefront: messages move one PE per clock over valid/ready links to the
// four physical neighbours, so a message reaches a PE at Manhattan distance
// d after about d clocks (a diamond wavefront). To deliver each message
// exactly once, it spreads along a spanning tree: first along the origin's
// row, then up and down every column (first along the column, then along
// the rows, when the origin is in the top or bottom spare row). A cell
// holds one message; it accepts a new one (its own first, then the
// neighbours in N, S, W, E order) only when that buffer is empty.
//
// What follows the published scheme: retry before declaring, the 4-bit
// placement state with counters, choosing a path from it, the wavefront
// spread to every PE, the path check on arrival, the routing states and the
// job hand-over. The link protocol, the spanning tree, the tie order, the
// treatment of failed spares and all widths are this design's choices.
//
// Interface: link terminals and all per-direction arrays are indexed
// P_N/P_S/P_W/P_E. Everything is registered except the link pass-through
// and the hold/ready decodes. Synchronous active-low reset.
module recon_cell
  import ftsw_pkg::*;
#(
  parameter int N         = 8,
  parameter int M         = 8,
  parameter int X         = 1,
  parameter int Y         = 1,
  parameter int DW        = 8,
  parameter int MAX_RETRY = 10,
  parameter bit SINGLE_SPARE = 1'b0   // spare row/column only at south/east
) (
  input  logic            clk,
  input  logic            rst_n,
  // self-test of the PE
  input  logic            chk_valid,
  input  logic            chk_err,
  output logic            retry_req,
  output logic            dormant,
  // suspension during a retry
  input  logic [3:0]      hold_in,       // neighbour d is retrying
  output logic            hold_out,      // this PE is retrying
  output logic            pe_hold,       // PE must pause (own or neighbour retry)
  // wavefront messages
  input  path_msg_t       min       [4],
  input  logic [3:0]      min_valid,
  output logic [3:0]      min_ready,
  output path_msg_t       mout,
  output logic [3:0]      mout_valid,
  input  logic [3:0]      mout_ready,
  // routing states for the neighbouring switches
  output rs_t             vrs,
  output rs_t             hrs,
  // placement and logical index
  output logic [3:0]      allowed,
  output logic            on_path_o,
  output dir_e            path_dir_o,
  output logic            faulty,
  output logic            log_valid,
  output coord_t          log_x,
  output coord_t          log_y,
  output logic            take_job,      // pulse: took over the previous PE's job
  output logic            give_job,      // pulse: handed that job back
  output logic            fail,          // array failed (sticky)
  output logic            msg_seen,      // pulse: a message was applied here
  // data tracks: PE side and link side
  input  logic [DW-1:0]   pe_out   [4],
  output logic [DW-1:0]   pe_in    [4],
  input  logic [DW-1:0]   link_in  [4],
  output logic [DW-1:0]   link_out [4]
);

  localparam logic SPARE = is_spare(X, Y, N, M);
  localparam dir_e QDIR [4] = '{DIR_N, DIR_S, DIR_W, DIR_E};
  localparam bit S1 = SINGLE_SPARE;
  localparam logic [3:0] NB_EXISTS = {pe_exists(X, Y + 1, N, M, S1), pe_exists(X, Y - 1, N, M, S1),
                                      pe_exists(X + 1, Y, N, M, S1), pe_exists(X - 1, Y, N, M, S1)};

  // ---------------------------------------------------------------- retry
  logic retrying, declare, recover, transient_unused;

  retry_ctrl #(.MAX_RETRY(MAX_RETRY)) u_retry (
    .clk, .rst_n, .chk_valid, .chk_err,
    .retrying, .dormant, .retry_req,
    .transient(transient_unused), .declare, .recover
  );

  assign hold_out = retrying;
  assign pe_hold  = retrying | (|(hold_in & NB_EXISTS));

  // ------------------------------------------------------ path membership
  logic   on_path, origin;
  dir_e   path_dir;
  coord_t path_ox, path_oy;

  assign on_path_o  = on_path;
  assign path_dir_o = path_dir;
  assign faulty     = on_path && origin;

  // ------------------------------------------------------------ messages
  logic      lp_valid;          // own message waiting to be sent
  path_msg_t lp_msg;
  logic [3:0] pend;             // children still to be served
  path_msg_t mb;                // message buffer
  logic      mb_busy;

  assign mb_busy    = |pend;
  assign mout       = mb;
  assign mout_valid = pend;

  // Accept: own message first, then neighbours in fixed order.
  logic      acc;
  path_msg_t acc_msg;
  always_comb begin
    min_ready = '0;
    acc       = 1'b0;
    acc_msg   = lp_msg;
    if (!mb_busy) begin
      if (lp_valid) begin
        acc = 1'b1;
      end else begin
        for (int d = 3; d >= 0; d--)
          if (min_valid[d] && NB_EXISTS[d]) begin
            min_ready = 4'b0001 << d;
          end
        for (int d = 0; d < 4; d++)
          if (min_ready[d]) begin
            acc     = 1'b1;
            acc_msg = min[d];
          end
      end
    end
  end

  // Children of this PE in the spanning tree of a message from (ox,oy).
  function automatic logic [3:0] children(path_msg_t m);
    int ox, oy;
    logic colfirst;
    logic [3:0] c;
    ox = int'(m.ox);
    oy = int'(m.oy);
    colfirst = (ox == 0) || (ox == N + 1);
    if (!colfirst) begin
      c[P_N] = (X - 1 < ox);
      c[P_S] = (X + 1 > ox);
      c[P_W] = (X == ox) && (Y - 1 < oy);
      c[P_E] = (X == ox) && (Y + 1 > oy);
    end else begin
      c[P_W] = (Y - 1 < oy);
      c[P_E] = (Y + 1 > oy);
      c[P_N] = (Y == oy) && (X - 1 < ox);
      c[P_S] = (Y == oy) && (X + 1 > ox);
    end
    return c & NB_EXISTS;
  endfunction

  // ------------------------------------- placement state and path choice
  dir_e       choice;
  logic       choice_ok;

  if (!SINGLE_SPARE) begin : g_place4
    // four directions, blocking counters
    placement_state #(.N(N), .M(M), .X(X), .Y(Y)) u_place (
      .clk, .rst_n,
      .upd_valid(acc), .upd(acc_msg),
      .allowed, .cnt()
    );

    always_comb begin
      int unsigned best;
      choice    = DIR_NONE;
      choice_ok = 1'b0;
      best      = '1;
      for (int d = 0; d < 4; d++)
        if (allowed[d] && path_len(X, Y, QDIR[d], N, M) < best) begin
          best      = path_len(X, Y, QDIR[d], N, M);
          choice    = QDIR[d];
          choice_ok = 1'b1;
        end
    end
  end else begin : g_place2
    // east and south only, 2-bit state
    logic h_ok, v_ok;
    src_placement #(.N(N), .M(M), .X(X), .Y(Y)) u_place (
      .clk, .rst_n,
      .upd_valid(acc), .upd(acc_msg),
      .h_ok, .v_ok, .choice, .choice_ok
    );
    assign allowed = {h_ok, 1'b0, v_ok, 1'b0};
  end

  // ----------------------------------------------------------- sequence
  logic acc_on_path, acc_mine;
  assign acc_on_path = pe_on_path(X, Y, int'(acc_msg.ox), int'(acc_msg.oy), acc_msg.dir, N, M);
  assign acc_mine    = (int'(acc_msg.ox) == X) && (int'(acc_msg.oy) == Y);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lp_valid <= 1'b0;
      lp_msg   <= '0;
      pend     <= '0;
      mb       <= '0;
      on_path  <= 1'b0;
      origin   <= 1'b0;
      path_dir <= DIR_NONE;
      path_ox  <= '0;
      path_oy  <= '0;
      fail     <= 1'b0;
      take_job <= 1'b0;
      give_job <= 1'b0;
      msg_seen <= 1'b0;
    end else begin
      take_job <= 1'b0;
      give_job <= 1'b0;
      msg_seen <= acc;

      // forwarding
      pend <= pend & ~mout_ready;

      // own events
      if (declare) begin
        if (SPARE) begin
          lp_valid <= 1'b1;
          lp_msg   <= '{kind: MSG_DEACT, ox: coord_t'(X), oy: coord_t'(Y), dir: DIR_NONE};
        end else if (choice_ok && !on_path) begin
          lp_valid <= 1'b1;
          lp_msg   <= '{kind: MSG_DEACT, ox: coord_t'(X), oy: coord_t'(Y), dir: choice};
        end else begin
          fail <= 1'b1;
        end
      end else if (recover && on_path && origin) begin
        lp_valid <= 1'b1;
        lp_msg   <= '{kind: MSG_REACT, ox: coord_t'(X), oy: coord_t'(Y), dir: path_dir};
      end

      // apply an accepted message
      if (acc) begin
        if (lp_valid && !mb_busy) lp_valid <= 1'b0;
        mb   <= acc_msg;
        pend <= children(acc_msg);
        if (acc_on_path) begin
          if (acc_msg.kind == MSG_DEACT) begin
            if (on_path) begin
              fail <= 1'b1;        // another path already passes here
            end else begin
              on_path  <= 1'b1;
              origin   <= acc_mine;
              path_dir <= acc_msg.dir;
              path_ox  <= acc_msg.ox;
              path_oy  <= acc_msg.oy;
              take_job <= !acc_mine;
            end
          end else if (on_path && path_ox == acc_msg.ox && path_oy == acc_msg.oy) begin
            on_path  <= 1'b0;
            origin   <= 1'b0;
            path_dir <= DIR_NONE;
            give_job <= !origin;
          end
        end
      end
    end
  end

  // ---------------------------------------------------- routing states
  always_comb begin
    vrs = 3'd0;
    hrs = 3'd0;
    if (on_path)
      unique case (path_dir)
        DIR_S: vrs = origin ? 3'd2 : 3'd1;
        DIR_N: vrs = origin ? 3'd3 : 3'd4;
        DIR_E: hrs = origin ? 3'd2 : 3'd1;
        DIR_W: hrs = origin ? 3'd3 : 3'd4;
        default: ;
      endcase
  end

  // ----------------------------------------------------- logical index
  always_comb begin
    log_valid = !SPARE;
    log_x     = coord_t'(X);
    log_y     = coord_t'(Y);
    if (on_path) begin
      log_valid = !origin;
      unique case (path_dir)
        DIR_S:   log_x = coord_t'(X - 1);
        DIR_N:   log_x = coord_t'(X + 1);
        DIR_E:   log_y = coord_t'(Y - 1);
        DIR_W:   log_y = coord_t'(Y + 1);
        default: log_valid = 1'b0;
      endcase
    end
  end

  // ------------------------------------------------------- data tracks
  always_comb begin
    pe_in    = link_in;
    link_out = pe_out;
    if (on_path && origin) begin
      link_out = '{default: '0};
      if (path_dir == DIR_N || path_dir == DIR_S) begin
        link_out[P_N] = link_in[P_S];
        link_out[P_S] = link_in[P_N];
      end else if (path_dir == DIR_W || path_dir == DIR_E) begin
        link_out[P_W] = link_in[P_E];
        link_out[P_E] = link_in[P_W];
      end
    end
  end

  // A message is only ever sent to a neighbour that exists.
  always_ff @(posedge clk)
    if (rst_n) assert ((pend & ~NB_EXISTS) == '0) else $error("message towards a missing PE");

endmodule
