// mesh_row: one physical row of M cells of the array (tori_fabric).
//
// The row lies in the two sub-tori of its row parity; its logical row
// coordinate row_i inside them is an input, so one module serves every row.
// Along the row, physical column P belongs to sub-torus column parity P mod
// 2 and has logical column il_log(P/2, S); E/W neighbours are wired here
// (logical column +-1 mod S of the same sub-torus, the wrap-around link
// included). N/S neighbours lie in other rows and come in as whole-row
// buses: s_pkt (packets of the row holding the logical S neighbours), n_hi
// (results of the N neighbours' S links) and the row's own pkt / s_hi
// outputs. The 2x2 block partners are in this row and in the row
// blk_other (the other row of the block). Ring-mode constants are computed
// from row_i with the closed forms of nfs_pkg. Timing: one clock per step.
//
// Per cell, link_sched names the one neighbour the cell is paired with; the
// cell is the lo end of its E and S links. The cell's post-step packet comes
// from the link on that side: its own E or S link, or the W or N
// neighbour's link (hi side); with no partner it keeps its packet. The E/S
// links are enabled only when the cell schedules them and routing is
// active. The result goes to route_cell, which consumes, injects and
// registers it. The whole row is one link_sched, two cx_elem (E and S
// links) and one route_cell, each handling the M cells side by side.
module mesh_row
  import nfs_pkg::*;
#(
  parameter int unsigned M     = 128,
  parameter int unsigned K     = 69,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 2,
  localparam int unsigned S    = M / 2,
  localparam int unsigned AWL  = $clog2(S),
  localparam int unsigned AW1  = AWL + 1,
  localparam int unsigned PW   = 1 + 2 * AW1 + K,
  localparam int unsigned EW   = 2 + 2 * AW1,
  localparam int unsigned MW   = $clog2(M),
  localparam int unsigned SLW  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  use_result,
  input  logic                  active,
  input  mode_t                 mode,
  input  logic [1:0]            step,
  input  logic [AWL-1:0]        row_i,       // logical row in the sub-tori
  input  logic                  row_lower,   // 1: lower row of its 2x2 blocks
  input  logic [M-1:0][PW-1:0]  s_pkt,
  input  logic [M-1:0][PW-1:0]  n_hi,
  output logic [M-1:0][PW-1:0]  pkt,
  output logic [M-1:0][PW-1:0]  s_hi,
  output dir_t [M-1:0]          dirs,
  input  logic [M-1:0][K-1:0]   blk_other,   // u of the block's other row
  output logic [M-1:0][K-1:0]   u,
  output logic [M-1:0][K-1:0]   acc,
  output logic [M-1:0]          empty,
  output logic                  ev_merge,
  output logic                  ev_consume,
  output logic                  ev_inject,
  output logic                  ev_wrap,
  input  logic                  ld_row_sel,
  input  ld_cmd_t               ld_cmd,
  input  logic [MW-1:0]         ld_col,
  input  logic [SLW-1:0]        ld_slot,
  input  logic [EW-1:0]         ld_entry,
  input  logic [K-1:0]          ld_u
);

  logic [M-1:0][PW-1:0]    ehi, elo, slo, nxt, e_pkt, w_hi;
  logic [M-1:0][AW1-1:0]   c_addr, r_addr;
  logic [M-1:0][AW1-2:0]   my_c;
  logic [M-1:0]            col_odd, ring_par, wrap_e, en_e, en_s, wr_s;
  logic [M-1:0]            e_mg, s_mg, e_sw, s_sw, e_cs, e_in, ld_sel;
  dir_t [M-1:0]            ring_next, ring_prev;
  logic [M-1:0][3:0][K-1:0] blk_u;
  logic [AW1-1:0]          my_ra;
  logic                    ring;
  int unsigned             ri;

  assign ri    = 32'(row_i);
  assign ring  = (mode == MODE_RING);
  assign my_ra = {1'b0, row_i} + AW1'(S / 2);

  // Position constants.
  always_comb begin
    for (int unsigned p = 0; p < M; p++) begin
      int unsigned j;
      j  = il_log(p / 2, S);
      c_addr[p]    = AW1'(j + S / 2);
      r_addr[p]    = my_ra;
      my_c[p]      = c_addr[p][AW1-2:0];
      col_odd[p]   = 1'(j % 2);
      wrap_e[p]    = (j == S - 1);
      wr_s[p]      = (row_i == AWL'(S - 1));
      ring_par[p]  = ring_parity(ri, j);
      ring_next[p] = ring_next_dir(ri, j, S);
      ring_prev[p] = ring_prev_dir(ri, j, S);
      ld_sel[p]    = ld_row_sel && ld_col == MW'(p);
    end
  end

  // E neighbour's packet register (kept apart from the other wiring so the
  // packet and link paths form no false combinational loop).
  always_comb begin
    for (int unsigned p = 0; p < M; p++)
      e_pkt[p] = pkt[2 * il_slot((il_log(p / 2, S) + 1) % S, S) + p % 2];
  end

  // W neighbour's E link, hi result.
  always_comb begin
    for (int unsigned p = 0; p < M; p++)
      w_hi[p] = ehi[2 * il_slot((il_log(p / 2, S) + S - 1) % S, S) + p % 2];
  end

  // u of the 2x2 block, cells in row-major order: upper row first.
  always_comb begin
    for (int unsigned p = 0; p < M; p++) begin
      int unsigned pb;
      pb = p - p % 2;
      blk_u[p][0] = row_lower ? blk_other[pb]   : u[pb];
      blk_u[p][1] = row_lower ? blk_other[pb+1] : u[pb+1];
      blk_u[p][2] = row_lower ? u[pb]           : blk_other[pb];
      blk_u[p][3] = row_lower ? u[pb+1]         : blk_other[pb+1];
    end
  end

  link_sched #(.N(M)) u_sched (
    .mode, .step, .row_odd(row_i[0]), .col_odd, .ring_par, .ring_next,
    .ring_prev, .dir(dirs)
  );

  always_comb begin
    for (int p = 0; p < M; p++) begin
      en_e[p] = active && dirs[p] == DIR_E;
      en_s[p] = active && dirs[p] == DIR_S;
    end
  end

  cx_elem #(.AW1(AW1), .K(K), .N(M)) u_cx_e (
    .en(en_e), .ring, .dim_col(1'b1), .wrap(wrap_e), .lo_addr(c_addr),
    .lo_in(pkt), .hi_in(e_pkt), .lo_out(elo), .hi_out(ehi),
    .merged(e_mg), .swapped(e_sw)
  );

  cx_elem #(.AW1(AW1), .K(K), .N(M)) u_cx_s (
    .en(en_s), .ring, .dim_col(1'b0), .wrap(wr_s), .lo_addr(r_addr),
    .lo_in(pkt), .hi_in(s_pkt), .lo_out(slo), .hi_out(s_hi),
    .merged(s_mg), .swapped(s_sw)
  );

  // Post-step packet of each cell.
  always_comb begin
    for (int p = 0; p < M; p++) begin
      unique case (dirs[p])
        DIR_E:   nxt[p] = elo[p];
        DIR_S:   nxt[p] = slo[p];
        DIR_W:   nxt[p] = w_hi[p];
        DIR_N:   nxt[p] = n_hi[p];
        default: nxt[p] = pkt[p];
      endcase
    end
  end

  route_cell #(.AW1(AW1), .K(K), .DEPTH(DEPTH), .W(W), .N(M)) u_cells (
    .clk, .rst_n, .start, .use_result, .active,
    .my_r(my_ra[AW1-2:0]), .my_c, .pkt_in(nxt), .pkt_q(pkt), .blk_u,
    .u_q(u), .acc_q(acc), .empty, .consumed(e_cs), .injected(e_in),
    .ld_sel, .ld_cmd, .ld_slot, .ld_entry, .ld_u
  );

  assign ev_merge   = |{e_mg, s_mg};
  assign ev_consume = |e_cs;
  assign ev_inject  = |e_in;
  assign ev_wrap    = |{e_sw & wrap_e, s_sw & wr_s};

  // E/W partners agree.
  for (genvar P = 0; P < M; P++) begin : g_chk
    localparam int unsigned PE =
      2 * il_slot((il_log(P / 2, S) + 1) % S, S) + P % 2;
    assert property (@(posedge clk) disable iff (!rst_n)
                     (dirs[P] == DIR_E) |-> (dirs[PE] == DIR_W));
  end

endmodule
