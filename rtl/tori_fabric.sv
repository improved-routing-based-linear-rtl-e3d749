// tori_fabric: the M x M cell array, wired as four independent, interleaved
// sub-tori of S x S cells (S = M/2).
//
// Physical cell (R, P) belongs to sub-torus (R mod 2, P mod 2); inside it,
// its slot along each dimension is R/2 (resp. P/2) and its logical
// coordinate is obtained by the torus interleaving nfs_pkg::il_log: slot
// order 0, S-1, 1, S-2, ... so that a logical ring 0..S-1 closes without a
// long wire. Each logical link therefore spans four physical cells at most,
// and the four sub-tori never exchange packets. Every 2x2 physical block
// holds one cell of each sub-torus; the four cells share their
// input-vector registers (blk_u), so a matrix entry can be stored in the
// block cell that lies in its target's sub-torus while its payload comes
// from the block cell holding the column's vector value.
//
// The cells are built row by row (mesh_row, which handles a row's M cells
// side by side). A cell is the lo end of its links to the logical E and S
// neighbours, which may be the wrap-around links.
// Row and column addresses of a cell are its logical coordinate + S/2.
//
// Loading is a broadcast bus addressed by physical (row, column). The
// fabric brings out every cell's EMPTY flag and accumulator and the OR over
// all cells of each per-cell event. Following the document: the torus with
// interleaving, four parallel sub-tori, the 2x2 blocks. This design's
// choices: interleaving applied after the split into sub-tori, the
// loading bus and the event outputs.
module tori_fabric
  import nfs_pkg::*;
#(
  parameter int unsigned M     = 128,   // physical cells per row/column
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
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        use_result,
  input  logic                        active,
  input  mode_t                       mode,
  input  logic [1:0]                  step,
  input  ld_cmd_t                     ld_cmd,
  input  logic [MW-1:0]               ld_row,
  input  logic [MW-1:0]               ld_col,
  input  logic [SLW-1:0]              ld_slot,
  input  logic [EW-1:0]               ld_entry,
  input  logic [K-1:0]                ld_u,
  output logic [M-1:0][M-1:0]         empty,
  output logic [M-1:0][M-1:0][K-1:0]  acc,
  output logic                        ev_merge,
  output logic                        ev_consume,
  output logic                        ev_inject,
  output logic                        ev_wrap
);

  logic [M-1:0][M-1:0][PW-1:0] pkt, shi;
  logic [M-1:0][M-1:0][K-1:0]  u;
  dir_t [M-1:0][M-1:0]         dirs;
  logic [M-1:0] e_mg, e_cs, e_in, e_wr;

  for (genvar R = 0; R < M; R++) begin : g_r
    localparam int unsigned QR = R % 2;
    localparam int unsigned I  = il_log(R / 2, S);
    localparam int unsigned RS = 2 * il_slot((I + 1) % S, S) + QR;
    localparam int unsigned RN = 2 * il_slot((I + S - 1) % S, S) + QR;
    localparam int unsigned RO = (QR == 0) ? R + 1 : R - 1;  // block partner

    mesh_row #(.M(M), .K(K), .DEPTH(DEPTH), .W(W)) u_row (
      .clk, .rst_n, .start, .use_result, .active, .mode, .step,
      .row_i(AWL'(I)), .row_lower(QR == 1),
      .s_pkt(pkt[RS]), .n_hi(shi[RN]), .pkt(pkt[R]), .s_hi(shi[R]),
      .dirs(dirs[R]), .blk_other(u[RO]), .u(u[R]), .acc(acc[R]),
      .empty(empty[R]),
      .ev_merge(e_mg[R]), .ev_consume(e_cs[R]),
      .ev_inject(e_in[R]), .ev_wrap(e_wr[R]),
      .ld_row_sel(ld_row == MW'(R)), .ld_cmd, .ld_col, .ld_slot,
      .ld_entry, .ld_u
    );

    // N/S partners agree.
    for (genvar P = 0; P < M; P++) begin : g_chk
      assert property (@(posedge clk) disable iff (!rst_n)
                       (dirs[R][P] == DIR_S) |-> (dirs[RS][P] == DIR_N));
    end
  end

  assign ev_merge   = |e_mg;
  assign ev_consume = |e_cs;
  assign ev_inject  = |e_in;
  assign ev_wrap    = |e_wr;

endmodule
