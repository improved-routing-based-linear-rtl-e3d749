// nfs_router_top: routing-based GF(2) sparse matrix-by-vector multiplier.
//
// The nonzero entries (i, j) of a sparse matrix A over GF(2) are stored as
// pending packets in an M x M array of cells; cell n (physical row-major)
// serves as target cell T_n of row n and holds the input-vector value u_n
// (K bits: K vectors at once, the blocking factor). To multiply, every
// stored entry whose vector value is nonzero becomes a packet addressed to
// T_i carrying u_j; the packets are routed with clockwise transposition
// routing on four interleaved sub-tori (tori_fabric), identical packets
// merge, and every arriving packet is XORed into its target's accumulator,
// which then holds (A u)_i. Packets are refilled into the array as cells
// fall idle. An AND-chain detector (empty_tree) with route_ctrl decides
// when nothing is pending or in transit; if that takes more than t_max
// steps, the array finishes the operation in serpentine-ring mode, which
// cannot livelock.
//
// Host interface (all synchronous to clk, active-low synchronous reset):
//   ld_cmd/ld_row/ld_col/ld_slot/ld_entry/ld_u  one load command per clock
//   start_req (with use_result: take the last result as new input u)
//   t_max        step budget before ring recovery
//   busy, done, recovered, steps   status of the last operation
//   rd_row/rd_col -> rd_acc, rd_u  combinational read of one cell
//   ev_*         one-clock flags: some cell merged, consumed, injected a
//                packet, or a packet crossed a wrap-around link
// An entry is {sel[1:0], row addr, col addr}: row/col addr are the target's
// logical sub-torus coordinates + S/2, offset by +-S where the shortest way
// crosses the wrap-around link (values 0..2S-1); sel names the cell of the
// entry's 2x2 block (row-major) whose u the packet carries. The entry must
// be stored in the block cell of the target's sub-torus. Following the
// document: the algorithm, topology, refill, detection and recovery. This
// design's choices: the host interface and the cell-to-row assignment,
// which is up to the loading software.
module nfs_router_top
  import nfs_pkg::*;
#(
  parameter int unsigned M     = 128,  // physical array is M x M cells
  parameter int unsigned K     = 69,   // blocking factor: payload bits
  parameter int unsigned DEPTH = 128,  // pending entries per cell
  parameter int unsigned W     = 2,    // refill wait w
  parameter int unsigned D     = 16,   // AND gates per detector stage
  localparam int unsigned S    = M / 2,
  localparam int unsigned AW1  = $clog2(S) + 1,
  localparam int unsigned EW   = 2 + 2 * AW1,
  localparam int unsigned MW   = $clog2(M),
  localparam int unsigned SLW  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CONFIRM = 2 * chain_stages(M, D)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ld_cmd_t         ld_cmd,
  input  logic [MW-1:0]   ld_row,
  input  logic [MW-1:0]   ld_col,
  input  logic [SLW-1:0]  ld_slot,
  input  logic [EW-1:0]   ld_entry,
  input  logic [K-1:0]    ld_u,
  input  logic            start_req,
  input  logic            use_result,
  input  logic [31:0]     t_max,
  output logic            busy,
  output logic            done,
  output logic            recovered,
  output logic [31:0]     steps,
  output mode_t           mode,
  input  logic [MW-1:0]   rd_row,
  input  logic [MW-1:0]   rd_col,
  output logic [K-1:0]    rd_acc,
  output logic            ev_merge,
  output logic            ev_consume,
  output logic            ev_inject,
  output logic            ev_wrap
);

  logic                       start, all_empty;
  logic [1:0]                 step;
  logic [M-1:0][M-1:0]        empty;
  logic [M-1:0][M-1:0][K-1:0] acc;

  route_ctrl #(.CONFIRM(CONFIRM)) u_ctrl (
    .clk, .rst_n, .start_req, .t_max, .all_empty,
    .start, .active(busy), .mode, .step, .done, .recovered, .steps
  );

  tori_fabric #(.M(M), .K(K), .DEPTH(DEPTH), .W(W)) u_fabric (
    .clk, .rst_n, .start, .use_result, .active(busy), .mode, .step,
    .ld_cmd(busy ? LD_NONE : ld_cmd), .ld_row, .ld_col, .ld_slot,
    .ld_entry, .ld_u, .empty, .acc,
    .ev_merge, .ev_consume, .ev_inject, .ev_wrap
  );

  empty_tree #(.M(M), .D(D)) u_empty (
    .clk, .rst_n, .empty, .all_empty
  );

  assign rd_acc = acc[rd_row][rd_col];

endmodule
