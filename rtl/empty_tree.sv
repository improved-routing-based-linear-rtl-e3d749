// empty_tree: global "nothing pending, nothing in transit" detector.
//
// Each of the M physical rows ANDs its M EMPTY flags with a pipelined chain
// (empty_chain, a flip-flop every D gates); one more chain of the same kind
// ANDs the M row results. all_empty is 1 when every flag sampled along the
// way was 1. A flag reaches all_empty after at most LAT = 2 *
// nfs_pkg::chain_stages(M, D) clocks (about 2M/D). The two-level chain is
// the document's; the order of the rows in the second chain (row 0 first)
// is this design's choice. A completion test must see all_empty high for
// LAT consecutive clocks before trusting it.
module empty_tree #(
  parameter int unsigned M = 128,
  parameter int unsigned D = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [M-1:0][M-1:0] empty,    // [row][col]
  output logic                all_empty
);

  logic [M-1:0] row_and;

  for (genvar r = 0; r < M; r++) begin : g_row
    empty_chain #(.N(M), .D(D)) u_row (
      .clk, .rst_n, .in(empty[r]), .out(row_and[r])
    );
  end

  empty_chain #(.N(M), .D(D)) u_col (
    .clk, .rst_n, .in(row_and), .out(all_empty)
  );

endmodule
