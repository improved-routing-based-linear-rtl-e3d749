// empty_chain: pipelined AND chain over N EMPTY flags.
//
// A chain of binary AND gates runs along the N inputs in index order. After
// the gate that takes input D, 2D, 3D, ... a flip-flop breaks the chain, so
// no combinational path is longer than D gates; a last flip-flop registers
// the end of the chain. out is therefore the AND of all inputs, input k being
// sampled nfs_pkg::chain_stages(N, D) - floor(k/D) clocks before out shows
// it (input 0 the longest). The structure is that of the document's row
// chain; the final register, which makes the output a flip-flop, is this
// design's choice. Reset clears every stage to 0 (meaning "not empty"), so
// a fresh chain never reports a stale "all empty".
module empty_chain #(
  parameter int unsigned N = 128,   // inputs (cells in a row)
  parameter int unsigned D = 16     // AND gates per pipeline stage
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  logic [N-1:0] a;    // combinational chain value after input k
  logic [N-1:0] src;  // what feeds the gate of input k+1

  for (genvar k = 0; k < N; k++) begin : g_chain
    localparam bit HAS_FF = (k == N - 1) || (k > 0 && (k % D) == 0);
    if (k == 0) begin : g_first
      assign a[k] = in[k];
    end else begin : g_gate
      assign a[k] = src[k-1] & in[k];
    end
    if (HAS_FF) begin : g_ff
      logic q;   // pipeline flip-flop after input k
      always_ff @(posedge clk) begin
        if (!rst_n) q <= 1'b0;
        else        q <= a[k];
      end
      assign src[k] = q;
    end else begin : g_wire
      assign src[k] = a[k];
    end
  end

  assign out = src[N-1];

endmodule
