// cx_elem: compare-exchange element on one link between two logically
// adjacent cells of a sub-torus.
//
// The link joins a "lo" cell at coordinate p and a "hi" cell at p+1 (mod S)
// along one dimension (columns when dim_col=1, rows otherwise). Each packet
// carries an extended row and column target address of AW1 = log2(S)+1 bits:
// the target coordinate plus S/2, shifted by +-S when the shortest way to the
// target crosses the wrap-around link, so every address lies in [0, 2S).
// The lo cell's own address in that frame is lo_addr = p + S/2.
//
// When en is high the element applies, in this order:
//   * ring mode: always exchange (recovery routing along the serpentine
//     ring);
//   * two packets for the same destination cell: merged into one packet in
//     the lo cell holding the XOR of their payloads; with K = 1 both vanish
//     (annihilation);
//   * exchange if only the lo packet exists and its target address > p,
//     if only the hi packet exists and its target address < p+1, or if both
//     exist and lo target >= hi target (farthest first).
// Following the document: the rule set, annihilation/merging and the
// extended-address torus variant. This design's own choice: on the
// wrap-around link the hi packet's address is moved into the lo frame, and a
// packet crossing that link has the most significant address bit flipped
// (adds S mod 2S), so that both cells compare in one frame. The merged
// packet is kept in the lo cell.
//
// The module holds N such elements side by side (the links of one array
// row along one direction); they share ring and dim_col.
// Purely combinational; packets are {valid, row addr, col addr, payload}.
module cx_elem #(
  parameter int unsigned AW1 = 7,      // log2(S)+1 address bits
  parameter int unsigned K   = 69,     // payload bits (blocking factor)
  parameter int unsigned N   = 1,      // links handled side by side
  localparam int unsigned PW = 1 + 2 * AW1 + K
) (
  input  logic [N-1:0]          en,       // link is scheduled this step
  input  logic                  ring,     // recovery mode: always exchange
  input  logic                  dim_col,  // 1: horizontal links (columns)
  input  logic [N-1:0]          wrap,     // link is the wrap-around link
  input  logic [N-1:0][AW1-1:0] lo_addr,  // lo cell's coordinate + S/2
  input  logic [N-1:0][PW-1:0]  lo_in,
  input  logic [N-1:0][PW-1:0]  hi_in,
  output logic [N-1:0][PW-1:0]  lo_out,
  output logic [N-1:0][PW-1:0]  hi_out,
  output logic [N-1:0]          merged,   // two packets were combined
  output logic [N-1:0]          swapped   // the packets were exchanged
);

  typedef struct packed {
    logic           v;
    logic [AW1-1:0] r;
    logic [AW1-1:0] c;
    logic [K-1:0]   d;
  } pkt_t;

  // One element: new (lo, hi) packets and event flags.
  function automatic void cx_one(
    input  logic en1, input logic wrap1, input logic [AW1-1:0] pos,
    input  logic [PW-1:0] lo_i, input logic [PW-1:0] hi_i,
    output logic [PW-1:0] lo_o, output logic [PW-1:0] hi_o,
    output logic mg, output logic sw);
    pkt_t a, b, b_lo, a_hi, m;
    logic [AW1-1:0] ja, jb;
    logic same_dst, xchg;
    a = pkt_t'(lo_i);
    b = pkt_t'(hi_i);
    // hi packet seen in the lo cell's frame, lo packet in the hi cell's frame
    b_lo = b;
    a_hi = a;
    if (wrap1) begin
      if (dim_col) begin
        b_lo.c[AW1-1] = ~b.c[AW1-1];
        a_hi.c[AW1-1] = ~a.c[AW1-1];
      end else begin
        b_lo.r[AW1-1] = ~b.r[AW1-1];
        a_hi.r[AW1-1] = ~a.r[AW1-1];
      end
    end
    ja = dim_col ? a.c : a.r;
    jb = dim_col ? b_lo.c : b_lo.r;
    same_dst = a.v && b.v &&
               (a.r[AW1-2:0] == b.r[AW1-2:0]) &&
               (a.c[AW1-2:0] == b.c[AW1-2:0]);
    xchg = (a.v && !b.v && (ja > pos)) ||
           (!a.v && b.v && (jb <= pos)) ||
           (a.v && b.v && (ja >= jb));
    m = a;
    m.d = a.d ^ b.d;
    if (K == 1) m = '0;

    lo_o = lo_i;
    hi_o = hi_i;
    mg   = 1'b0;
    sw   = 1'b0;
    if (en1) begin
      if (ring) begin
        lo_o = (b.v) ? PW'(b_lo) : '0;
        hi_o = (a.v) ? PW'(a_hi) : '0;
        sw   = 1'b1;
      end else if (same_dst) begin
        lo_o = PW'(m);
        hi_o = '0;
        mg   = 1'b1;
      end else if (xchg) begin
        lo_o = (b.v) ? PW'(b_lo) : '0;
        hi_o = (a.v) ? PW'(a_hi) : '0;
        sw   = 1'b1;
      end
    end
  endfunction

  always_comb begin
    for (int n = 0; n < N; n++) begin
      cx_one(en[n], wrap[n], lo_addr[n], lo_in[n], hi_in[n],
             lo_out[n], hi_out[n], merged[n], swapped[n]);
    end
  end

endmodule
