// tb_tori_fabric: 8 x 8 array (four 4 x 4 sub-tori), K = 3, up to 6 entries
// per cell with random targets in the cell's own sub-torus and random
// (sometimes zero) input values; each packet carries the value of a random
// cell of its 2x2 block. The test sequences the array itself:
//   1) clockwise transposition routing until every cell reports EMPTY;
//      every accumulator must equal the XOR of the values sent to it;
//   2) the same load routed from the start in serpentine-ring mode, which
//      must give the same result within (entries x (W+1) + S^2) steps.
// It counts merges, wrap-around crossings and injections while other
// packets are in transit (refill), and fails if any never happened.
module tb_tori_fabric;
  import nfs_pkg::*;
  import nfs_tb_pkg::*;
  localparam int unsigned M = 8, K = 3, DEPTH = 6, W = 2;
  localparam int unsigned S = M / 2, AW1 = $clog2(S) + 1;
  localparam int unsigned EW = 2 + 2 * AW1, MW = $clog2(M), SLW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, use_result = 0, active = 0;
  mode_t mode = MODE_CTR;
  logic [1:0] step = 0;
  ld_cmd_t ld_cmd = LD_NONE;
  logic [MW-1:0] ld_row = 0, ld_col = 0;
  logic [SLW-1:0] ld_slot = 0;
  logic [EW-1:0] ld_entry = 0;
  logic [K-1:0] ld_u = 0;
  logic [M-1:0][M-1:0] empty;
  logic [M-1:0][M-1:0][K-1:0] acc;
  logic ev_merge, ev_consume, ev_inject, ev_wrap;

  tori_fabric #(.M(M), .K(K), .DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  int n_merge = 0, n_wrap = 0, n_refill = 0, n_cons = 0;
  bit counting = 0;
  int t_now = 0;
  always @(posedge clk) if (counting) begin
    n_merge += ev_merge;
    n_wrap  += ev_wrap;
    n_cons  += ev_consume;
    if (ev_inject && t_now > 2) n_refill++;
  end

  logic [K-1:0] u_ref   [M][M];
  logic [K-1:0] acc_ref [M][M];
  int total_entries = 0;

  task automatic run(mode_t md, output int t);
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    active = 1; mode = md; t = 0; counting = 1;
    forever begin
      step = (md == MODE_RING) ? 2'(t % 2) : 2'(t % 4);
      t_now = t;
      @(negedge clk);
      t++;
      if (&empty || t > 5000) break;
    end
    active = 0; counting = 0;
  endtask

  initial begin
    int t_ctr, t_ring, ne, tr, tc, sel;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        u_ref[r][c] = ($urandom_range(4) == 0) ? '0 : K'($urandom_range(7));
        acc_ref[r][c] = '0;
      end
    // load
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        ld_row = MW'(r); ld_col = MW'(c);
        ld_cmd = LD_U; ld_u = u_ref[r][c]; @(negedge clk);
        ne = $urandom_range(DEPTH);
        for (int e = 0; e < ne; e++) begin
          tr = 2 * $urandom_range(S - 1) + r % 2;
          tc = 2 * $urandom_range(S - 1) + c % 2;
          // a few entries for one popular target, to make packets meet
          if ($urandom_range(3) == 0) begin tr = r % 2; tc = c % 2; end
          // the packet carries the value of any cell of the 2x2 block
          sel = $urandom_range(3);
          ld_cmd = LD_ENTRY; ld_slot = SLW'(e);
          ld_entry = EW'(make_entry(sel, r, c, tr, tc, M, AW1));
          @(negedge clk);
          acc_ref[tr][tc] ^= u_ref[r - r % 2 + sel / 2][c - c % 2 + sel % 2];
          total_entries++;
        end
      end
    ld_cmd = LD_NONE;
    run(MODE_CTR, t_ctr);
    checks++; if (t_ctr > 5000) begin failures++; $display("FAIL: ctr routing hung"); end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        checks++;
        if (acc[r][c] !== acc_ref[r][c]) begin
          failures++;
          $display("FAIL ctr acc[%0d][%0d]=%0h exp %0h", r, c, acc[r][c], acc_ref[r][c]);
        end
      end
    run(MODE_RING, t_ring);
    checks++;
    if (t_ring > total_entries * (W + 1) + S * S) begin
      failures++; $display("FAIL: ring took %0d steps", t_ring);
    end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        checks++;
        if (acc[r][c] !== acc_ref[r][c]) begin
          failures++;
          $display("FAIL ring acc[%0d][%0d]=%0h exp %0h", r, c, acc[r][c], acc_ref[r][c]);
        end
      end
    $display("entries=%0d ctr_steps=%0d ring_steps=%0d merges=%0d wraps=%0d refills=%0d consumed=%0d",
             total_entries, t_ctr, t_ring, n_merge, n_wrap, n_refill, n_cons);
    checks++; if (n_merge == 0)  begin failures++; $display("FAIL: no merge"); end
    checks++; if (n_wrap == 0)   begin failures++; $display("FAIL: no wrap crossing"); end
    checks++; if (n_refill == 0) begin failures++; $display("FAIL: no refill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
