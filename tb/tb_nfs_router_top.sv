// tb_nfs_router_top: end-to-end GF(2)^K sparse matrix-by-vector products
// on an 8 x 8 array (K = 4, 16 entries per cell, d = 2).
//
// A random 64 x 64 sparse matrix (1..4 nonzeros per column) is loaded the
// way a host would: cell n is the target cell of row n and holds u_n; the
// entries of column j live in the 2x2 block of cell j, each in the block
// cell of its target's sub-torus. Three operations are checked against a
// software product:
//   1) y = A u,
//   2) the chained product A y (start with use_result, no reloading),
//   3) A y again with t_max = 3, forcing ring-mode recovery.
// It also checks that done follows the array becoming empty by the
// detector latency, and counts merges, wrap-around crossings, refills,
// zero-payload skips and recoveries; each must happen at least once.
module tb_nfs_router_top;
  import nfs_pkg::*;
  import nfs_tb_pkg::*;
  localparam int unsigned M = 8, K = 4, DEPTH = 16, W = 2, D = 2;
  localparam int unsigned S = M / 2, AW1 = $clog2(S) + 1;
  localparam int unsigned EW = 2 + 2 * AW1, MW = $clog2(M), SLW = $clog2(DEPTH);
  localparam int unsigned R = M * M;
  localparam int unsigned CONFIRM = 2 * chain_stages(M, D);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ld_cmd_t ld_cmd = LD_NONE;
  logic [MW-1:0] ld_row = 0, ld_col = 0, rd_row = 0, rd_col = 0;
  logic [SLW-1:0] ld_slot = 0;
  logic [EW-1:0] ld_entry = 0;
  logic [K-1:0] ld_u = 0, rd_acc;
  logic start_req = 0, use_result = 0;
  logic [31:0] t_max = 100000, steps;
  logic busy, done, recovered;
  mode_t mode;
  logic ev_merge, ev_consume, ev_inject, ev_wrap;

  nfs_router_top #(.M(M), .K(K), .DEPTH(DEPTH), .W(W), .D(D)) dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  int n_merge = 0, n_wrap = 0, n_refill = 0, n_recover = 0, n_skip = 0;
  int n_chain = 0, cyc = 0, t_empty = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy) begin
      n_merge  += ev_merge;
      n_wrap   += ev_wrap;
      if (ev_inject && steps > 2) n_refill++;
      if (&dut.u_fabric.empty && t_empty < 0) t_empty = cyc;
      if (!(&dut.u_fabric.empty)) t_empty = -1;
    end
  end

  bit           a [R][R];      // a[i][j]
  logic [K-1:0] u [R], y [R];
  int           fill [M][M];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void mul(input logic [K-1:0] x [R], output logic [K-1:0] z [R]);
    for (int i = 0; i < R; i++) begin
      z[i] = '0;
      for (int j = 0; j < R; j++) if (a[i][j]) z[i] ^= x[j];
    end
  endfunction

  task automatic run_and_check(bit chain, logic [31:0] tm, input logic [K-1:0] exp [R],
                               string tag);
    int t0, lag;
    t_max = tm; use_result = chain; start_req = 1;
    @(negedge clk); start_req = 0; use_result = 0;
    t0 = cyc;
    while (!done && cyc - t0 < 20000) @(negedge clk);
    check(done, {tag, ": done"});
    lag = cyc - t_empty;
    check(lag >= CONFIRM && lag <= 2 * CONFIRM + 2,
          $sformatf("%s: done %0d clocks after the array emptied", tag, lag));
    for (int n = 0; n < R; n++) begin
      rd_row = MW'(n / M); rd_col = MW'(n % M); #1;
      checks++;
      if (rd_acc !== exp[n]) begin
        failures++;
        $display("FAIL %s: y[%0d]=%0h exp %0h", tag, n, rd_acc, exp[n]);
      end
    end
    $display("%s: steps=%0d recovered=%0b", tag, steps, recovered);
  endtask

  initial begin
    logic [K-1:0] y2 [R];
    int nz, i, sr, sc, tr, tc, jr, jc;
    for (int r = 0; r < M; r++) for (int c = 0; c < M; c++) fill[r][c] = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) a[r][c] = 0;
    for (int j = 0; j < R; j++) begin
      u[j] = ($urandom_range(5) == 0) ? '0 : K'($urandom_range(15));
      if (u[j] == 0) n_skip++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load u and the entries
    for (int j = 0; j < R; j++) begin
      jr = j / M; jc = j % M;
      ld_cmd = LD_U; ld_row = MW'(jr); ld_col = MW'(jc); ld_u = u[j];
      @(negedge clk);
      nz = 1 + $urandom_range(3);
      for (int k = 0; k < nz; k++) begin
        i = (k == 0 && j % 3 == 0) ? 0 : $urandom_range(R - 1);  // row 0 popular
        if (a[i][j]) continue;
        tr = i / M; tc = i % M;
        sr = (jr & ~1) + tr % 2;
        sc = (jc & ~1) + tc % 2;
        if (fill[sr][sc] >= DEPTH) continue;
        a[i][j] = 1;
        ld_cmd = LD_ENTRY; ld_row = MW'(sr); ld_col = MW'(sc);
        ld_slot = SLW'(fill[sr][sc]);
        ld_entry = EW'(make_entry((jr % 2) * 2 + jc % 2, sr, sc, tr, tc, M, AW1));
        fill[sr][sc]++;
        @(negedge clk);
      end
    end
    ld_cmd = LD_NONE;
    mul(u, y);
    run_and_check(0, 100000, y, "A*u");
    check(!recovered, "no recovery needed for A*u");
    mul(y, y2);
    run_and_check(1, 100000, y2, "A*(A*u) chained");
    n_chain++;
    run_and_check(0, 3, y2, "A*y with t_max=3");
    if (recovered) n_recover++;
    $display("merges=%0d wraps=%0d refills=%0d skips=%0d recoveries=%0d chains=%0d",
             n_merge, n_wrap, n_refill, n_skip, n_recover, n_chain);
    check(n_merge > 0, "merge happened");
    check(n_wrap > 0, "wrap-around crossing happened");
    check(n_refill > 0, "refill happened");
    check(n_skip > 0, "zero-payload skip happened");
    check(n_recover > 0, "ring recovery happened");
    check(n_chain > 0, "chained product happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
