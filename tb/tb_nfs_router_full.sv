// tb_nfs_router_full: one complete product on the array at its default
// size (128 x 128 cells, K = 69, 128 entries per cell).
//
// 600 random nonzeros (i, j) of a 16384 x 16384 matrix are loaded the same
// way as in tb_nfs_router_top: target cell n = row n, column j's entries in
// the 2x2 block of cell j. Random 69-bit values are loaded for the columns
// used. After one product every target row and 200 other cells are read
// back and compared with a software product.
module tb_nfs_router_full;
  import nfs_pkg::*;
  import nfs_tb_pkg::*;
  localparam int unsigned M = 128, K = 69, DEPTH = 128;
  localparam int unsigned S = M / 2, AW1 = $clog2(S) + 1;
  localparam int unsigned EW = 2 + 2 * AW1, MW = $clog2(M), SLW = $clog2(DEPTH);
  localparam int unsigned R = M * M;
  localparam int unsigned NE = 600;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ld_cmd_t ld_cmd = LD_NONE;
  logic [MW-1:0] ld_row = 0, ld_col = 0, rd_row = 0, rd_col = 0;
  logic [SLW-1:0] ld_slot = 0;
  logic [EW-1:0] ld_entry = 0;
  logic [K-1:0] ld_u = 0, rd_acc;
  logic start_req = 0, use_result = 0;
  logic [31:0] t_max = 1000000, steps;
  logic busy, done, recovered;
  mode_t mode;
  logic ev_merge, ev_consume, ev_inject, ev_wrap;

  nfs_router_top dut (.*);
  always #5 clk = ~clk;

  logic [K-1:0] u [R], y [R];
  bit           used_u [R];
  int           fill [M][M];
  int           rows [NE], cols [NE];

  function automatic logic [K-1:0] rnd_k();
    logic [K-1:0] v;
    for (int b = 0; b < K; b += 16) v[b +: 16] = 16'($urandom);
    return v;
  endfunction

  initial begin
    int i, j, jr, jc, tr, tc, sr, sc, n, cyc;
    for (int r = 0; r < M; r++) for (int c = 0; c < M; c++) fill[r][c] = 0;
    for (n = 0; n < R; n++) begin u[n] = '0; y[n] = '0; used_u[n] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < NE; e++) begin
      i = $urandom_range(R - 1);
      j = (e % 4 == 0) ? cols[e / 4] : $urandom_range(R - 1);
      if (e == 0) j = 5;
      rows[e] = i; cols[e] = j;
      jr = j / M; jc = j % M; tr = i / M; tc = i % M;
      if (!used_u[j]) begin
        used_u[j] = 1; u[j] = rnd_k();
        ld_cmd = LD_U; ld_row = MW'(jr); ld_col = MW'(jc); ld_u = u[j];
        @(negedge clk);
      end
      sr = (jr & ~1) + tr % 2;
      sc = (jc & ~1) + tc % 2;
      ld_cmd = LD_ENTRY; ld_row = MW'(sr); ld_col = MW'(sc);
      ld_slot = SLW'(fill[sr][sc]);
      ld_entry = EW'(make_entry((jr % 2) * 2 + jc % 2, sr, sc, tr, tc, M, AW1));
      fill[sr][sc]++;
      y[i] ^= u[j];
      @(negedge clk);
    end
    ld_cmd = LD_NONE;
    start_req = 1; @(negedge clk); start_req = 0;
    cyc = 0;
    while (!done && cyc < 20000) begin cyc++; @(negedge clk); end
    checks++;
    if (!done) begin failures++; $display("FAIL: product did not finish"); end
    $display("product done after %0d clocks, steps=%0d recovered=%0b", cyc, steps, recovered);
    for (int e = 0; e < NE; e++) begin
      rd_row = MW'(rows[e] / M); rd_col = MW'(rows[e] % M); #1;
      checks++;
      if (rd_acc !== y[rows[e]]) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] = %h exp %h", rows[e], rd_acc, y[rows[e]]);
      end
    end
    for (int k = 0; k < 200; k++) begin
      n = $urandom_range(R - 1);
      rd_row = MW'(n / M); rd_col = MW'(n % M); #1;
      checks++;
      if (rd_acc !== y[n]) failures++;
    end
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
