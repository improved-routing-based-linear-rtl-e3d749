// tb_empty_tree: 6 x 6 flags, a flip-flop every 2 gates. Reference: the
// global flag at time t is the AND over all cells (r, c) of the flag
// sampled lat(c) + lat(r) clocks earlier, lat(k) being the number of
// flip-flops between input k of a chain and its output.
module tb_empty_tree;
  import nfs_pkg::*;
  localparam int unsigned M = 6, D = 2;
  localparam int unsigned ST = chain_stages(M, D);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [M-1:0][M-1:0] empty;
  logic all_empty;
  logic [M-1:0][M-1:0] hist [0:15];

  empty_tree #(.M(M), .D(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic int lat(int k);
    int kk = (k < 1) ? 1 : k;
    return ST - (kk - 1) / D;
  endfunction

  initial begin
    bit expv;
    int ones = 0, zeros = 0;
    empty = '1;
    for (int n = 0; n < 16; n++) hist[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      if ($urandom_range(1) == 0) empty = '1;
      else begin
        empty = '1;
        empty[$urandom_range(M - 1)][$urandom_range(M - 1)] = 1'b0;
      end
      for (int n = 15; n > 0; n--) hist[n] = hist[n-1];
      hist[0] = empty;
      @(posedge clk); #1;
      if (t >= 2 * ST + 1) begin
        expv = 1;
        for (int r = 0; r < M; r++)
          for (int c = 0; c < M; c++)
            expv &= hist[lat(c) + lat(r) - 1][r][c];
        checks++;
        if (all_empty !== expv) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d got=%0b exp=%0b", t, all_empty, expv);
        end
        if (expv) ones++; else zeros++;
      end
      @(negedge clk);
    end
    checks++; if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
