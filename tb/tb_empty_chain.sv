// tb_empty_chain: random inputs (mostly 1) into a 10-input chain with a
// flip-flop every 3 gates. Reference: out(t) = AND over k of in_k sampled
// lat_k clocks earlier, with lat_k = 3 - floor((max(k,1)-1)/3), i.e. the
// number of flip-flops between input k and the output (Fig. of the row
// chain: registers after inputs 3, 6 and 9).
module tb_empty_chain;
  import nfs_pkg::*;
  localparam int unsigned N = 10, D = 3;
  localparam int unsigned ST = chain_stages(N, D);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in;
  logic out;
  logic [N-1:0] hist [0:15];   // hist[n] = input n clocks ago (0 = current)

  empty_chain #(.N(N), .D(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic int lat(int k);
    int kk = (k < 1) ? 1 : k;
    return ST - (kk - 1) / D;
  endfunction

  initial begin
    bit expv;
    int ones = 0;
    in = '1;
    for (int n = 0; n < 16; n++) hist[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (ST != 3) failures++;
    for (int t = 0; t < 3000; t++) begin
      // inputs: each bit 1 with high probability, sometimes all ones
      if ($urandom_range(3) == 0) in = '1;
      else for (int k = 0; k < N; k++) in[k] = ($urandom_range(15) != 0);
      for (int n = 15; n > 0; n--) hist[n] = hist[n-1];
      hist[0] = in;
      @(posedge clk); #1;
      if (t >= 4) begin
        expv = 1;
        for (int k = 0; k < N; k++) expv &= hist[lat(k) - 1][k];
        checks++;
        if (out !== expv) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d out=%0b exp=%0b", t, out, expv);
        end
        ones += expv;
      end
      @(negedge clk);
    end
    checks++; if (ones == 0) failures++;
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
