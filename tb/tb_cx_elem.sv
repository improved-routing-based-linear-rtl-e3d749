// tb_cx_elem: random and directed checks of the compare-exchange element
// against an integer reference model of the exchange rule (S = 8, so
// addresses are 4 bits), with K = 3 (merging) and K = 1 (annihilation).
module tb_cx_elem;
  localparam int unsigned AW1 = 4;
  localparam int unsigned S   = 8;
  localparam int unsigned K3  = 3;
  localparam int unsigned PW3 = 1 + 2 * AW1 + K3;
  localparam int unsigned PW1 = 1 + 2 * AW1 + 1;

  int checks = 0, failures = 0;

  logic en, ring, dim_col, wrap;
  logic [AW1-1:0] lo_addr;
  logic [PW3-1:0] lo3, hi3, lo3_o, hi3_o;
  logic [PW1-1:0] lo1, hi1, lo1_o, hi1_o;
  logic m3, s3, m1, s1;

  cx_elem #(.AW1(AW1), .K(K3)) dut3 (
    .en, .ring, .dim_col, .wrap, .lo_addr, .lo_in(lo3), .hi_in(hi3),
    .lo_out(lo3_o), .hi_out(hi3_o), .merged(m3), .swapped(s3));
  cx_elem #(.AW1(AW1), .K(1)) dut1 (
    .en, .ring, .dim_col, .wrap, .lo_addr, .lo_in(lo1), .hi_in(hi1),
    .lo_out(lo1_o), .hi_out(hi1_o), .merged(m1), .swapped(s1));

  // reference packet as integers
  typedef struct { bit v; int r; int c; int d; } rp_t;

  function automatic logic [PW3-1:0] pack3(rp_t p);
    if (!p.v) return '0;
    return {1'b1, AW1'(p.r), AW1'(p.c), K3'(p.d)};
  endfunction
  function automatic logic [PW1-1:0] pack1(rp_t p);
    if (!p.v) return '0;
    return {1'b1, AW1'(p.r), AW1'(p.c), 1'b1};
  endfunction

  // Reference: returns new lo, hi packets.
  task automatic ref_model(input rp_t a, input rp_t b, input int k,
                           output rp_t ao, output rp_t bo);
    int pos, ja, jb;
    rp_t bl, ah;
    bit x;
    pos = lo_addr;
    bl = b; ah = a;
    if (wrap) begin
      if (dim_col) begin bl.c = (b.c + S) % (2 * S); ah.c = (a.c + S) % (2 * S); end
      else         begin bl.r = (b.r + S) % (2 * S); ah.r = (a.r + S) % (2 * S); end
    end
    ja = dim_col ? a.c : a.r;
    jb = dim_col ? bl.c : bl.r;
    ao = a; bo = b;
    if (!en) return;
    if (ring) begin ao = bl; bo = ah; return; end
    if (a.v && b.v && (a.r % S) == (b.r % S) && (a.c % S) == (b.c % S)) begin
      ao = a; ao.d = a.d ^ b.d; bo.v = 0;
      if (k == 1) ao.v = 0;
      return;
    end
    x = 0;
    if (a.v && !b.v && ja > pos) x = 1;
    if (!a.v && b.v && jb < pos + 1) x = 1;
    if (a.v && b.v && ja >= jb) x = 1;
    if (x) begin ao = bl; bo = ah; end
  endtask

  function automatic rp_t rnd_pkt(int pv);
    rp_t p;
    p.v = ($urandom_range(99) < pv);
    p.r = $urandom_range(2 * S - 1);
    p.c = $urandom_range(2 * S - 1);
    p.d = $urandom_range(7);
    if (!p.v) begin p.r = 0; p.c = 0; p.d = 0; end
    return p;
  endfunction

  task automatic run_one(rp_t a, rp_t b);
    rp_t ao, bo, ao1, bo1, a1, b1;
    lo3 = pack3(a); hi3 = pack3(b);
    a1 = a; b1 = b; a1.d = 1; b1.d = 1;
    lo1 = pack1(a1); hi1 = pack1(b1);
    #1;
    ref_model(a, b, 3, ao, bo);
    ref_model(a1, b1, 1, ao1, bo1);
    checks++;
    if (lo3_o !== pack3(ao) || hi3_o !== pack3(bo)) begin
      failures++;
      $display("FAIL K=3 en=%0b ring=%0b col=%0b wrap=%0b pos=%0d a=%p b=%p got %h %h exp %h %h",
               en, ring, dim_col, wrap, lo_addr, a, b, lo3_o, hi3_o, pack3(ao), pack3(bo));
    end
    checks++;
    if (lo1_o !== pack1(ao1) || hi1_o !== pack1(bo1)) begin
      failures++;
      $display("FAIL K=1 a=%p b=%p", a1, b1);
    end
  endtask

  initial begin
    rp_t a, b;
    // directed: lone lo packet heading right moves, heading left stays
    en = 1; ring = 0; dim_col = 1; wrap = 0; lo_addr = 4'd6;
    a = '{1, 3, 9, 5}; b = '{0, 0, 0, 0};
    run_one(a, b);
    checks++; if (hi3_o[PW3-1] !== 1'b1 || lo3_o[PW3-1] !== 1'b0) failures++;
    a = '{1, 3, 6, 5};
    run_one(a, b);
    checks++; if (lo3_o[PW3-1] !== 1'b1) failures++;
    // directed: farthest first, equal targets swap only if different dest
    a = '{1, 3, 7, 1}; b = '{1, 2, 9, 2};
    run_one(a, b);
    checks++; if (s3 !== 1'b0) failures++;
    // directed: same destination merges (XOR), K=1 annihilates
    a = '{1, 5, 7, 3}; b = '{1, 13, 15, 1};
    run_one(a, b);
    checks++; if (m3 !== 1'b1 || lo3_o[K3-1:0] !== 3'd2 || hi3_o !== '0) failures++;
    checks++; if (lo1_o !== '0 || hi1_o !== '0) failures++;
    // directed: wrap link, lone hi packet heading "left" across the wrap
    wrap = 1; lo_addr = 4'(S - 1 + S / 2);
    a = '{0, 0, 0, 0}; b = '{1, 1, 2, 1};   // target col addr 2 in hi frame
    run_one(a, b);
    checks++; if (lo3_o !== {1'b1, 4'd1, 4'd10, 3'd1}) failures++;
    // random
    for (int n = 0; n < 20000; n++) begin
      en = ($urandom_range(9) != 0);
      ring = ($urandom_range(9) == 0);
      dim_col = $urandom_range(1);
      wrap = ($urandom_range(3) == 0);
      lo_addr = wrap ? 4'(S - 1 + S / 2) : 4'(S / 2 + $urandom_range(S - 2));
      a = rnd_pkt(70); b = rnd_pkt(70);
      if ($urandom_range(7) == 0 && a.v && b.v) begin
        b.r = (a.r + S * $urandom_range(1)) % (2 * S);
        b.c = (a.c + S * $urandom_range(1)) % (2 * S);
      end
      run_one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
