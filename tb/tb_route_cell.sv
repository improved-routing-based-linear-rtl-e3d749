// tb_route_cell: directed test of one cell (S = 8, K = 4, DEPTH = 4, W = 2).
// Checks entry loading, immediate first injection, the W-clock refill wait
// after a packet leaves, skipping of a zero-payload entry, payload taken
// from the selected block cell, consumption of a packet whose addresses
// differ from the cell's only in the top bit, EMPTY, and u <- acc on a
// chained start.
module tb_route_cell;
  import nfs_pkg::*;
  localparam int unsigned AW1 = 4, K = 4, DEPTH = 4, W = 2;
  localparam int unsigned PW = 1 + 2 * AW1 + K, EW = 2 + 2 * AW1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, use_result = 0, active = 0;
  logic [AW1-2:0] my_r = 3'd5, my_c = 3'd2;
  logic [PW-1:0] pkt_in, pkt_q;
  logic [0:0][3:0][K-1:0] blk_u;
  logic [K-1:0] u_q, acc_q, ld_u;
  logic empty, consumed, injected, ld_sel;
  ld_cmd_t ld_cmd;
  logic [1:0] ld_slot;
  logic [EW-1:0] ld_entry;
  bit follow;   // tb keeps pkt_in = pkt_q (packet stays)
  logic [PW-1:0] forced;   // pkt_in when not following

  route_cell #(.AW1(AW1), .K(K), .DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always_comb begin
    blk_u[0][0] = u_q;
    blk_u[0][1] = 4'h0;
    blk_u[0][2] = 4'h3;
    blk_u[0][3] = 4'h5;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [EW-1:0] ent(int sel, int r, int c);
    return {2'(sel), AW1'(r), AW1'(c)};
  endfunction

  initial begin
    int gap;
    ld_cmd = LD_NONE; ld_sel = 0; ld_slot = 0; ld_entry = 0; ld_u = 0;
    forced = '0; follow = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(empty, "empty after reset");
    // load u and four entries
    ld_sel = 1; ld_cmd = LD_U; ld_u = 4'hA; @(negedge clk);
    ld_cmd = LD_ENTRY;
    ld_slot = 0; ld_entry = ent(0, 1, 9);  @(negedge clk);
    ld_slot = 1; ld_entry = ent(1, 2, 10); @(negedge clk);
    ld_slot = 2; ld_entry = ent(2, 3, 11); @(negedge clk);
    ld_slot = 3; ld_entry = ent(3, 4, 12); @(negedge clk);
    ld_cmd = LD_NONE; ld_sel = 0;
    check(u_q == 4'hA, "u loaded");
    check(!empty, "not empty with pending entries");
    // start
    start = 1; @(negedge clk); start = 0; active = 1;
    @(negedge clk);
    check(pkt_q == {1'b1, 4'd1, 4'd9, 4'hA}, "first entry injected at once");
    // packet stays for 3 clocks: no further injection
    repeat (3) @(negedge clk);
    check(pkt_q == {1'b1, 4'd1, 4'd9, 4'hA}, "no injection while occupied");
    // packet leaves; count empty clocks until the next injection
    follow = 0; forced = '0; @(negedge clk); follow = 1;
    gap = 0;
    while (!pkt_q[PW-1] && gap < 10) begin gap++; @(negedge clk); end
    check(gap == W, $sformatf("refill wait W clocks (got %0d)", gap));
    // entry 1 had a zero payload: entry 2 (payload from block cell 2)
    check(pkt_q == {1'b1, 4'd3, 4'd11, 4'h3}, "zero-payload entry skipped");
    // a packet arriving here: consumed (row top bit differs)
    follow = 0; forced = {1'b1, 4'd13, 4'd2, 4'h6};
    #1 check(consumed, "arrival seen");
    @(negedge clk); follow = 1;
    check(acc_q == 4'h6, "payload accumulated");
    check(!pkt_q[PW-1], "consumed packet removed");
    // a passing packet enters the empty cell: it is kept, nothing injected
    follow = 0; forced = {1'b1, 4'd7, 4'd7, 4'h1};
    @(negedge clk); follow = 1;
    check(pkt_q == {1'b1, 4'd7, 4'd7, 4'h1}, "transit packet registered");
    follow = 0; forced = '0; @(negedge clk); follow = 1;
    repeat (W) @(negedge clk);
    check(pkt_q == {1'b1, 4'd4, 4'd12, 4'h5}, "last entry from block cell 3");
    check(!empty, "not empty while in transit");
    follow = 0; forced = '0; @(negedge clk); follow = 1;
    #1 check(empty, "empty when nothing pending or in transit");
    // second arrival, then chained start
    follow = 0; forced = {1'b1, 4'd5, 4'd10, 4'h3}; @(negedge clk);
    forced = '0; @(negedge clk); follow = 1;
    check(acc_q == 4'h5, "acc = 6 ^ 3");
    active = 0;
    use_result = 1; start = 1; @(negedge clk); start = 0; use_result = 0;
    check(u_q == 4'h5 && acc_q == 4'h0, "u <- acc, acc cleared on start");
    check(!empty, "entries pending again after start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb pkt_in = follow ? pkt_q : forced;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
