// route_cell: the cells of one row of the routing array (N cells side by
// side, N = 1 for a single cell).
//
// A cell holds
//   * the packet register: at most one packet in transit;
//   * the pending store: up to DEPTH matrix entries, each the precomputed
//     extended target address of a packet plus a 2-bit selector naming the
//     cell of this cell's 2x2 block whose input-vector value the packet
//     carries (the packet contents are shared inside the block, the routing
//     of entries to the right sub-torus is done when the entries are loaded);
//   * the input-vector register u and the target accumulator acc (K bits).
//
// Every clock is one routing step. pkt_in is this cell's packet after the
// step's compare-exchange (supplied by the array). If it has reached this
// cell - its row and column addresses match the cell in all but their top
// bit - it is consumed: acc ^= payload, and the cell is left empty.
// Refill: when the register has been empty for the last W clocks and a
// pending entry remains, the entry is turned into a packet and injected.
// An entry whose payload is all zero emits no packet (for K = 1: only
// entries whose vector bit is 1 emit) and is skipped, one entry per clock.
// empty (EMPTY_ij) is high when nothing is pending or in transit.
//
// start (one clock) begins a multiplication: the entry pointer and acc are
// cleared, the packet register is emptied, and with use_result the previous
// result acc becomes the new input u, so a chain of products needs no
// reloading. Loading: with ld_sel high, LD_ENTRY writes entry ld_slot and
// sets the entry count to ld_slot+1 (entries are written in order); LD_U
// writes u; LD_U_ALL writes u whatever ld_sel is.
//
// Following the document: consumption at the target, parity accumulation,
// the w-clock refill rule, the EMPTY definition, block-local contents.
// This design's choices: the entry format, zero-payload skipping, u <- acc
// on start, the loading commands, a synchronous active-low reset, and idle
// counting that starts full after
// reset so a cell injects at once.
module route_cell
  import nfs_pkg::*;
#(
  parameter int unsigned AW1   = 7,    // log2(S)+1 address bits
  parameter int unsigned K     = 69,   // payload bits
  parameter int unsigned DEPTH = 128,  // pending entries per cell
  parameter int unsigned W     = 2,    // refill wait, clocks (>= 1)
  parameter int unsigned N     = 1,    // cells handled side by side
  localparam int unsigned PW   = 1 + 2 * AW1 + K,
  localparam int unsigned EW   = 2 + 2 * AW1,
  localparam int unsigned PTRW = $clog2(DEPTH + 1),
  localparam int unsigned SLW  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned IDW  = $clog2(W + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       use_result,
  input  logic                       active,    // injection allowed
  input  logic [AW1-2:0]             my_r,      // (row + S/2) mod S
  input  logic [N-1:0][AW1-2:0]      my_c,      // (col + S/2) mod S
  input  logic [N-1:0][PW-1:0]       pkt_in,    // packet after compare-exchange
  output logic [N-1:0][PW-1:0]       pkt_q,     // packet register
  input  logic [N-1:0][3:0][K-1:0]   blk_u,     // u of the 2x2 block's cells
  output logic [N-1:0][K-1:0]        u_q,
  output logic [N-1:0][K-1:0]        acc_q,
  output logic [N-1:0]               empty,
  output logic [N-1:0]               consumed,  // a packet arrived this clock
  output logic [N-1:0]               injected,  // a packet was injected
  input  logic [N-1:0]               ld_sel,
  input  ld_cmd_t                    ld_cmd,
  input  logic [SLW-1:0]             ld_slot,
  input  logic [EW-1:0]              ld_entry,  // {sel[1:0], row addr, col addr}
  input  logic [K-1:0]               ld_u
);

  typedef struct packed {
    logic           v;
    logic [AW1-1:0] r;
    logic [AW1-1:0] c;
    logic [K-1:0]   d;
  } pkt_t;

  typedef struct packed {
    logic [1:0]     sel;
    logic [AW1-1:0] r;
    logic [AW1-1:0] c;
  } entry_t;

  entry_t          mem [N][DEPTH];
  logic [PTRW-1:0] ptr_q [N];
  logic [PTRW-1:0] cnt_q [N];
  logic [IDW-1:0]  idle_q [N];
  pkt_t            reg_q [N];

  pkt_t   p_in [N];
  pkt_t   p_next [N];
  logic [N-1:0] arrive, have_entry, do_inj, do_skip;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      pkt_t   after, p_new;
      entry_t ent;
      logic [K-1:0] payload;
      logic   zero_pl;
      p_in[n]   = pkt_t'(pkt_in[n]);
      arrive[n] = p_in[n].v && (p_in[n].r[AW1-2:0] == my_r) &&
                  (p_in[n].c[AW1-2:0] == my_c[n]);
      after     = arrive[n] ? '0 : p_in[n];

      have_entry[n] = (ptr_q[n] < cnt_q[n]);
      ent           = mem[n][SLW'(ptr_q[n])];
      payload       = blk_u[n][ent.sel];
      zero_pl       = (payload == '0);
      do_skip[n]    = active && have_entry[n] && zero_pl;
      do_inj[n]     = active && have_entry[n] && !zero_pl && !after.v &&
                      (idle_q[n] >= IDW'(W));
      p_new         = '{v: 1'b1, r: ent.r, c: ent.c, d: payload};
      p_next[n]     = do_inj[n] ? p_new : after;
    end
  end

  // Register outputs, apart from the input path (no false loop through the
  // array's neighbour wiring).
  always_comb begin
    for (int n = 0; n < N; n++) begin
      pkt_q[n] = PW'(reg_q[n]);
      empty[n] = (ptr_q[n] >= cnt_q[n]) && !reg_q[n].v;
    end
  end

  assign consumed = arrive;
  assign injected = do_inj;

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (!rst_n) begin
        reg_q[n]  <= '0;
        ptr_q[n]  <= '0;
        cnt_q[n]  <= '0;
        idle_q[n] <= IDW'(W);
        u_q[n]    <= '0;
        acc_q[n]  <= '0;
      end else if (start) begin
        reg_q[n]  <= '0;
        ptr_q[n]  <= '0;
        idle_q[n] <= IDW'(W);
        acc_q[n]  <= '0;
        if (use_result) u_q[n] <= acc_q[n];
      end else begin
        reg_q[n] <= p_next[n];
        if (do_inj[n] || do_skip[n]) ptr_q[n] <= ptr_q[n] + 1'b1;
        if (p_next[n].v)              idle_q[n] <= '0;
        else if (idle_q[n] < IDW'(W)) idle_q[n] <= idle_q[n] + 1'b1;
        if (arrive[n]) acc_q[n] <= acc_q[n] ^ p_in[n].d;
        if (ld_cmd == LD_U_ALL || (ld_sel[n] && ld_cmd == LD_U)) u_q[n] <= ld_u;
        if (ld_sel[n] && ld_cmd == LD_ENTRY) cnt_q[n] <= PTRW'(ld_slot) + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (ld_sel[n] && ld_cmd == LD_ENTRY) mem[n][ld_slot] <= entry_t'(ld_entry);
    end
  end

  // The entry pointer never passes the entry count.
  for (genvar n = 0; n < N; n++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) ptr_q[n] <= cnt_q[n]);
  end

endmodule
