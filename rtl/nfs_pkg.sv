// nfs_pkg: shared types and constant functions of the routing-based GF(2)
// matrix-by-vector multiplier.
//
// The multiplier routes packets across an m x m array of cells that is split
// into four independent, interleaved sub-tori of size m/2 x m/2. This package
// holds what several modules must agree on:
//   * dir_t   - which neighbour link a cell uses in the current step;
//   * mode_t  - normal clockwise transposition routing or the fall-back
//               serpentine-ring routing used to recover from a livelock;
//   * ld_cmd_t - the commands of the loading bus;
//   * the torus interleaving of Fig. "torus in a flat array": logical index
//     <-> physical slot along a row or column;
//   * the serpentine ring order used in recovery mode;
//   * the number of flip-flops in a pipelined AND chain.
// All functions are constant functions usable at elaboration time and in
// synthesizable logic.
package nfs_pkg;

  typedef enum logic [2:0] {
    DIR_NONE = 3'd0,
    DIR_N    = 3'd1,   // partner is the cell at row-1 (this cell is "hi")
    DIR_E    = 3'd2,   // partner is the cell at col+1 (this cell is "lo")
    DIR_S    = 3'd3,   // partner is the cell at row+1 (this cell is "lo")
    DIR_W    = 3'd4    // partner is the cell at col-1 (this cell is "hi")
  } dir_t;

  typedef enum logic {
    MODE_CTR  = 1'b0,  // clockwise transposition routing
    MODE_RING = 1'b1   // serpentine ring, always exchange
  } mode_t;

  typedef enum logic [1:0] {
    LD_NONE  = 2'd0,
    LD_ENTRY = 2'd1,   // write one pending-packet entry of one cell
    LD_U     = 2'd2,   // write the input-vector register of one cell
    LD_U_ALL = 2'd3    // write the input-vector register of every cell
  } ld_cmd_t;

  // Torus interleaving along one dimension of n cells (n even). Physical slot
  // s holds logical index: s even -> s/2, s odd -> n-1-(s-1)/2. The physical
  // order is therefore 0, n-1, 1, n-2, 2, ... and every logical neighbour pair,
  // the wrap-around pair (n-1, 0) included, is at most two slots apart.
  function automatic int unsigned il_log(int unsigned s, int unsigned n);
    return (s % 2 == 0) ? s / 2 : n - 1 - (s - 1) / 2;
  endfunction

  // Inverse of il_log: physical slot of logical index l.
  function automatic int unsigned il_slot(int unsigned l, int unsigned n);
    return (l < n / 2) ? 2 * l : 2 * (n - 1 - l) + 1;
  endfunction

  // Serpentine ring through an n x n grid (n even): row 0 left to right,
  // then rows 1..n-1 alternately right-to-left / left-to-right over columns
  // 1..n-1, then up column 0 from row n-1 to row 1, back to (0,0).
  function automatic int unsigned ring_pos(int unsigned r, int unsigned c,
                                           int unsigned n);
    if (r == 0) return c;
    if (c == 0) return n + (n - 1) * (n - 1) + (n - 1 - r);
    if (r % 2 == 1) return n + (r - 1) * (n - 1) + (n - 1 - c);
    return n + (r - 1) * (n - 1) + (c - 1);
  endfunction

  // Parity of ring_pos(r, c, n) for even n, in closed form (cheap logic).
  function automatic logic ring_parity(int unsigned r, int unsigned c);
    if (r == 0) return c[0];
    if (c == 0) return r[0];
    if (r % 2 == 1) return ~c[0];
    return c[0];
  endfunction

  // Direction from (r,c) to its successor on the ring.
  function automatic dir_t ring_next_dir(int unsigned r, int unsigned c,
                                         int unsigned n);
    if (r == 0) return (c == n - 1) ? DIR_S : DIR_E;
    if (c == 0) return DIR_N;
    if (r % 2 == 1) return (c == 1) ? ((r == n - 1) ? DIR_W : DIR_S) : DIR_W;
    if (c == n - 1) return DIR_S;
    return DIR_E;
  endfunction

  // Direction from (r,c) to its predecessor on the ring.
  function automatic dir_t ring_prev_dir(int unsigned r, int unsigned c,
                                         int unsigned n);
    if (r == 0) return (c == 0) ? DIR_S : DIR_W;
    if (c == 0) return (r == n - 1) ? DIR_E : DIR_S;
    if (r % 2 == 1) return (c == n - 1) ? DIR_N : DIR_E;
    return (c == 1) ? DIR_N : DIR_W;
  endfunction

  // Flip-flops in a chain of n inputs with a register after every d AND
  // gates and one at the end: ceil((n-1)/d), at least 1.
  function automatic int unsigned chain_stages(int unsigned n, int unsigned d);
    if (n <= 1) return 1;
    return (n - 1 + d - 1) / d;
  endfunction

endpackage
