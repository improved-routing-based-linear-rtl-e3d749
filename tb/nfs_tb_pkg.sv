// nfs_tb_pkg: testbench helpers - where a physical cell sits in the four
// sub-tori and how a matrix entry is encoded for loading.
//
// Extended address along one dimension of a sub-torus with S cells, for a
// packet injected at logical coordinate src and destined to tgt:
//   d    = ((tgt - src + S/2) mod S) - S/2      (shortest signed distance)
//   addr = src + S/2 + d                        (0 .. 2S-1)
package nfs_tb_pkg;
  import nfs_pkg::*;

  function automatic int enc_dim(int src, int tgt, int s);
    int d;
    d = ((tgt - src + s + s / 2) % s) - s / 2;
    return src + s / 2 + d;
  endfunction

  // logical sub-torus coordinate of physical row (or column) x
  function automatic int log_of(int x, int m);
    return int'(il_log(x / 2, m / 2));
  endfunction

  // Entry for a packet stored at physical (sr, sc), destined to physical
  // (tr, tc) (same sub-torus), carrying the u of block cell sel.
  function automatic logic [31:0] make_entry(int sel, int sr, int sc,
                                             int tr, int tc, int m,
                                             int aw1);
    int s = m / 2;
    int ra = enc_dim(log_of(sr, m), log_of(tr, m), s);
    int ca = enc_dim(log_of(sc, m), log_of(tc, m), s);
    return (32'(sel) << (2 * aw1)) | (32'(ra) << aw1) | 32'(ca);
  endfunction
endpackage
