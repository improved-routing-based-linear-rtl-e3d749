// link_sched: per-cell compare-exchange schedule.
//
// In normal mode (clockwise transposition routing) a cell at logical
// sub-torus row i, column j uses, in step t:
//   t mod 4 = 0 : rows paired (odd i with i-1): odd rows look N, even rows S
//   t mod 4 = 1 : columns paired (odd j with j+1): odd cols look E, even W
//   t mod 4 = 2 : rows paired (odd i with i+1): odd rows look S, even rows N
//   t mod 4 = 3 : columns paired (odd j with j-1): odd cols look W, even E
// On the torus the pairs (S-1, 0) of steps 1 and 2 use the wrap-around link.
// This is the schedule of the document, unchanged.
//
// In recovery mode the cells form a serpentine ring (see nfs_pkg::ring_pos);
// ring pairs (p, p+1) with p even are exchanged on even steps and those with
// p odd on odd steps. A cell whose ring position has the parity of the step
// therefore talks to its ring successor, the others to their predecessor.
// The ring path itself is this design's choice, drawn to match the figure of
// the ring: row 0 in full, the other rows over columns 1..S-1, and column 0
// as the return path.
//
// The ring directions and parities are constants of the cell's position and
// are supplied as inputs. The module schedules the N cells of one array row
// side by side (they share the row parity). Combinational.
module link_sched
  import nfs_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  mode_t          mode,
  input  logic [1:0]     step,       // t mod 4
  input  logic           row_odd,    // logical row i is odd
  input  logic [N-1:0]   col_odd,    // logical column j is odd
  input  logic [N-1:0]   ring_par,   // ring position mod 2
  input  dir_t [N-1:0]   ring_next,  // direction to ring successor
  input  dir_t [N-1:0]   ring_prev,  // direction to ring predecessor
  output dir_t [N-1:0]   dir
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      if (mode == MODE_RING) begin
        dir[n] = (ring_par[n] == step[0]) ? ring_next[n] : ring_prev[n];
      end else begin
        unique case (step)
          2'd0: dir[n] = row_odd ? DIR_N : DIR_S;
          2'd1: dir[n] = col_odd[n] ? DIR_E : DIR_W;
          2'd2: dir[n] = row_odd ? DIR_S : DIR_N;
          default: dir[n] = col_odd[n] ? DIR_W : DIR_E;
        endcase
      end
    end
  end

endmodule
