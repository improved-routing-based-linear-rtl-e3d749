// tb_link_sched: checks the per-cell schedule on an 8 x 8 grid.
// Normal mode: every cell's partner exists, is the neighbour named in the
// clockwise transposition schedule, and looks back at it. Ring mode: the
// successor directions trace one cycle through all 64 cells, the ring
// positions along it count 0..63, and in each step every cell is paired
// with a partner that names it back.
module tb_link_sched;
  import nfs_pkg::*;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;

  mode_t mode;
  logic [1:0] step;
  logic row_odd;
  logic [0:0] col_odd, ring_par;
  dir_t [0:0] ring_next, ring_prev, dir;

  link_sched dut (.*);

  dir_t tab [N][N];

  task automatic eval_all(mode_t md, logic [1:0] st);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        mode = md; step = st;
        row_odd = r[0]; col_odd[0] = c[0];
        ring_par[0] = 1'(ring_pos(r, c, N) % 2);
        ring_next[0] = ring_next_dir(r, c, N);
        ring_prev[0] = ring_prev_dir(r, c, N);
        #1;
        tab[r][c] = dir[0];
      end
  endtask

  function automatic dir_t opposite(dir_t d);
    case (d)
      DIR_N: return DIR_S;
      DIR_S: return DIR_N;
      DIR_E: return DIR_W;
      DIR_W: return DIR_E;
      default: return DIR_NONE;
    endcase
  endfunction

  // neighbour on the torus
  task automatic nb(int r, int c, dir_t d, output int r2, output int c2);
    r2 = r; c2 = c;
    case (d)
      DIR_N: r2 = (r + N - 1) % N;
      DIR_S: r2 = (r + 1) % N;
      DIR_E: c2 = (c + 1) % N;
      DIR_W: c2 = (c + N - 1) % N;
      default: ;
    endcase
  endtask

  initial begin
    int r2, c2, r, c, exp_r, exp_c;
    bit seen [N][N];
    // normal schedule
    for (int t = 0; t < 4; t++) begin
      eval_all(MODE_CTR, 2'(t));
      for (r = 0; r < N; r++)
        for (c = 0; c < N; c++) begin
          // expected partner from the schedule text
          exp_r = r; exp_c = c;
          case (t)
            0: exp_r = (r % 2) ? r - 1 : r + 1;
            1: exp_c = (c % 2) ? (c + 1) % N : (c + N - 1) % N;
            2: exp_r = (r % 2) ? (r + 1) % N : (r + N - 1) % N;
            3: exp_c = (c % 2) ? c - 1 : c + 1;
            default: ;
          endcase
          nb(r, c, tab[r][c], r2, c2);
          checks++;
          if (r2 != exp_r || c2 != exp_c) begin
            failures++;
            $display("FAIL t=%0d (%0d,%0d) dir=%s", t, r, c, tab[r][c].name());
          end
          checks++;
          if (tab[r2][c2] != opposite(tab[r][c])) failures++;
        end
    end
    // ring: one Hamiltonian cycle along mesh (non-wrap) links
    r = 0; c = 0;
    for (int r0 = 0; r0 < N; r0++) for (int c0 = 0; c0 < N; c0++) seen[r0][c0] = 0;
    for (int p = 0; p < N * N; p++) begin
      checks++;
      if (seen[r][c] || ring_pos(r, c, N) != p) begin
        failures++;
        $display("FAIL ring at p=%0d (%0d,%0d) pos=%0d", p, r, c, ring_pos(r, c, N));
      end
      seen[r][c] = 1;
      nb(r, c, ring_next_dir(r, c, N), r2, c2);
      checks++;
      // mesh link only (no wrap) and prev of successor is this cell
      if ((r2 - r) * (r2 - r) + (c2 - c) * (c2 - c) != 1) failures++;
      nb(r2, c2, ring_prev_dir(r2, c2, N), exp_r, exp_c);
      checks++;
      if (exp_r != r || exp_c != c) failures++;
      r = r2; c = c2;
    end
    checks++;
    if (r != 0 || c != 0) failures++;
    for (int t = 0; t < 2; t++) begin
      eval_all(MODE_RING, 2'(t));
      for (r = 0; r < N; r++)
        for (c = 0; c < N; c++) begin
          nb(r, c, tab[r][c], r2, c2);
          checks++;
          if (tab[r2][c2] != opposite(tab[r][c])) failures++;
          // pairs (p, p+1) with p of the step's parity
          checks++;
          if (((ring_pos(r, c, N) % 2) == t) != (tab[r][c] == ring_next_dir(r, c, N)))
            failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
