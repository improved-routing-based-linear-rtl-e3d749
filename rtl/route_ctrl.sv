// route_ctrl: step sequencer of one routing operation (one matrix-by-vector
// product).
//
// States: IDLE -> ROUTE -> (RING) -> IDLE.
//   * start_req in IDLE issues start (one clock, clears the cells) and
//     enters ROUTE with step counter t = 0.
//   * ROUTE: clockwise transposition routing, step = t mod 4.
//   * The routing is complete when all_empty has been 1 for CONFIRM
//     consecutive clocks (CONFIRM = latency of the empty detector, about
//     2m/d); the first CONFIRM clocks after start are ignored because the
//     detector still holds values from before the start.
//   * If that has not happened after t_max steps the configuration is
//     treated as pathological (a livelock): the cells switch to the
//     serpentine-ring mode, where every exchange is performed and every
//     packet reaches its target after at most one trip round the ring.
//     step[0] then is the ring step parity. The same completion test ends
//     RING.
// done rises with the return to IDLE and stays until the next start;
// recovered tells whether the ring mode was needed; steps counts the clocks
// spent in ROUTE and RING. Following the document: the completion test, the
// time bound t_max and the ring recovery. This design's choices: t_max as an
// input (the document's t_max = 2.1m + 2m/d holds only without refill),
// injection continuing in ring mode, and no time bound on RING.
module route_ctrl
  import nfs_pkg::*;
#(
  parameter int unsigned CONFIRM = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_req,
  input  logic [31:0] t_max,
  input  logic        all_empty,
  output logic        start,
  output logic        active,
  output mode_t       mode,
  output logic [1:0]  step,
  output logic        done,
  output logic        recovered,
  output logic [31:0] steps
);

  typedef enum logic [1:0] {S_IDLE, S_ROUTE, S_RING} state_t;

  state_t      state_q;
  logic [31:0] t_q, rt_q, ones_q;
  logic        complete;

  assign start    = (state_q == S_IDLE) && start_req;
  assign active   = (state_q != S_IDLE);
  assign mode     = (state_q == S_RING) ? MODE_RING : MODE_CTR;
  assign step     = (state_q == S_RING) ? {1'b0, rt_q[0]} : t_q[1:0];
  assign steps    = t_q;
  assign complete = all_empty && (ones_q + 1 >= CONFIRM);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      t_q       <= '0;
      rt_q      <= '0;
      ones_q    <= '0;
      done      <= 1'b0;
      recovered <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (start_req) begin
            state_q   <= S_ROUTE;
            t_q       <= '0;
            rt_q      <= '0;
            ones_q    <= '0;
            done      <= 1'b0;
            recovered <= 1'b0;
          end
        end
        default: begin
          t_q <= t_q + 1;
          if (state_q == S_RING) rt_q <= rt_q + 1;
          if (t_q < CONFIRM) ones_q <= '0;
          else               ones_q <= all_empty ? ones_q + 1 : '0;
          if (t_q >= CONFIRM && complete) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else if (state_q == S_ROUTE && t_q + 1 >= t_max) begin
            state_q   <= S_RING;
            recovered <= 1'b1;
          end
        end
      endcase
    end
  end

  // A start request is only honoured when idle; once done, it stays until
  // the next start.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q != S_IDLE) |-> !done);

endmodule
