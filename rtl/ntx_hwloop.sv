// ntx_hwloop: the five nested hardware loop counters of the NTX.
//
// Each loop k has a 16-bit counter and a configurable bound, the index of
// its last iteration (bound = iterations - 1). Loop 0 is the innermost.
// When step_i is high the loop nest advances by one iteration of the
// innermost body: counter 0 is enabled; an enabled counter that has reached
// its last iteration resets to 0 and enables the next counter for that
// cycle, otherwise it increments. This is the chain of "En / Done" counters
// of the architecture. Only loops below num_loops_i take part; the others
// stay at 0 and count as finished.
// Outputs (combinational on the current counter state):
//   level_o   - highest loop enabled by a step taken now (0..num_loops-1);
//               the AGUs add the stride of this loop.
//   first_o[k]- all loops below k are at iteration 0 (an init at level k)
//   last_o[k] - all loops below k are at their last iteration (a store at
//               level k); last_o[NUM_LOOPS] means the whole nest ends.
// Timing: clear_i loads all counters with 0; one step per cycle.
module ntx_hwloop
  import ntx_pkg::*;
#(
  parameter int unsigned N = NUM_LOOPS,
  parameter int unsigned W = LOOP_W
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   clear_i,
  input  logic                   step_i,
  input  logic [N-1:0][W-1:0]    bound_i,
  input  logic [LEVEL_W-1:0]     num_loops_i,
  output logic [N-1:0][W-1:0]    cnt_o,
  output logic [LEVEL_W-1:0]     level_o,
  output logic [N:0]             first_o,
  output logic [N:0]             last_o
);
  logic [N-1:0][W-1:0] cnt_q;
  logic [N-1:0]        active, at_last, at_first, en;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      active[k]   = (k < int'(num_loops_i));
      at_last[k]  = !active[k] || (cnt_q[k] == bound_i[k]);
      at_first[k] = (cnt_q[k] == '0);
    end
  end

  // Enable chain: loop k advances when all loops below it wrap.
  assign en[0]      = 1'b1;
  assign first_o[0] = 1'b1;
  assign last_o[0]  = 1'b1;
  for (genvar k = 1; k < N; k++) begin : gen_en
    assign en[k] = en[k-1] && at_last[k-1] && active[k];
  end
  for (genvar k = 1; k <= N; k++) begin : gen_fl
    assign first_o[k] = first_o[k-1] && at_first[k-1];
    assign last_o[k]  = last_o[k-1] && at_last[k-1];
  end

  always_comb begin
    level_o = '0;
    for (int k = 0; k < N; k++) if (en[k]) level_o = LEVEL_W'(k);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0;
    end else if (clear_i) begin
      cnt_q <= '0;
    end else if (step_i) begin
      for (int k = 0; k < N; k++) begin
        if (en[k] && active[k]) cnt_q[k] <= at_last[k] ? '0 : cnt_q[k] + 1'b1;
      end
    end
  end

  assign cnt_o = cnt_q;
endmodule
