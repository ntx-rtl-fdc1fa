// ntx_agu: address generation unit of the NTX.
//
// A 32-bit address register with a base and one stride per hardware loop.
// load_i copies the base into the register. On every step_i the stride of
// the highest loop enabled in that step (level_i, from ntx_hwloop) is added
// to the register, so one stride is added per cycle. Strides are byte
// offsets in two's complement; the stride of an outer loop must include the
// rewind of the inner loops, which lets any affine walk over up to five
// dimensions be generated without multipliers.
// Timing: addr_o is the register; it changes the cycle after load_i/step_i.
module ntx_agu
  import ntx_pkg::*;
#(
  parameter int unsigned N = NUM_LOOPS,
  parameter int unsigned W = ADDR_W
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                load_i,
  input  logic [W-1:0]        base_i,
  input  logic                step_i,
  input  logic [LEVEL_W-1:0]  level_i,
  input  logic [N-1:0][W-1:0] stride_i,
  output logic [W-1:0]        addr_o
);
  logic [W-1:0] addr_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      addr_q <= '0;
    else if (load_i)  addr_q <= base_i;
    else if (step_i && (int'(level_i) < N)) addr_q <= addr_q + stride_i[level_i];
  end

  assign addr_o = addr_q;
endmodule
