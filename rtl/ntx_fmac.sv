// ntx_fmac: fused multiply-accumulate with a wide fixed-point accumulator.
//
// The FMAC never rounds while it accumulates. Each product a*b of two
// float32 operands is formed exactly (24x24-bit mantissa product), shifted
// to its place in a wide two's-complement fixed-point accumulator and
// added. The accumulator is about 300 bits wide (ACC_W = 300) with its
// least significant bit worth 2^-FRAC (FRAC = 150), so it covers every
// float32 magnitude from the smallest denormal up to 2^149 exactly.
//
// The addition uses partial carry-save (PCS) arithmetic with two segments:
// the accumulator is kept as a low and a high segment of SEG = ACC_W/2
// bits plus one saved carry bit. In one cycle the low segment adds the low
// half of the product and saves its carry-out, while the high segment adds
// the high half plus the carry saved in the previous cycle. No carry ever
// ripples through more than half of the accumulator, which is what lets a
// new product be accumulated every cycle. The represented value is
// hi*2^SEG + carry*2^SEG + lo; ntx_pcs_norm resolves it.
//
// Interface: en_i performs acc = (clear_i ? 0 : acc) +/- a_i*b_i, with
// subtraction when neg_i. The state (hi, carry, lo) is registered and
// visible the cycle after the operation. ovf_o is a sticky flag set when a
// product does not fit below the sign bit (|a*b| >= 2^(ACC_W-1-FRAC));
// it is cleared by clear_i. Product bits below 2^-FRAC are dropped; with
// FRAC = 150 that happens only for products smaller than float32 denormals.
// Float32 denormal inputs are handled; infinities and NaNs are treated as
// ordinary numbers with exponent 255.
// The 300-bit width and the two PCS segments follow the architecture; the
// LSB position, the overflow flag and the treatment of inf/NaN are choices
// of this design.
module ntx_fmac #(
  parameter int unsigned ACC_W = 300,
  parameter int unsigned FRAC  = 150,
  parameter int unsigned SEG   = ACC_W / 2
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   en_i,
  input  logic                   clear_i,
  input  logic                   neg_i,
  input  logic [31:0]            a_i,
  input  logic [31:0]            b_i,
  output logic [ACC_W-SEG-1:0]   acc_hi_o,
  output logic                   acc_carry_o,
  output logic [SEG-1:0]         acc_lo_o,
  output logic                   ovf_o
);
  localparam int unsigned EXT_W = ACC_W + 128;

  logic [23:0]          ma, mb;
  logic [47:0]          prod;
  int                   ea, eb, pos;
  logic [EXT_W-1:0]     shifted;
  logic [ACC_W-1:0]     mag, term;
  logic                 p_ovf, p_neg;

  logic [ACC_W-SEG-1:0] hi_q;
  logic [SEG-1:0]       lo_q;
  logic                 c_q, ovf_q;
  logic [SEG:0]         lo_sum;
  logic [ACC_W-SEG-1:0] hi_sum, hi_in;
  logic [SEG-1:0]       lo_in;
  logic                 c_in;

  // Multiply and align.
  always_comb begin
    ea   = (a_i[30:23] == 8'd0) ? 1 : int'(a_i[30:23]);
    eb   = (b_i[30:23] == 8'd0) ? 1 : int'(b_i[30:23]);
    ma   = {(a_i[30:23] != 8'd0), a_i[22:0]};
    mb   = {(b_i[30:23] != 8'd0), b_i[22:0]};
    prod = ma * mb;
    // value = prod * 2^(ea+eb-300); its LSB sits at bit ea+eb-300+FRAC.
    pos  = ea + eb - 300 + int'(FRAC);
    if (pos >= 0) shifted = EXT_W'(prod) << pos;
    else          shifted = EXT_W'(prod) >> (-pos);
    p_ovf = |shifted[EXT_W-1:ACC_W-1];
    mag   = {1'b0, shifted[ACC_W-2:0]};
    p_neg = a_i[31] ^ b_i[31] ^ neg_i;
    term  = p_neg ? (~mag + 1'b1) : mag;
  end

  // Two-segment partial carry-save accumulation.
  always_comb begin
    hi_in  = clear_i ? '0 : hi_q;
    lo_in  = clear_i ? '0 : lo_q;
    c_in   = clear_i ? 1'b0 : c_q;
    lo_sum = {1'b0, lo_in} + {1'b0, term[SEG-1:0]};
    hi_sum = hi_in + term[ACC_W-1:SEG] + (ACC_W-SEG)'(c_in);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      hi_q  <= '0;
      lo_q  <= '0;
      c_q   <= 1'b0;
      ovf_q <= 1'b0;
    end else if (en_i) begin
      hi_q  <= hi_sum;
      lo_q  <= lo_sum[SEG-1:0];
      c_q   <= lo_sum[SEG];
      ovf_q <= (clear_i ? 1'b0 : ovf_q) | p_ovf;
    end
  end

  assign acc_hi_o    = hi_q;
  assign acc_lo_o    = lo_q;
  assign acc_carry_o = c_q;
  assign ovf_o       = ovf_q;
endmodule
