// ntx_pcs_norm: converts the FMAC's partial carry-save accumulator to float32.
//
// First the saved carry is added into the high segment, giving the plain
// ACC_W-bit two's-complement value V (LSB worth 2^-FRAC). Then the sign is
// taken and the magnitude formed, a leading-one search finds the exponent,
// the magnitude is shifted so that its leading one is at the top, and the
// 23 bits below it are rounded to nearest, ties to even, using a guard bit
// and a sticky bit. Results below the float32 normal range become
// denormals; results of 2^128 and above, or an accumulator whose overflow
// flag is set, become infinity (for the overflow flag the sign is that of
// what the accumulator still holds, as the dropped product is not kept). A zero accumulator gives +0.
// Purely combinational; the architecture only names this stage ("PCS
// Norm"), so its inner structure and the rounding mode are choices of this
// design. Requires FRAC >= 150.
module ntx_pcs_norm #(
  parameter int unsigned ACC_W = 300,
  parameter int unsigned FRAC  = 150,
  parameter int unsigned SEG   = ACC_W / 2
) (
  input  logic [ACC_W-SEG-1:0] acc_hi_i,
  input  logic                 acc_carry_i,
  input  logic [SEG-1:0]       acc_lo_i,
  input  logic                 ovf_i,
  output logic [31:0]          z_o
);
  logic [ACC_W-1:0] v, mag, norm;
  logic             sign, g, st, rnd;
  int               lead, e;
  logic [22:0]      mant;
  logic [30:0]      er;

  always_comb begin
    v    = {acc_hi_i + (ACC_W-SEG)'(acc_carry_i), acc_lo_i};
    sign = v[ACC_W-1];
    mag  = sign ? (~v + 1'b1) : v;
    lead = -1;
    for (int i = 0; i < int'(ACC_W); i++) if (mag[i]) lead = i;
    e    = lead - int'(FRAC) + 127;
    norm = '0;
    mant = '0;
    g    = 1'b0;
    st   = 1'b0;
    if (e >= 1) begin
      norm = mag << (int'(ACC_W) - 1 - lead);
      mant = norm[ACC_W-2 -: 23];
      g    = norm[ACC_W-25];
      st   = |norm[ACC_W-26:0];
    end else begin
      e    = 0;
      mant = mag[FRAC-149 +: 23];
      g    = mag[FRAC-150];
      for (int i = 0; i < int'(FRAC) - 150; i++) st = st | mag[i];
    end
    rnd = g && (st || mant[0]);
    er  = 31'(e < 255 ? e : 255) << 23 | 31'(mant);
    er  = er + 31'(rnd);
    if (ovf_i)                                 z_o = {sign, 8'hFF, 23'd0};
    else if (lead < 0)                         z_o = 32'h0000_0000;
    else if (e >= 255 || er[30:23] == 8'hFF)   z_o = {sign, 8'hFF, 23'd0};
    else                                       z_o = {sign, er};
  end
endmodule
