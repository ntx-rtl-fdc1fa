// ntx_fpu: the NTX datapath ("FPU").
//
// Executes the micro-commands the controller queues in the command FIFO,
// one per cycle, as soon as the operands they need are at the head of the
// read-data FIFOs (RD0 for operand a and initial values, RD1 for operand b)
// and the store-data FIFO has room for a result. The datapath control
// stalls otherwise. Parts:
//   - operand muxes: b is RD1, 0.0 or 1.0 as the micro-command says;
//   - the FMAC (ntx_fmac) for MAC/NMAC/ADD/SUB, with its normaliser
//     (ntx_pcs_norm) and an optional ReLU on the way out;
//   - a comparator ("Comp") with an ALU register holding the running
//     maximum/minimum, and a 16-bit index counter that numbers the body
//     iterations since the last initialisation, for MAX/MIN/ARGMAX/ARGMIN;
//   - the result mux choosing the FMAC result, the ALU register or the
//     index of the best element.
// An initialisation sets x (the accumulator or the ALU register) to the
// initial value and resets the index counter; for ARGMAX/ARGMIN the
// initial value counts as index 0. A body with a strictly better a
// replaces the ALU register and records the current index.
// Timing: a micro-command that executes in cycle t and carries the store
// flag pushes its result into the store-data FIFO in cycle t+1.
// The block structure follows the NTX architecture; the operation set,
// the initial-value rules and the ARGMAX tie rule are choices of this design.
module ntx_fpu
  import ntx_pkg::*;
#(
  parameter int unsigned STD_DEPTH = 7,
  parameter int unsigned ACC_W     = 300
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // command FIFO head
  input  ucmd_t       ucmd_i,
  input  logic        ucmd_valid_i,
  output logic        ucmd_pop_o,
  // read data FIFO heads
  input  logic [31:0] rd0_i,
  input  logic        rd0_valid_i,
  output logic        rd0_pop_o,
  input  logic [31:0] rd1_i,
  input  logic        rd1_valid_i,
  output logic        rd1_pop_o,
  // store data FIFO
  input  logic [$clog2(STD_DEPTH+1)-1:0] std_count_i,
  output logic        std_push_o,
  output logic [31:0] std_data_o,
  output logic        idle_o
);
  localparam logic [31:0] F_ONE = 32'h3F80_0000;
  localparam int unsigned SEG = ACC_W / 2;

  logic need_rd0, need_rd1, std_room, go;
  logic is_cmp;
  logic [31:0] a, b;

  logic                 fm_en, fm_clear, fm_neg;
  logic [31:0]          fm_a, fm_b;
  logic [ACC_W-SEG-1:0] acc_hi;
  logic [SEG-1:0]       acc_lo;
  logic                 acc_c, acc_ovf;
  logic [31:0]          fmac_z;

  logic [31:0] alu_q;
  logic [15:0] idx_cnt_q, best_idx_q;
  logic        better;

  logic        st_pend_q, st_relu_q;
  fpu_fn_e     st_fn_q;
  logic [31:0] res;

  assign is_cmp   = !(ucmd_i.fn inside {FN_MAC, FN_NMAC});
  assign need_rd0 = ucmd_i.init_mem || (ucmd_i.body && ucmd_i.a_mem);
  assign need_rd1 = ucmd_i.body && ucmd_i.b_mem;
  // One slot is reserved for the result still on its way (st_pend_q).
  assign std_room = (int'(std_count_i) + int'(st_pend_q)) < int'(STD_DEPTH);
  assign go = ucmd_valid_i && (!need_rd0 || rd0_valid_i) && (!need_rd1 || rd1_valid_i)
            && (!ucmd_i.store || std_room);

  assign ucmd_pop_o = go;
  assign rd0_pop_o  = go && need_rd0;
  assign rd1_pop_o  = go && need_rd1;

  // Operand muxes.
  always_comb begin
    a = rd0_i;
    unique case (ucmd_i.b_src)
      BSRC_AGU1: b = rd1_i;
      BSRC_ZERO: b = 32'h0;
      BSRC_ONE:  b = F_ONE;
      default:   b = F_ONE;
    endcase
  end

  // FMAC control: an initialisation slot loads x = init*1.0; a body with
  // the init flag starts from 0.0.
  always_comb begin
    fm_en    = go && !is_cmp;
    fm_clear = ucmd_i.init;
    fm_neg   = ucmd_i.body && (ucmd_i.fn == FN_NMAC);
    fm_a     = a;
    fm_b     = ucmd_i.body ? b : F_ONE;
  end

  ntx_fmac #(.ACC_W(ACC_W), .FRAC(150)) i_fmac (
    .clk_i, .rst_ni,
    .en_i(fm_en), .clear_i(fm_clear), .neg_i(fm_neg), .a_i(fm_a), .b_i(fm_b),
    .acc_hi_o(acc_hi), .acc_carry_o(acc_c), .acc_lo_o(acc_lo), .ovf_o(acc_ovf)
  );

  ntx_pcs_norm #(.ACC_W(ACC_W), .FRAC(150)) i_norm (
    .acc_hi_i(acc_hi), .acc_carry_i(acc_c), .acc_lo_i(acc_lo), .ovf_i(acc_ovf),
    .z_o(fmac_z)
  );

  // Comparator: is a strictly better than the current x?
  always_comb begin
    logic [31:0] alu_cur;
    // A body carrying the init flag compares against the initial 0.0.
    alu_cur = (ucmd_i.init && ucmd_i.body) ? 32'h0 : alu_q;
    if (ucmd_i.fn inside {FN_MAX, FN_ARGMAX}) better = float_key(a) > float_key(alu_cur);
    else                                      better = float_key(a) < float_key(alu_cur);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      alu_q      <= '0;
      idx_cnt_q  <= '0;
      best_idx_q <= '0;
    end else if (go && is_cmp) begin
      if (ucmd_i.init) begin
        alu_q      <= ucmd_i.init_mem ? rd0_i : 32'h0;
        idx_cnt_q  <= '0;
        best_idx_q <= '0;
      end
      if (ucmd_i.body) begin
        if (better) begin
          alu_q      <= a;
          best_idx_q <= ucmd_i.init ? 16'd0 : idx_cnt_q;
        end
        idx_cnt_q <= ucmd_i.init ? 16'd1 : idx_cnt_q + 16'd1;
      end
    end
  end

  // Store: the result is taken one cycle after the body that completes it.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_pend_q <= 1'b0;
      st_relu_q <= 1'b0;
      st_fn_q   <= FN_MAC;
    end else begin
      st_pend_q <= go && ucmd_i.store;
      if (go && ucmd_i.store) begin
        st_relu_q <= ucmd_i.relu;
        st_fn_q   <= ucmd_i.fn;
      end
    end
  end

  always_comb begin
    unique case (st_fn_q)
      FN_MAC, FN_NMAC:     res = fmac_z;
      FN_MAX, FN_MIN:      res = alu_q;
      default:             res = {16'd0, best_idx_q};
    endcase
    if (st_relu_q && !(st_fn_q inside {FN_ARGMAX, FN_ARGMIN}) && res[31]) res = 32'h0;
  end

  assign std_push_o = st_pend_q;
  assign std_data_o = res;
  assign idle_o     = !st_pend_q;
endmodule
