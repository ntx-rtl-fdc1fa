// ntx_dma: two-dimensional DMA engine of the cluster.
//
// Moves data between the 64-bit port towards the SoC interconnect (L2 and
// the memory cube) and the TCDM, so that the processor can double-buffer:
// load the next tile while the NTX work on the current one and write the
// previous results back. A transfer is REPS rows of LEN bytes; after each
// row the source and destination addresses advance by their row strides.
// Registers (byte offsets): 0x00 SRC, 0x04 DST, 0x08 LEN, 0x0C SRC_STRIDE,
// 0x10 DST_STRIDE, 0x14 REPS, 0x18 START (write: bit 0 = direction,
// 0 = external to TCDM, 1 = TCDM to external; a write while busy is held
// off), 0x1C STATUS (bit 0 busy, bit 1 done, write 1 to bit 1 to clear).
// Data moves in 64-bit beats: each beat is one external access and two
// 32-bit TCDM accesses issued together on the DMA's two TCDM ports.
// Addresses and LEN must be multiples of 8 bytes. done_o (a level) rises
// when a transfer ends.
// Timing: one beat at a time (external access, then both TCDM accesses),
// so a beat takes at least 4 cycles. The architecture gives the DMA's role,
// its 2D capability and its port widths; the register map, the beat
// sequencing and the alignment rule are choices of this design.
module ntx_dma
  import ntx_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  tcdm_req_t       cfg_req_i,
  output tcdm_rsp_t       cfg_rsp_o,
  output tcdm_req_t [1:0] tcdm_req_o,
  input  tcdm_rsp_t [1:0] tcdm_rsp_i,
  output ext_req_t        ext_req_o,
  input  ext_rsp_t        ext_rsp_i,
  output logic            done_o,
  output logic            busy_o
);
  typedef enum logic [2:0] {S_IDLE, S_EXT_REQ, S_EXT_WAIT, S_TCDM_REQ, S_TCDM_WAIT} state_e;

  state_e      state_q;
  logic [31:0] src_q, dst_q, len_q, sstr_q, dstr_q, reps_q;
  logic        dir_q, done_q;
  logic [31:0] row_src_q, row_dst_q, off_q, rep_q;
  logic [63:0] buf_q;
  logic [1:0]  tc_gnt_q, tc_rv_q;
  logic [7:0]  off;
  logic        cfg_gnt, cfg_rvalid_q;
  logic [31:0] cfg_rdata_q, cfg_rdata;
  logic [31:0] ext_addr, tc_addr;
  logic        beat_last, row_last;

  assign off     = cfg_req_i.addr[7:0];
  assign cfg_gnt = cfg_req_i.req && !(cfg_req_i.we && off == 8'h18 && busy_o);
  assign busy_o  = (state_q != S_IDLE);
  assign done_o  = done_q;

  always_comb begin
    unique case (off)
      8'h00: cfg_rdata = src_q;
      8'h04: cfg_rdata = dst_q;
      8'h08: cfg_rdata = len_q;
      8'h0C: cfg_rdata = sstr_q;
      8'h10: cfg_rdata = dstr_q;
      8'h14: cfg_rdata = reps_q;
      8'h1C: cfg_rdata = {30'd0, done_q, busy_o};
      default: cfg_rdata = '0;
    endcase
  end

  // Current beat addresses: external side is the source when dir = 0.
  always_comb begin
    ext_addr  = dir_q ? row_dst_q + off_q : row_src_q + off_q;
    tc_addr   = dir_q ? row_src_q + off_q : row_dst_q + off_q;
    beat_last = (off_q + 32'd8 >= len_q);
    row_last  = (rep_q + 32'd1 >= reps_q);
  end

  always_comb begin
    ext_req_o.req   = (state_q == S_EXT_REQ);
    ext_req_o.addr  = ext_addr;
    ext_req_o.we    = dir_q;
    ext_req_o.be    = 8'hFF;
    ext_req_o.wdata = buf_q;
    for (int p = 0; p < 2; p++) begin
      tcdm_req_o[p].req   = (state_q == S_TCDM_REQ) && !tc_gnt_q[p];
      tcdm_req_o[p].addr  = tc_addr + 32'(4*p);
      tcdm_req_o[p].we    = !dir_q;
      tcdm_req_o[p].be    = 4'hF;
      tcdm_req_o[p].wdata = buf_q[32*p +: 32];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      {src_q, dst_q, len_q, sstr_q, dstr_q, reps_q} <= '0;
      {row_src_q, row_dst_q, off_q, rep_q} <= '0;
      dir_q <= 1'b0; done_q <= 1'b0; buf_q <= '0;
      tc_gnt_q <= '0; tc_rv_q <= '0;
      cfg_rvalid_q <= 1'b0; cfg_rdata_q <= '0;
    end else begin
      cfg_rvalid_q <= cfg_gnt;
      if (cfg_gnt && !cfg_req_i.we) cfg_rdata_q <= cfg_rdata;
      if (cfg_gnt && cfg_req_i.we) begin
        unique case (off)
          8'h00: src_q  <= cfg_req_i.wdata;
          8'h04: dst_q  <= cfg_req_i.wdata;
          8'h08: len_q  <= cfg_req_i.wdata;
          8'h0C: sstr_q <= cfg_req_i.wdata;
          8'h10: dstr_q <= cfg_req_i.wdata;
          8'h14: reps_q <= cfg_req_i.wdata;
          8'h1C: if (cfg_req_i.wdata[1]) done_q <= 1'b0;
          default: ;
        endcase
        if (off == 8'h18) begin
          dir_q     <= cfg_req_i.wdata[0];
          row_src_q <= src_q;
          row_dst_q <= dst_q;
          off_q     <= '0;
          rep_q     <= '0;
          done_q    <= 1'b0;
          if (len_q != 0 && reps_q != 0)
            state_q <= cfg_req_i.wdata[0] ? S_TCDM_REQ : S_EXT_REQ;
          else
            done_q <= 1'b1;
        end
      end
      unique case (state_q)
        S_EXT_REQ: if (ext_rsp_i.gnt) state_q <= S_EXT_WAIT;
        S_EXT_WAIT: if (ext_rsp_i.rvalid) begin
          if (!dir_q) begin
            buf_q   <= ext_rsp_i.rdata;
            state_q <= S_TCDM_REQ;
          end else begin
            // beat written out: next beat
            state_q <= S_TCDM_REQ;
          end
        end
        S_TCDM_REQ: begin
          for (int p = 0; p < 2; p++) if (tcdm_req_o[p].req && tcdm_rsp_i[p].gnt) tc_gnt_q[p] <= 1'b1;
          if ((tc_gnt_q[0] || tcdm_rsp_i[0].gnt) && (tc_gnt_q[1] || tcdm_rsp_i[1].gnt))
            state_q <= S_TCDM_WAIT;
        end
        S_TCDM_WAIT: begin
          if ((tc_rv_q[0] || tcdm_rsp_i[0].rvalid) && (tc_rv_q[1] || tcdm_rsp_i[1].rvalid)) begin
            tc_gnt_q <= '0;
            tc_rv_q  <= '0;
            state_q  <= dir_q ? S_EXT_REQ : S_IDLE;
          end
        end
        default: ;
      endcase
      // TCDM answers can arrive while the other port still waits for its grant.
      if (state_q inside {S_TCDM_REQ, S_TCDM_WAIT}) begin
        for (int p = 0; p < 2; p++) if (tcdm_rsp_i[p].rvalid) begin
          tc_rv_q[p] <= 1'b1;
          if (dir_q) buf_q[32*p +: 32] <= tcdm_rsp_i[p].rdata;
        end
      end
      if (state_q == S_TCDM_WAIT && (tc_rv_q[0] || tcdm_rsp_i[0].rvalid) && (tc_rv_q[1] || tcdm_rsp_i[1].rvalid))
        tc_rv_q <= '0;
      // End of a beat: external write acknowledged (dir 1) or TCDM written (dir 0).
      if ((state_q == S_EXT_WAIT && ext_rsp_i.rvalid && dir_q) ||
          (state_q == S_TCDM_WAIT && !dir_q &&
           (tc_rv_q[0] || tcdm_rsp_i[0].rvalid) && (tc_rv_q[1] || tcdm_rsp_i[1].rvalid))) begin
        if (!beat_last) begin
          off_q   <= off_q + 32'd8;
          state_q <= dir_q ? S_TCDM_REQ : S_EXT_REQ;
        end else if (!row_last) begin
          off_q     <= '0;
          rep_q     <= rep_q + 32'd1;
          row_src_q <= row_src_q + sstr_q;
          row_dst_q <= row_dst_q + dstr_q;
          state_q   <= dir_q ? S_TCDM_REQ : S_EXT_REQ;
        end else begin
          state_q <= S_IDLE;
          done_q  <= 1'b1;
        end
      end
    end
  end

  assign cfg_rsp_o.gnt    = cfg_gnt;
  assign cfg_rsp_o.rvalid = cfg_rvalid_q;
  assign cfg_rsp_o.rdata  = cfg_rdata_q;
endmodule
