// ntx_regif: memory-mapped register interface of one NTX.
//
// The processor configures an operation through memory-mapped registers
// (byte offsets in ntx_pkg): loop bounds, AGU bases and strides form the
// command staging area and can be written at any time. Writing the CMD
// register copies the whole staging area plus the command word into a
// one-entry command slot, from which the controller takes it when it is
// idle. The processor can therefore stage and issue the next command while
// the current one runs. A CMD write that finds the slot still occupied is
// held off (gnt low) until the slot frees. Control/status/IRQ ("C/S/IRQ"):
// STATUS reads busy and slot-full, IRQ holds a done flag set by the
// controller's done pulse and cleared by writing 1; irq_o is the done flag
// masked by CTRL[0].
// Bus: req/gnt handshake, read data with rvalid one cycle after the grant;
// the offset is addr_i[7:0]. Writes are whole words (byte enables ignored).
// The register map and the single command slot are choices of this design.
module ntx_regif
  import ntx_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t bus_req_i,
  output tcdm_rsp_t bus_rsp_o,
  // to the controller
  output logic      issue_valid_o,
  output ntx_cfg_t  issue_cfg_o,
  input  logic      issue_ready_i,
  input  logic      busy_i,
  input  logic      done_i,
  output logic      irq_o
);
  ntx_cfg_t    stage_q, slot_q;
  logic        slot_full_q, irq_en_q, done_q;
  logic [7:0]  off;
  logic        is_cmd_wr, gnt;
  logic        rvalid_q;
  logic [31:0] rdata_q, rdata;

  assign off       = bus_req_i.addr[7:0];
  assign is_cmd_wr = bus_req_i.req && bus_req_i.we && (off == REG_CMD);
  assign gnt       = bus_req_i.req && !(is_cmd_wr && slot_full_q);

  always_comb begin
    rdata = '0;
    if (off == REG_STATUS) rdata = {30'd0, slot_full_q, busy_i};
    else if (off == REG_CTRL) rdata = {31'd0, irq_en_q};
    else if (off == REG_IRQ) rdata = {31'd0, done_q};
    else if (off == REG_CMD) rdata = 32'(stage_q.cmd);
    for (int k = 0; k < NUM_LOOPS; k++)
      if (off == REG_BOUND0 + 8'(4*k)) rdata = 32'(stage_q.bound[k]);
    for (int g = 0; g < NUM_AGUS; g++) begin
      if (off == REG_BASE0 + 8'(4*g)) rdata = stage_q.base[g];
      for (int k = 0; k < NUM_LOOPS; k++)
        if (off == REG_STRIDE0 + 8'(4*(NUM_LOOPS*g+k))) rdata = stage_q.stride[g][k];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      stage_q     <= '0;
      slot_q      <= '0;
      slot_full_q <= 1'b0;
      irq_en_q    <= 1'b0;
      done_q      <= 1'b0;
      rvalid_q    <= 1'b0;
      rdata_q     <= '0;
    end else begin
      rvalid_q <= gnt;
      if (gnt && !bus_req_i.we) rdata_q <= rdata;
      if (issue_valid_o && issue_ready_i) slot_full_q <= 1'b0;
      if (done_i) done_q <= 1'b1;
      if (gnt && bus_req_i.we) begin
        if (off == REG_CTRL) irq_en_q <= bus_req_i.wdata[0];
        if (off == REG_IRQ && bus_req_i.wdata[0]) done_q <= 1'b0;
        for (int k = 0; k < NUM_LOOPS; k++)
          if (off == REG_BOUND0 + 8'(4*k)) stage_q.bound[k] <= bus_req_i.wdata[LOOP_W-1:0];
        for (int g = 0; g < NUM_AGUS; g++) begin
          if (off == REG_BASE0 + 8'(4*g)) stage_q.base[g] <= bus_req_i.wdata;
          for (int k = 0; k < NUM_LOOPS; k++)
            if (off == REG_STRIDE0 + 8'(4*(NUM_LOOPS*g+k))) stage_q.stride[g][k] <= bus_req_i.wdata;
        end
        if (off == REG_CMD) begin
          stage_q.cmd      <= cmd_word_t'(bus_req_i.wdata[$bits(cmd_word_t)-1:0]);
          slot_q           <= stage_q;
          slot_q.cmd       <= cmd_word_t'(bus_req_i.wdata[$bits(cmd_word_t)-1:0]);
          slot_full_q      <= 1'b1;
        end
      end
    end
  end

  assign issue_valid_o    = slot_full_q;
  assign issue_cfg_o      = slot_q;
  assign bus_rsp_o.gnt    = gnt;
  assign bus_rsp_o.rvalid = rvalid_q;
  assign bus_rsp_o.rdata  = rdata_q;
  assign irq_o            = done_q && irq_en_q;
endmodule
