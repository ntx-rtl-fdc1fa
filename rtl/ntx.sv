// ntx: one NTX coprocessor (network training accelerator).
//
// A processor writes a loop nest of up to five levels into the register
// interface (ntx_regif) and issues it. The controller (ntx_controller)
// walks the nest with its hardware loops and three address generators and
// queues micro-commands into the 5-entry command FIFO and addresses into
// the stream FIFOs of the interleaver (ntx_interleaver). The FPU (ntx_fpu)
// executes one micro-command per cycle on the data that arrives through
// the two TCDM master ports and sends results back through the store
// FIFOs. Once started, the NTX needs no further control; done raises the
// interrupt when enabled.
// Interface: reg_req_i/reg_rsp_o is the 32-bit slave port for the
// configuration registers; tcdm_req_o/tcdm_rsp_i are the two 32-bit TCDM
// master ports; irq_o is the completion interrupt; busy_o is high from the
// issue of a command until its last result is written.
// Timing: everything runs on one clock. In the architecture the register
// interface runs at half the coprocessor clock (750 MHz against 1.5 GHz);
// here both share clk_i.
module ntx
  import ntx_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 5,
  parameter int unsigned RA_DEPTH  = 5,
  parameter int unsigned RD_DEPTH  = 5,
  parameter int unsigned ST_DEPTH  = 7,
  parameter int unsigned ACC_W     = 300
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  tcdm_req_t       reg_req_i,
  output tcdm_rsp_t       reg_rsp_o,
  output tcdm_req_t [1:0] tcdm_req_o,
  input  tcdm_rsp_t [1:0] tcdm_rsp_i,
  output logic            irq_o,
  output logic            busy_o
);
  logic     issue_valid, issue_ready, ctrl_busy, ctrl_done, dp_idle;
  ntx_cfg_t issue_cfg;

  logic  ucmd_push, ucmd_full, ucmd_empty, ucmd_pop, fpu_idle, il_idle;
  ucmd_t ucmd_in, ucmd_head;

  logic              ra0_push, ra0_full, ra1_push, ra1_full, sa_push, sa_full;
  logic [ADDR_W-1:0] ra0, ra1, sa;
  logic              std_push;
  logic [31:0]       std_data, rd0, rd1;
  logic [$clog2(ST_DEPTH+1)-1:0] std_count;
  logic              rd0_valid, rd1_valid, rd0_pop, rd1_pop;

  ntx_regif i_regif (
    .clk_i, .rst_ni, .bus_req_i(reg_req_i), .bus_rsp_o(reg_rsp_o),
    .issue_valid_o(issue_valid), .issue_cfg_o(issue_cfg), .issue_ready_i(issue_ready),
    .busy_i(busy_o), .done_i(ctrl_done), .irq_o
  );

  ntx_controller i_ctrl (
    .clk_i, .rst_ni, .start_i(issue_valid), .cfg_i(issue_cfg), .ready_o(issue_ready),
    .busy_o(ctrl_busy), .done_o(ctrl_done), .dp_idle_i(dp_idle),
    .ucmd_push_o(ucmd_push), .ucmd_o(ucmd_in), .ucmd_full_i(ucmd_full),
    .ra0_push_o(ra0_push), .ra0_o(ra0), .ra0_full_i(ra0_full),
    .ra1_push_o(ra1_push), .ra1_o(ra1), .ra1_full_i(ra1_full),
    .sa_push_o(sa_push), .sa_o(sa), .sa_full_i(sa_full)
  );

  ntx_fifo #(.WIDTH($bits(ucmd_t)), .DEPTH(CMD_DEPTH)) i_cmd_fifo (
    .clk_i, .rst_ni, .push_i(ucmd_push), .data_i(ucmd_in), .pop_i(ucmd_pop),
    .data_o(ucmd_head), .full_o(ucmd_full), .empty_o(ucmd_empty), .count_o()
  );

  ntx_fpu #(.STD_DEPTH(ST_DEPTH), .ACC_W(ACC_W)) i_fpu (
    .clk_i, .rst_ni,
    .ucmd_i(ucmd_head), .ucmd_valid_i(!ucmd_empty), .ucmd_pop_o(ucmd_pop),
    .rd0_i(rd0), .rd0_valid_i(rd0_valid), .rd0_pop_o(rd0_pop),
    .rd1_i(rd1), .rd1_valid_i(rd1_valid), .rd1_pop_o(rd1_pop),
    .std_count_i(std_count), .std_push_o(std_push), .std_data_o(std_data),
    .idle_o(fpu_idle)
  );

  ntx_interleaver #(.RA_DEPTH(RA_DEPTH), .RD_DEPTH(RD_DEPTH), .ST_DEPTH(ST_DEPTH)) i_il (
    .clk_i, .rst_ni,
    .ra0_push_i(ra0_push), .ra0_i(ra0), .ra0_full_o(ra0_full),
    .ra1_push_i(ra1_push), .ra1_i(ra1), .ra1_full_o(ra1_full),
    .sa_push_i(sa_push), .sa_i(sa), .sa_full_o(sa_full),
    .std_push_i(std_push), .std_i(std_data), .std_count_o(std_count),
    .rd0_pop_i(rd0_pop), .rd0_o(rd0), .rd0_valid_o(rd0_valid),
    .rd1_pop_i(rd1_pop), .rd1_o(rd1), .rd1_valid_o(rd1_valid),
    .port_req_o(tcdm_req_o), .port_rsp_i(tcdm_rsp_i), .idle_o(il_idle)
  );

  assign dp_idle = ucmd_empty && fpu_idle && il_idle && !ucmd_push;
  assign busy_o  = ctrl_busy || issue_valid;
endmodule
