// ntx_controller: sequencer of the NTX.
//
// Takes one offloaded loop nest (ntx_cfg_t) at a time into its command
// register, then walks the nest with the hardware loops (ntx_hwloop) and
// the three AGUs (ntx_agu), issuing per cycle one micro-command to the FPU
// command FIFO together with the addresses it needs:
//   - INIT slot: where all loops below the init level are at iteration 0
//     and the initial value comes from memory, an extra cycle reads it
//     through read port 0 from the AGU the command selects (the read-port-0
//     address mux, "also used for init"). An initial value of 0.0 needs no
//     slot and rides on the body micro-command.
//   - BODY: the operand addresses (a from the AGU named by the command's
//     a-source field, or by the opcode LUT by default, on read stream 0;
//     b from AGU1 on read stream 1). Where all loops
//     below the store level are at their last iteration, the current AGU2
//     address is queued as a store address and the micro-command carries
//     the store flag. After the body the loops and the AGUs step.
// Levels count from 0 (every innermost iteration) to outer_level (once per
// command), as in the loop-nest model of the architecture. A slot is only
// issued when every FIFO it pushes into has room, so the controller stalls
// on back-pressure. After the last body it waits until the datapath
// reports idle (all stores written), then pulses done_o.
// Interface: start_i with cfg_i when ready_o (idle); busy_o while running.
// Timing: with no stalls one body per cycle, plus one cycle per INIT slot.
module ntx_controller
  import ntx_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              start_i,
  input  ntx_cfg_t          cfg_i,
  output logic              ready_o,
  output logic              busy_o,
  output logic              done_o,
  input  logic              dp_idle_i,
  // micro-command FIFO
  output logic              ucmd_push_o,
  output ucmd_t             ucmd_o,
  input  logic              ucmd_full_i,
  // address streams
  output logic              ra0_push_o,
  output logic [ADDR_W-1:0] ra0_o,
  input  logic              ra0_full_i,
  output logic              ra1_push_o,
  output logic [ADDR_W-1:0] ra1_o,
  input  logic              ra1_full_i,
  output logic              sa_push_o,
  output logic [ADDR_W-1:0] sa_o,
  input  logic              sa_full_i
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e   state_q;
  ntx_cfg_t cfg_q;             // command register
  logic     init_done_q;

  op_lut_t                          lut;
  logic [LEVEL_W-1:0]               nl, il, sl, level;
  logic [NUM_LOOPS:0]               first, last;
  logic [NUM_LOOPS-1:0][LOOP_W-1:0] cnt;
  logic [NUM_AGUS-1:0][ADDR_W-1:0]  agu_addr;
  logic                             init_here, store_here, init_slot, a_mem, b_mem;
  logic                             can_go, step, load;

  always_comb begin
    lut = op_lut(cfg_q.cmd.opcode);
    if (cfg_q.cmd.a_src != ASRC_NONE) lut.a_src = cfg_q.cmd.a_src;
    nl  = (cfg_q.cmd.outer_level == 0) ? LEVEL_W'(1)
        : (cfg_q.cmd.outer_level > LEVEL_W'(NUM_LOOPS)) ? LEVEL_W'(NUM_LOOPS)
        : cfg_q.cmd.outer_level;
    il  = (cfg_q.cmd.init_level  > nl) ? nl : cfg_q.cmd.init_level;
    sl  = (cfg_q.cmd.store_level > nl) ? nl : cfg_q.cmd.store_level;
  end

  ntx_hwloop i_loops (
    .clk_i, .rst_ni, .clear_i(load), .step_i(step), .bound_i(cfg_q.bound),
    .num_loops_i(nl), .cnt_o(cnt), .level_o(level), .first_o(first), .last_o(last)
  );

  for (genvar g = 0; g < NUM_AGUS; g++) begin : gen_agu
    ntx_agu i_agu (
      .clk_i, .rst_ni, .load_i(load), .base_i(cfg_i.base[g]), .step_i(step),
      .level_i(level), .stride_i(cfg_q.stride[g]), .addr_o(agu_addr[g])
    );
  end

  // Init/LD/ST trigger.
  always_comb begin
    init_here  = first[il];
    store_here = last[sl];
    init_slot  = init_here && (cfg_q.cmd.init_src != ISRC_ZERO) && !init_done_q;
    a_mem      = (lut.a_src != ASRC_NONE);
    b_mem      = (lut.b_src == BSRC_AGU1);
    if (init_slot)
      can_go = !ucmd_full_i && !ra0_full_i;
    else
      can_go = !ucmd_full_i && (!a_mem || !ra0_full_i) && (!b_mem || !ra1_full_i)
             && (!store_here || !sa_full_i);
    can_go = can_go && (state_q == S_RUN);
    step   = can_go && !init_slot;
  end

  // Micro-command and addresses for this cycle.
  always_comb begin
    ucmd_o          = '0;
    ucmd_o.fn       = lut.fn;
    ucmd_o.b_src    = lut.b_src;
    ucmd_o.relu     = cfg_q.cmd.relu;
    ra0_o           = agu_addr[0];
    if (init_slot) begin
      ucmd_o.init     = 1'b1;
      ucmd_o.init_mem = 1'b1;
      unique case (cfg_q.cmd.init_src)
        ISRC_AGU1: ra0_o = agu_addr[1];
        ISRC_AGU2: ra0_o = agu_addr[2];
        default:   ra0_o = agu_addr[0];
      endcase
    end else begin
      ucmd_o.init  = init_here && (cfg_q.cmd.init_src == ISRC_ZERO);
      ucmd_o.body  = 1'b1;
      ucmd_o.a_mem = a_mem;
      ucmd_o.b_mem = b_mem;
      ucmd_o.store = store_here;
      unique case (lut.a_src)
        ASRC_AGU1: ra0_o = agu_addr[1];
        ASRC_AGU2: ra0_o = agu_addr[2];
        default:   ra0_o = agu_addr[0];
      endcase
    end
    ra1_o = agu_addr[1];
    sa_o  = agu_addr[2];
  end

  assign ucmd_push_o = can_go;
  assign ra0_push_o  = can_go && (init_slot || a_mem);
  assign ra1_push_o  = can_go && !init_slot && b_mem;
  assign sa_push_o   = can_go && !init_slot && store_here;

  // Sequencer FSM.
  assign ready_o = (state_q == S_IDLE);
  assign busy_o  = (state_q != S_IDLE);
  assign load    = start_i && ready_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      cfg_q       <= '0;
      init_done_q <= 1'b0;
      done_o      <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          cfg_q       <= cfg_i;
          init_done_q <= 1'b0;
          state_q     <= S_RUN;
        end
        S_RUN: begin
          if (can_go && init_slot) init_done_q <= 1'b1;
          if (step) begin
            init_done_q <= 1'b0;
            if (last[NUM_LOOPS]) state_q <= S_DRAIN;
          end
        end
        S_DRAIN: if (dp_idle_i) begin
          state_q <= S_IDLE;
          done_o  <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
