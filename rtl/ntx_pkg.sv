// ntx_pkg: types and constants shared by the NTX coprocessor and its cluster.
//
// The loop, counter and address sizes (5 nested loops, 16-bit loop counters,
// 32-bit address registers, 3 address generators, 8 NTX per cluster,
// 128 kB TCDM in 32 banks, 32-bit TCDM ports, 64-bit SoC port) follow the
// architecture description. The register map, the command word layout, the
// opcode encoding and the cluster address map are choices of this design.
package ntx_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_LOOPS = 5;   // nested hardware loops L0..L4
  localparam int unsigned LOOP_W    = 16;  // loop counter width
  localparam int unsigned NUM_AGUS  = 3;   // AGU0/AGU1 read, AGU2 write
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned LEVEL_W   = 3;   // loop level 0..5

  // ------------------------------------------------ TCDM-style bus bundle
  // Request/grant handshake: a request is taken in the cycle where req and
  // gnt are both high; read data comes back with rvalid one cycle later.
  typedef struct packed {
    logic              req;
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [3:0]        be;
    logic [DATA_W-1:0] wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } tcdm_rsp_t;

  // Same handshake, 64 bits wide, for the port towards the SoC interconnect.
  typedef struct packed {
    logic              req;
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [7:0]        be;
    logic [63:0]       wdata;
  } ext_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [63:0] rdata;
  } ext_rsp_t;

  // 256-bit master port of the SoC interconnect towards the memory cube's
  // main interconnect. Same request/grant handshake; the answer (rvalid,
  // also for writes) may come any number of cycles after the grant, in
  // request order.
  typedef struct packed {
    logic              req;
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [31:0]       be;
    logic [255:0]      wdata;
  } lob_req_t;

  typedef struct packed {
    logic         gnt;
    logic         rvalid;
    logic [255:0] rdata;
  } lob_rsp_t;

  // ------------------------------------------------------------ opcodes
  // Operation performed in the loop body, x = f(x, a, b).
  typedef enum logic [3:0] {
    OP_MAC    = 4'd0,  // x += a*b        a=*AGU0 b=*AGU1
    OP_NMAC   = 4'd1,  // x -= a*b        a=*AGU0 b=*AGU1
    OP_ADD    = 4'd2,  // x += a          a=*AGU0 b=1.0
    OP_SUB    = 4'd3,  // x -= a          a=*AGU0 b=1.0
    OP_MAX    = 4'd4,  // x = max(x, a)   a=*AGU0
    OP_MIN    = 4'd5,  // x = min(x, a)   a=*AGU0
    OP_ARGMAX = 4'd6,  // index of max(a) a=*AGU0
    OP_ARGMIN = 4'd7   // index of min(a) a=*AGU0
  } opcode_e;

  // Source of operand a: *AGU0 | *AGU1 | *AGU2 | none.
  typedef enum logic [1:0] {ASRC_AGU0, ASRC_AGU1, ASRC_AGU2, ASRC_NONE} asrc_e;
  // Source of operand b: *AGU1 | 0.0 | 1.0 | none.
  typedef enum logic [1:0] {BSRC_AGU1, BSRC_ZERO, BSRC_ONE, BSRC_NONE} bsrc_e;
  // Source of the accumulator initial value: *AGU0 | *AGU1 | *AGU2 | 0.0.
  typedef enum logic [1:0] {ISRC_AGU0, ISRC_AGU1, ISRC_AGU2, ISRC_ZERO} isrc_e;

  // Datapath function selected by the opcode LUT.
  typedef enum logic [2:0] {
    FN_MAC, FN_NMAC, FN_MAX, FN_MIN, FN_ARGMAX, FN_ARGMIN
  } fpu_fn_e;

  // Command word written to the CMD register.
  typedef struct packed {
    asrc_e       a_src;        // [17:16] operand a: *AGU0 | *AGU1 | *AGU2,
                               //         3 = the opcode's default (*AGU0)
    logic        relu;         // [15]    apply ReLU on writeback
    isrc_e       init_src;     // [14:13]
    logic [2:0]  outer_level;  // [12:10] number of active loops, 1..5
    logic [2:0]  store_level;  // [9:7]
    logic [2:0]  init_level;   // [6:4]
    opcode_e     opcode;       // [3:0]
  } cmd_word_t;

  // A complete offloaded loop nest, as staged by the processor.
  typedef struct packed {
    cmd_word_t                                      cmd;
    logic [NUM_LOOPS-1:0][LOOP_W-1:0]               bound;   // last index per loop
    logic [NUM_AGUS-1:0][ADDR_W-1:0]                base;
    logic [NUM_AGUS-1:0][NUM_LOOPS-1:0][ADDR_W-1:0] stride;
  } ntx_cfg_t;

  // Micro-command from the controller to the FPU (through the command FIFO).
  typedef struct packed {
    logic    init;       // initialise x before the body
    logic    init_mem;   // initial value is the next RD0 word (an INIT slot)
    logic    body;       // execute x = f(x,a,b)
    logic    a_mem;      // a comes from RD0
    logic    b_mem;      // b comes from RD1
    bsrc_e   b_src;
    logic    store;      // write x back after the body
    logic    relu;
    fpu_fn_e fn;
  } ucmd_t;

  // Opcode LUT: opcode -> datapath function and operand sources.
  typedef struct packed {
    fpu_fn_e fn;
    asrc_e   a_src;
    bsrc_e   b_src;
  } op_lut_t;

  function automatic op_lut_t op_lut(opcode_e op);
    op_lut_t r;
    unique case (op)
      OP_MAC:    r = '{FN_MAC,    ASRC_AGU0, BSRC_AGU1};
      OP_NMAC:   r = '{FN_NMAC,   ASRC_AGU0, BSRC_AGU1};
      OP_ADD:    r = '{FN_MAC,    ASRC_AGU0, BSRC_ONE};
      OP_SUB:    r = '{FN_NMAC,   ASRC_AGU0, BSRC_ONE};
      OP_MAX:    r = '{FN_MAX,    ASRC_AGU0, BSRC_NONE};
      OP_MIN:    r = '{FN_MIN,    ASRC_AGU0, BSRC_NONE};
      OP_ARGMAX: r = '{FN_ARGMAX, ASRC_AGU0, BSRC_NONE};
      OP_ARGMIN: r = '{FN_ARGMIN, ASRC_AGU0, BSRC_NONE};
      default:   r = '{FN_MAC,    ASRC_AGU0, BSRC_AGU1};
    endcase
    return r;
  endfunction

  // ------------------------------------------- NTX register map (bytes)
  localparam logic [7:0] REG_STATUS  = 8'h00; // RO: [0] busy [1] staging full
  localparam logic [7:0] REG_CTRL    = 8'h04; // [0] irq enable
  localparam logic [7:0] REG_IRQ     = 8'h08; // [0] done flag, write 1 to clear
  localparam logic [7:0] REG_BOUND0  = 8'h10; // 0x10..0x20: last index of L0..L4
  localparam logic [7:0] REG_BASE0   = 8'h30; // 0x30..0x38: AGU0..2 base
  localparam logic [7:0] REG_STRIDE0 = 8'h40; // 0x40..0x78: AGUk loop j at 0x40+4*(5k+j)
  localparam logic [7:0] REG_CMD     = 8'h80; // write: issue command (cmd_word_t)

  // ------------------------------------------- cluster address map
  localparam logic [ADDR_W-1:0] TCDM_BASE   = 32'h1000_0000; // 128 kB
  localparam logic [ADDR_W-1:0] PERIPH_BASE = 32'h1020_0000;
  // NTX k registers at PERIPH_BASE + k*0x100; DMA registers at PERIPH_BASE + 0x1000.
  localparam logic [ADDR_W-1:0] DMA_OFFSET  = 32'h0000_1000;
  // SoC level: the shared L2 memory; every other address outside the
  // clusters goes to the memory cube.
  localparam logic [ADDR_W-1:0] L2_BASE     = 32'h1C00_0000;

  // ------------------------------------------- float helpers
  // Maps a float32 bit pattern to a key whose unsigned order is the
  // numeric order (-0 sorts just below +0).
  function automatic logic [31:0] float_key(logic [31:0] f);
    return f[31] ? ~f : (f | 32'h8000_0000);
  endfunction

endpackage
