// synzen_pkg: types and constants shared by the synZEN coprocessor.
//
// synZEN is a control-driven dataflow processor. Every instruction holds one
// branch operation and one transport operation per bus. A transport operation
// names one source port and one destination port of the units hanging on the
// transport network and carries four control bits for each of them.
//
// Taken from the document: six buses, 8 source ports, 19 destination codes,
// a 16-bit transport operation split into a 5-bit destination address, 4
// destination control bits, a 3-bit source address and 4 source control bits
// (in that order, most significant first), a 16-entry register file.
// This design's own choices: the 32-bit data width, the order of the port
// numbers (left to right as the units are drawn), code 0 as the "no transport"
// destination, the meaning of every control bit, the branch-operation format
// and the instruction-memory depth.
package synzen_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W    = 32;  // data word width
  localparam int unsigned N_BUS     = 6;   // transport buses = transport slots
  localparam int unsigned N_SRC     = 8;   // source ports
  localparam int unsigned N_DST     = 19;  // destination codes incl. code 0 (none)
  localparam int unsigned DADDR_W   = 5;
  localparam int unsigned SADDR_W   = 3;
  localparam int unsigned CTRL_W    = 4;
  localparam int unsigned TOP_W     = DADDR_W + CTRL_W + SADDR_W + CTRL_W; // 16
  localparam int unsigned N_REGS    = 16;
  localparam int unsigned IMEM_AW   = 8;   // instruction memory: 256 words
  localparam int unsigned RB_DEPTH  = 4;   // ring buffer entries

  // ---------------------------------------------------------- source ports
  typedef enum logic [SADDR_W-1:0] {
    S_ALU0  = 3'd0,
    S_ALU1  = 3'd1,
    S_MUL   = 3'd2,
    S_REG   = 3'd3,   // register file read, ctrl = register number
    S_CONST = 3'd4,   // constant source, ctrl = signed 4-bit constant
    S_LD0   = 3'd5,
    S_LD1   = 3'd6,
    S_LD2   = 3'd7
  } src_e;

  // ----------------------------------------------------- destination ports
  typedef enum logic [DADDR_W-1:0] {
    D_NONE  = 5'd0,   // unused transport slot
    D_BPU_A = 5'd1,
    D_BPU_B = 5'd2,
    D_ALU0_A = 5'd3,
    D_ALU0_B = 5'd4,
    D_ALU1_A = 5'd5,
    D_ALU1_B = 5'd6,
    D_MUL_A = 5'd7,
    D_MUL_B = 5'd8,
    D_REG_W = 5'd9,   // register file write, ctrl = register number
    D_LD0_A = 5'd10,
    D_LD0_B = 5'd11,
    D_LD1_A = 5'd12,
    D_LD1_B = 5'd13,
    D_LD2_A = 5'd14,
    D_LD2_B = 5'd15,
    D_ST_A  = 5'd16,
    D_ST_B  = 5'd17,
    D_ST_C  = 5'd18
  } dst_e;


  // ---------------------------------------------- network connectivity
  // Bit b of an entry: the port has a switch on bus b. The network is not
  // fully connected; ports of units used more often, or of units with a
  // single instance, sit on more buses. Entry order follows src_e / dst_e.
  localparam logic [N_BUS-1:0] BUS_ALL = 6'b111111;
  localparam logic [N_BUS-1:0] BUS_LO4 = 6'b001111;  // buses 0..3
  localparam logic [N_BUS-1:0] BUS_HI4 = 6'b111100;  // buses 2..5
  localparam logic [N_BUS-1:0] BUS_OUT = 6'b110011;  // buses 0,1,4,5
  localparam logic [N_BUS-1:0] BUS_HI3 = 6'b111000;  // buses 3..5

  localparam logic [N_SRC-1:0][N_BUS-1:0] SRC_CONN_DEF = {
    BUS_OUT,  // S_LD2
    BUS_HI4,  // S_LD1
    BUS_LO4,  // S_LD0
    BUS_ALL,  // S_CONST
    BUS_ALL,  // S_REG
    BUS_ALL,  // S_MUL
    BUS_ALL,  // S_ALU1
    BUS_ALL   // S_ALU0
  };

  localparam logic [N_DST-1:0][N_BUS-1:0] DST_CONN_DEF = {
    BUS_ALL, BUS_ALL, BUS_ALL,  // D_ST_C, D_ST_B, D_ST_A
    BUS_OUT, BUS_OUT,           // D_LD2_B, D_LD2_A
    BUS_HI4, BUS_HI4,           // D_LD1_B, D_LD1_A
    BUS_LO4, BUS_LO4,           // D_LD0_B, D_LD0_A
    BUS_ALL,                    // D_REG_W
    BUS_ALL, BUS_ALL,           // D_MUL_B, D_MUL_A
    BUS_HI4, BUS_HI4,           // D_ALU1_B, D_ALU1_A
    BUS_LO4, BUS_LO4,           // D_ALU0_B, D_ALU0_A
    BUS_HI3, BUS_HI3,           // D_BPU_B, D_BPU_A
    BUS_ALL                     // D_NONE
  };

  // --------------------------------------------------- transport operation
  typedef struct packed {
    logic [DADDR_W-1:0] dst;
    logic [CTRL_W-1:0]  dctrl;
    logic [SADDR_W-1:0] src;
    logic [CTRL_W-1:0]  sctrl;
  } top_t;

  // Destination control bit 3 on every operand port: keep the operand after
  // use (constant storing).
  localparam int unsigned CTL_STICKY = 3;

  // Function-unit operand A, ctrl[2:0]: operation.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR  = 3'd3,
    ALU_XOR = 3'd4, ALU_SLL = 3'd5, ALU_SRL = 3'd6, ALU_SRA = 3'd7
  } alu_op_e;

  typedef enum logic [2:0] {
    MUL_LO = 3'd0, MUL_HS = 3'd1, MUL_HU = 3'd2, MUL_HSU = 3'd3
  } mul_op_e;

  // Function-unit operand B, ctrl[2:0]: hard-chaining command, applied when
  // the operand is written.
  typedef enum logic [2:0] {
    CH_NONE      = 3'd0,
    CH_BACK      = 3'd1,  // set operand backcoupling (result -> own operand A)
    CH_CPL       = 3'd2,  // accept direct-coupled results into operand B
    CH_BACK_CPL  = 3'd3,  // both: multiply-accumulate chain
    CH_SHARE     = 3'd4,  // mark produced results as shared in the ring buffer
    CH_UNSHARE   = 3'd5,
    CH_ANNUL     = 3'd6,  // clear backcoupling, coupling, sharing, sticky A
    CH_RSVD      = 3'd7
  } chain_cmd_e;

  // Source control bit 0 on a ring-buffer source: release a shared entry.
  localparam int unsigned SCTL_RELEASE = 0;

  // Load unit operand A, ctrl[0]: single load, no burst length needed.
  localparam int unsigned LCTL_SINGLE = 0;

  // ------------------------------------------------------ branch operation
  typedef enum logic [3:0] {
    BR_NONE    = 4'd0,
    BR_ALWAYS  = 4'd1,
    BR_EQ      = 4'd2,
    BR_NE      = 4'd3,
    BR_LT      = 4'd4,   // signed A < B
    BR_GE      = 4'd5,   // signed A >= B
    BR_LTU     = 4'd6,
    BR_GEU     = 4'd7,
    BR_SETADDR = 4'd8,   // store operand A as the dynamic branch address
    BR_HALT    = 4'd15   // stop fetching, report done
  } br_cond_e;

  typedef struct packed {
    br_cond_e             cond;
    logic                 dyn;     // 1: target is the stored dynamic address
    logic [IMEM_AW-1:0]   target;  // static target
  } brop_t;

  localparam int unsigned BROP_W  = $bits(brop_t);
  localparam int unsigned INSTR_W = BROP_W + N_BUS * TOP_W;

  // Instruction: branch operation, then the transport slots; slot i uses bus i.
  typedef struct packed {
    brop_t            br;
    top_t [N_BUS-1:0] tops;
  } instr_t;

endpackage
