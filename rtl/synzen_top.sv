// synzen_top: the synZEN coprocessor, a control-driven dataflow processor.
//
// Instructions do not name operations on registers; they name data moves.
// Each instruction carries one branch operation and six transport operations,
// one per bus of the transport network. A transport operation connects one
// source port (the output of a unit) to one destination port (an operand
// input of a unit) for one cycle and carries control bits to both ends. The
// function units compute as soon as their operand registers are full, and
// put results into ring buffers on their outputs, from which later transports
// take them. Several hard-chaining links move results without using the
// network: backcoupling in every function unit, and direct coupling from the
// multiplier to ALU 0 and from ALU 0 to ALU 1.
//
// Units on the network (source / destination ports):
//   ALU 0, ALU 1, multiplier   1 source, 2 destinations each
//   register/constant unit     2 sources (register read, constant), 1 destination
//   branch unit (BPU)          2 destinations, driven by the instruction's branch field
//   load units 0..2            1 source, 2 destinations each (address, burst length)
//   store unit                 3 destinations (address, data, offset)
// giving 8 sources and 18 destinations, plus destination code 0 for an unused
// slot.
//
// Execution: an instruction in the instruction register completes (`issue`)
// in the first cycle in which all of its transports find their source valid
// and their destination ready and the branch unit has its operands; until
// then it stalls as a whole. The function, load and store units work on
// independently of the instruction stream.
//
// Interface: the main processor writes the instruction memory (`imem_*`),
// pulses `start` with a start address and waits for `done`, raised by a halt
// branch operation. Each load unit has a read port and the store unit a write
// port to data memory (request/grant, loads answered in order with
// `ld_rvalid`). `stall` is high in cycles in which an instruction waits;
// `err_illegal` flags a transport the network cannot carry.
//
// From the document: the unit mix and count, six buses, the port counts, the
// transport-operation format, the IR-controlled branch unit, the burst load
// units, constant storing and result sharing in every function unit, the two
// direct-coupling links. This design's own choices are listed in the header of
// each unit and in synzen_pkg (data width, encodings, connectivity pattern).
module synzen_top
  import synzen_pkg::*;
#(
  parameter int unsigned W        = DATA_W,
  parameter int unsigned RB_DEPTH_P = RB_DEPTH,
  parameter int unsigned AW       = IMEM_AW,
  parameter logic [N_SRC-1:0][N_BUS-1:0] SRC_CONN = SRC_CONN_DEF,
  parameter logic [N_DST-1:0][N_BUS-1:0] DST_CONN = DST_CONN_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  // main processor
  input  logic                imem_we,
  input  logic [AW-1:0]       imem_waddr,
  input  instr_t              imem_wdata,
  input  logic                start,
  input  logic [AW-1:0]       start_pc,
  output logic                done,
  // load units' memory ports
  output logic [2:0]          ld_req,
  output logic [2:0][W-1:0]   ld_addr,
  input  logic [2:0]          ld_gnt,
  input  logic [2:0]          ld_rvalid,
  input  logic [2:0][W-1:0]   ld_rdata,
  // store unit's memory port
  output logic                st_req,
  output logic [W-1:0]        st_addr,
  output logic [W-1:0]        st_wdata,
  input  logic                st_gnt,
  // status
  output logic                stall,
  output logic                err_illegal
);
  instr_t                        ir;
  logic                          ir_valid, issue, xfer_ok;
  logic [AW-1:0]                 pc;
  logic [N_SRC-1:0]              src_valid, src_rd;
  logic [N_SRC-1:0][W-1:0]       src_data;
  logic [N_SRC-1:0][CTRL_W-1:0]  src_ctrl;
  logic [N_DST-1:0]              dst_ready, dst_pend, dst_we;
  logic [N_DST-1:0][W-1:0]       dst_data;
  logic [N_DST-1:0][CTRL_W-1:0]  dst_ctrl;
  logic [N_BUS-1:0][W-1:0]       bus_data;
  logic [N_BUS-1:0]              bus_used;
  logic                          br_ok, br_taken, br_halt;
  logic [AW-1:0]                 br_target;

  // direct-coupling links
  logic mul_cpl_valid, alu0_cpl_valid, alu1_cpl_valid;
  logic [W-1:0] mul_cpl_data, alu0_cpl_data, alu1_cpl_data;
  logic alu0_cpl_accept, alu0_cpl_ready, alu1_cpl_accept, alu1_cpl_ready;
  logic mul_cpl_accept, mul_cpl_ready;
  logic [2:0] fu_fire, fu_bc, fu_share;

  assign issue = ir_valid && xfer_ok && br_ok;
  assign stall = ir_valid && !issue;

  // ------------------------------------------------------------- fetch
  instr_fetch #(.AW(AW)) u_fetch (
    .clk, .rst_n,
    .imem_we, .imem_waddr, .imem_wdata, .start, .start_pc, .done,
    .issue, .taken(br_taken), .target(br_target), .halt(br_halt),
    .ir, .ir_valid, .pc
  );

  // ----------------------------------------------------------- network
  xbar_net #(.W(W), .SRC_CONN(SRC_CONN), .DST_CONN(DST_CONN)) u_net (
    .tops(ir.tops), .active(ir_valid), .issue,
    .src_valid, .src_data, .dst_ready,
    .src_rd, .src_ctrl, .dst_pend, .dst_we, .dst_data, .dst_ctrl,
    .bus_data, .bus_used, .xfer_ok, .err_illegal
  );

  assign dst_ready[D_NONE] = 1'b1;

  // ------------------------------------------------------- branch unit
  bpu #(.W(W)) u_bpu (
    .clk, .rst_n,
    .br(ir.br), .active(ir_valid), .issue,
    .a_pend(dst_pend[D_BPU_A]), .a_data(dst_data[D_BPU_A]), .a_ctrl(dst_ctrl[D_BPU_A]),
    .a_ready(dst_ready[D_BPU_A]),
    .b_pend(dst_pend[D_BPU_B]), .b_data(dst_data[D_BPU_B]), .b_ctrl(dst_ctrl[D_BPU_B]),
    .b_ready(dst_ready[D_BPU_B]),
    .ok(br_ok), .taken(br_taken), .target(br_target), .halt(br_halt)
  );

  // ---------------------------------------------------- function units
  func_unit #(.IS_MUL(1'b0), .HAS_CPL_IN(1'b1), .W(W), .DEPTH(RB_DEPTH_P)) u_alu0 (
    .clk, .rst_n,
    .a_we(dst_we[D_ALU0_A]), .a_data(dst_data[D_ALU0_A]), .a_ctrl(dst_ctrl[D_ALU0_A]),
    .a_ready(dst_ready[D_ALU0_A]),
    .b_we(dst_we[D_ALU0_B]), .b_data(dst_data[D_ALU0_B]), .b_ctrl(dst_ctrl[D_ALU0_B]),
    .b_ready(dst_ready[D_ALU0_B]),
    .src_valid(src_valid[S_ALU0]), .src_data(src_data[S_ALU0]),
    .src_rd(src_rd[S_ALU0]), .src_release(src_ctrl[S_ALU0][SCTL_RELEASE]),
    .cpl_out_en(alu1_cpl_accept), .cpl_out_ready(alu1_cpl_ready),
    .cpl_out_valid(alu0_cpl_valid), .cpl_out_data(alu0_cpl_data),
    .cpl_in_accept(alu0_cpl_accept), .cpl_in_ready(alu0_cpl_ready),
    .cpl_in_valid(mul_cpl_valid), .cpl_in_data(mul_cpl_data),
    .fire(fu_fire[0]), .backcoupled(fu_bc[0]), .sharing(fu_share[0])
  );

  func_unit #(.IS_MUL(1'b0), .HAS_CPL_IN(1'b1), .W(W), .DEPTH(RB_DEPTH_P)) u_alu1 (
    .clk, .rst_n,
    .a_we(dst_we[D_ALU1_A]), .a_data(dst_data[D_ALU1_A]), .a_ctrl(dst_ctrl[D_ALU1_A]),
    .a_ready(dst_ready[D_ALU1_A]),
    .b_we(dst_we[D_ALU1_B]), .b_data(dst_data[D_ALU1_B]), .b_ctrl(dst_ctrl[D_ALU1_B]),
    .b_ready(dst_ready[D_ALU1_B]),
    .src_valid(src_valid[S_ALU1]), .src_data(src_data[S_ALU1]),
    .src_rd(src_rd[S_ALU1]), .src_release(src_ctrl[S_ALU1][SCTL_RELEASE]),
    .cpl_out_en(1'b0), .cpl_out_ready(1'b0),
    .cpl_out_valid(alu1_cpl_valid), .cpl_out_data(alu1_cpl_data),
    .cpl_in_accept(alu1_cpl_accept), .cpl_in_ready(alu1_cpl_ready),
    .cpl_in_valid(alu0_cpl_valid), .cpl_in_data(alu0_cpl_data),
    .fire(fu_fire[1]), .backcoupled(fu_bc[1]), .sharing(fu_share[1])
  );

  func_unit #(.IS_MUL(1'b1), .HAS_CPL_IN(1'b0), .W(W), .DEPTH(RB_DEPTH_P)) u_mul (
    .clk, .rst_n,
    .a_we(dst_we[D_MUL_A]), .a_data(dst_data[D_MUL_A]), .a_ctrl(dst_ctrl[D_MUL_A]),
    .a_ready(dst_ready[D_MUL_A]),
    .b_we(dst_we[D_MUL_B]), .b_data(dst_data[D_MUL_B]), .b_ctrl(dst_ctrl[D_MUL_B]),
    .b_ready(dst_ready[D_MUL_B]),
    .src_valid(src_valid[S_MUL]), .src_data(src_data[S_MUL]),
    .src_rd(src_rd[S_MUL]), .src_release(src_ctrl[S_MUL][SCTL_RELEASE]),
    .cpl_out_en(alu0_cpl_accept), .cpl_out_ready(alu0_cpl_ready),
    .cpl_out_valid(mul_cpl_valid), .cpl_out_data(mul_cpl_data),
    .cpl_in_accept(mul_cpl_accept), .cpl_in_ready(mul_cpl_ready),
    .cpl_in_valid(1'b0), .cpl_in_data('0),
    .fire(fu_fire[2]), .backcoupled(fu_bc[2]), .sharing(fu_share[2])
  );

  // ------------------------------------------- register / constant unit
  regconst_unit #(.W(W)) u_rc (
    .clk, .rst_n,
    .wr_we(dst_we[D_REG_W]), .wr_idx(dst_ctrl[D_REG_W]), .wr_data(dst_data[D_REG_W]),
    .rd_idx(src_ctrl[S_REG]), .rd_data(src_data[S_REG]),
    .const_ctrl(src_ctrl[S_CONST]), .const_data(src_data[S_CONST])
  );
  assign src_valid[S_REG]   = 1'b1;
  assign src_valid[S_CONST] = 1'b1;
  assign dst_ready[D_REG_W] = 1'b1;

  // -------------------------------------------------------- load units
  localparam dst_e LD_A [3] = '{D_LD0_A, D_LD1_A, D_LD2_A};
  localparam dst_e LD_B [3] = '{D_LD0_B, D_LD1_B, D_LD2_B};
  localparam src_e LD_S [3] = '{S_LD0, S_LD1, S_LD2};

  for (genvar i = 0; i < 3; i++) begin : g_ld
    load_unit #(.W(W), .DEPTH(RB_DEPTH_P)) u_ld (
      .clk, .rst_n,
      .a_we(dst_we[LD_A[i]]), .a_data(dst_data[LD_A[i]]), .a_ctrl(dst_ctrl[LD_A[i]]),
      .a_ready(dst_ready[LD_A[i]]),
      .b_we(dst_we[LD_B[i]]), .b_data(dst_data[LD_B[i]]), .b_ctrl(dst_ctrl[LD_B[i]]),
      .b_ready(dst_ready[LD_B[i]]),
      .src_valid(src_valid[LD_S[i]]), .src_data(src_data[LD_S[i]]), .src_rd(src_rd[LD_S[i]]),
      .mem_req(ld_req[i]), .mem_addr(ld_addr[i]), .mem_gnt(ld_gnt[i]),
      .mem_rvalid(ld_rvalid[i]), .mem_rdata(ld_rdata[i]),
      .start(), .busy()
    );
  end

  // -------------------------------------------------------- store unit
  store_unit #(.W(W)) u_st (
    .clk, .rst_n,
    .a_we(dst_we[D_ST_A]), .a_data(dst_data[D_ST_A]), .a_ctrl(dst_ctrl[D_ST_A]),
    .a_ready(dst_ready[D_ST_A]),
    .b_we(dst_we[D_ST_B]), .b_data(dst_data[D_ST_B]), .b_ctrl(dst_ctrl[D_ST_B]),
    .b_ready(dst_ready[D_ST_B]),
    .c_we(dst_we[D_ST_C]), .c_data(dst_data[D_ST_C]), .c_ctrl(dst_ctrl[D_ST_C]),
    .c_ready(dst_ready[D_ST_C]),
    .mem_req(st_req), .mem_addr(st_addr), .mem_wdata(st_wdata), .mem_gnt(st_gnt)
  );

  // The branch field and the transports must agree with the network.
  a_no_illegal : assert property (@(posedge clk) disable iff (!rst_n) !err_illegal)
    else $error("transport operation not executable on its bus");

endmodule
