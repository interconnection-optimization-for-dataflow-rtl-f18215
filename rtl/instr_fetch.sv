// instr_fetch: program counter, instruction memory and instruction register
// of the synZEN coprocessor.
//
// The instruction memory is filled by the main processor through a write
// port. A `start` pulse loads the program counter with `start_pc` and fetches
// that instruction into the instruction register; from then on, every time
// the executing instruction completes (`issue`), the next instruction is
// fetched: the branch target if the branch unit reports `taken`, otherwise the
// following word. A stalled instruction stays in the register. A `halt`
// instruction stops fetching and raises `done` until the next start.
//
// Timing: the memory is read synchronously with the address of the next
// instruction, so a completing instruction is followed by its successor, or
// by the branch target, in the next cycle, and a branch costs no extra cycle.
// `pc` is the address of the instruction in the register.
//
// From the document: program counter, instruction memory controlled by the
// main processor, instruction register holding the branch operation and the
// transport operations. This design's own choices: the memory depth, the
// synchronous read and the start/halt/done handshake with the main
// processor.
module instr_fetch
  import synzen_pkg::*;
#(
  parameter int unsigned AW = IMEM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // main-processor side
  input  logic          imem_we,
  input  logic [AW-1:0] imem_waddr,
  input  instr_t        imem_wdata,
  input  logic          start,
  input  logic [AW-1:0] start_pc,
  output logic          done,
  // execute side
  input  logic          issue,
  input  logic          taken,
  input  logic [AW-1:0] target,
  input  logic          halt,
  output instr_t        ir,
  output logic          ir_valid,
  output logic [AW-1:0] pc
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [INSTR_W-1:0] mem [DEPTH];
  logic [AW-1:0]      pc_q, next_pc, rd_addr;
  logic               rd_en, valid_q, done_q;
  instr_t             ir_q;

  assign next_pc  = taken ? target : pc_q + 1'b1;
  assign rd_addr  = start ? start_pc : next_pc;
  assign rd_en    = start || (valid_q && issue && !halt);
  assign ir       = ir_q;
  assign ir_valid = valid_q;
  assign pc       = pc_q;
  assign done     = done_q;

  always_ff @(posedge clk) begin
    if (imem_we) mem[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0; ir_q <= '0; valid_q <= 1'b0; done_q <= 1'b0;
    end else if (rd_en) begin
      pc_q    <= rd_addr;
      ir_q    <= instr_t'(mem[rd_addr]);
      valid_q <= 1'b1;
      if (start) done_q <= 1'b0;
    end else if (valid_q && issue && halt) begin
      valid_q <= 1'b0;
      ir_q    <= '0;
      done_q  <= 1'b1;
    end
  end
endmodule
