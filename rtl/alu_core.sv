// alu_core: arithmetic and logic datapath of a synZEN ALU function unit.
//
// A dyadic operation: two operands in, one result out, combinational. The
// operation comes with operand A's transport (three bits of its control
// field). The document names the ALU and says it performs dyadic operations;
// the operation set (add, subtract, and, or, xor and three shifts, shift
// amount from the low five bits of B) is this design's own choice.
module alu_core
  import synzen_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int unsigned SHW = $clog2(W);
  logic [SHW-1:0] sh;
  assign sh = b[SHW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR : y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLL: y = a << sh;
      ALU_SRL: y = a >> sh;
      ALU_SRA: y = W'($signed(a) >>> sh);
      default: y = a + b;
    endcase
  end
endmodule
