// mul_core: datapath of the synZEN multiplier function unit.
//
// Multiplies two W-bit operands and returns either the low half of the
// product or the high half, with both operands signed, both unsigned, or A
// signed and B unsigned. Combinational; the function unit around it
// registers the operands and buffers the result. The document names the
// multiplier and uses it for multiply-accumulate chains; the choice of
// product halves is this design's own.
module mul_core
  import synzen_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  mul_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic signed [2*W-1:0] pa, pb, prod;

  always_comb begin
    // Sign- or zero-extend to 2W bits; the 2W-bit product is then exact.
    pa = (op == MUL_HS || op == MUL_HSU) ? (2*W)'($signed(a)) : (2*W)'({1'b0, a});
    pb = (op == MUL_HS)                  ? (2*W)'($signed(b)) : (2*W)'({1'b0, b});
    prod = pa * pb;
    unique case (op)
      MUL_LO : y = prod[W-1:0];
      default: y = prod[2*W-1:W];
    endcase
  end
endmodule
