// bpu: the synZEN branch processing unit, controlled by the instruction
// register.
//
// The branch operation sits in its own field of the instruction, next to the
// transport operations, so the unit needs only two ports on the transport
// network: the two values to compare (A and B). A branch whose target is known
// when the program is written carries the target in the branch operation and
// is decided in the cycle its instruction executes. A branch to a computed
// target takes two instructions: a SETADDR operation stores operand A as the
// dynamic target, and a later branch operation with `dyn` set uses it.
//
// Operand values are taken from the two operand registers or, when a
// transport in the same instruction writes the port, straight from the bus,
// so a compare and the transports of its operands can share one instruction.
// `ok` is low while a needed operand is neither in its register nor arriving:
// the instruction then stalls. Operands used by the branch are consumed
// unless they were written with control bit 3 set (constant storing).
//
// Interface: `br` is the branch field of the executing instruction,
// `active` says an instruction is executing, `issue` that it completes this
// cycle. `a_pend`/`b_pend` say a transport of this instruction targets the
// port, with `a_data`/`a_ctrl` the value it carries; the port is written when
// it issues. Outputs `taken`/`target` redirect the fetch, `halt` stops it.
//
// From the document: the IR-controlled branch unit with two network ports,
// one cycle for static and two for dynamic targets. This design's own
// choices: the condition set, the branch-operation layout, the bus bypass
// into the comparison and the halt operation that ends a coprocessor run.
module bpu
  import synzen_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  brop_t              br,
  input  logic               active,
  input  logic               issue,
  input  logic               a_pend,
  input  logic [W-1:0]       a_data,
  input  logic [CTRL_W-1:0]  a_ctrl,
  output logic               a_ready,
  input  logic               b_pend,
  input  logic [W-1:0]       b_data,
  input  logic [CTRL_W-1:0]  b_ctrl,
  output logic               b_ready,
  output logic               ok,
  output logic               taken,
  output logic [IMEM_AW-1:0] target,
  output logic               halt
);
  logic [W-1:0]       a_q, b_q, opa, opb;
  logic               a_v, b_v, a_st, b_st;
  logic [IMEM_AW-1:0] dyn_q;
  logic               need_a, need_b, cmp;

  always_comb begin
    need_a = 1'b0;
    need_b = 1'b0;
    unique case (br.cond)
      BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU: begin need_a = 1'b1; need_b = 1'b1; end
      BR_SETADDR: need_a = 1'b1;
      default: ;
    endcase
    need_a = need_a && active;
    need_b = need_b && active;
  end

  assign opa = a_pend ? a_data : a_q;
  assign opb = b_pend ? b_data : b_q;

  assign a_ready = !a_v || a_st || need_a;
  assign b_ready = !b_v || b_st || need_b;
  assign ok      = (!need_a || a_pend || a_v) && (!need_b || b_pend || b_v);

  always_comb begin
    unique case (br.cond)
      BR_ALWAYS: cmp = 1'b1;
      BR_EQ:     cmp = (opa == opb);
      BR_NE:     cmp = (opa != opb);
      BR_LT:     cmp = ($signed(opa) <  $signed(opb));
      BR_GE:     cmp = ($signed(opa) >= $signed(opb));
      BR_LTU:    cmp = (opa <  opb);
      BR_GEU:    cmp = (opa >= opb);
      default:   cmp = 1'b0;
    endcase
  end

  assign taken  = active && cmp;
  assign target = br.dyn ? dyn_q : br.target;
  assign halt   = active && (br.cond == BR_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; a_v <= 1'b0; b_v <= 1'b0; a_st <= 1'b0; b_st <= 1'b0;
      dyn_q <= '0;
    end else if (issue) begin
      // operand A: written by a transport and/or used by the branch
      if (a_pend) begin
        a_q  <= a_data;
        a_st <= a_ctrl[CTL_STICKY];
        a_v  <= !need_a || a_ctrl[CTL_STICKY];
      end else if (need_a && !a_st) begin
        a_v <= 1'b0;
      end
      if (b_pend) begin
        b_q  <= b_data;
        b_st <= b_ctrl[CTL_STICKY];
        b_v  <= !need_b || b_ctrl[CTL_STICKY];
      end else if (need_b && !b_st) begin
        b_v <= 1'b0;
      end
      if (active && br.cond == BR_SETADDR) dyn_q <= opa[IMEM_AW-1:0];
    end
  end

  a_issue_ok : assert property (@(posedge clk) disable iff (!rst_n) issue |-> ok);

endmodule
