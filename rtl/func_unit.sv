// func_unit: one synZEN function unit (ALU or multiplier) with its operand
// registers, hard-chaining state and output ring buffer.
//
// Operation. The transport network writes operand A (with the operation in
// its control bits) and operand B (with a hard-chaining command in its
// control bits). The unit fires in the first cycle in which both operand
// registers hold a value and the result has somewhere to go; until then it
// stalls and waits. A fired result goes to exactly one place:
//   * operand backcoupling set: back into the unit's own operand A register
//     (accumulation);
//   * else, if the unit a direct-coupling link leads to has accepted coupled
//     input: straight into that unit's operand B register, bypassing the
//     network (e.g. multiplier -> ALU for multiply-accumulate);
//   * else into the ring buffer, from which transports read it. While result
//     sharing is set, results are written as shared entries that stay in the
//     buffer for several reads.
// Constant storing: an operand written with control bit 3 set stays valid
// after use. An operand without it is consumed by the firing.
//
// Chaining state is set and cleared by the command on an operand-B
// transport, at the moment of that transport. Writing operand A from the
// network also clears backcoupling: the new value replaces the accumulator.
//
// Timing: an operand written at clock edge t can fire at edge t+1; the result
// is readable from the ring buffer (or present in the coupled operand
// register) after that edge. With both operands re-sent every cycle the unit
// fires every cycle, because an operand register accepts a new value in the
// cycle it is consumed.
//
// From the document: operand registers that make the unit wait for missing
// operands, ring buffer on the output, the four hard-chaining methods with
// their sticky bits/status registers, set by control information sent with
// an operand and annulled explicitly or as a side effect. This design's own
// choices: the encoding of the commands, which operand register each bypass
// writes (backcoupling -> A, direct coupling -> B), the priority between a
// coupled value and a network write (coupled value first) and the ring
// buffer depth.
module func_unit
  import synzen_pkg::*;
#(
  parameter bit          IS_MUL     = 1'b0,  // 0: ALU, 1: multiplier
  parameter bit          HAS_CPL_IN = 1'b0,  // a direct-coupling link ends here
  parameter int unsigned W          = DATA_W,
  parameter int unsigned DEPTH      = RB_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // operand A from the network
  input  logic              a_we,
  input  logic [W-1:0]      a_data,
  input  logic [CTRL_W-1:0] a_ctrl,
  output logic              a_ready,
  // operand B from the network
  input  logic              b_we,
  input  logic [W-1:0]      b_data,
  input  logic [CTRL_W-1:0] b_ctrl,
  output logic              b_ready,
  // result source port on the network
  output logic              src_valid,
  output logic [W-1:0]      src_data,
  input  logic              src_rd,
  input  logic              src_release,
  // outgoing direct coupling (to the operand B of another unit)
  input  logic              cpl_out_en,     // the other unit accepts coupled input
  input  logic              cpl_out_ready,  // its operand B can take a value now
  output logic              cpl_out_valid,
  output logic [W-1:0]      cpl_out_data,
  // incoming direct coupling
  output logic              cpl_in_accept,
  output logic              cpl_in_ready,
  input  logic              cpl_in_valid,
  input  logic [W-1:0]      cpl_in_data,
  // status
  output logic              fire,
  output logic              backcoupled,
  output logic              sharing
);
  logic [W-1:0]  a_q, b_q, y;
  logic          a_v, b_v, a_st, b_st;
  logic [2:0]    op_q;
  logic          bc_q, cpl_q, share_q;
  logic          rb_full;
  chain_cmd_e    cmd;

  generate
    if (IS_MUL) begin : g_mul
      mul_core #(.W(W)) u_core (.op(mul_op_e'(op_q)), .a(a_q), .b(b_q), .y(y));
    end else begin : g_alu
      alu_core #(.W(W)) u_core (.op(alu_op_e'(op_q)), .a(a_q), .b(b_q), .y(y));
    end
  endgenerate

  assign cmd = chain_cmd_e'(b_ctrl[2:0]);

  // Fire when both operands are present and the result has a free place.
  always_comb begin
    if (!(a_v && b_v))   fire = 1'b0;
    else if (bc_q)       fire = 1'b1;
    else if (cpl_out_en) fire = cpl_out_ready;
    else                 fire = !rb_full;
  end

  assign a_ready       = !a_v || a_st || bc_q || fire;
  assign cpl_in_ready  = !b_v || b_st || fire;
  assign b_ready       = cpl_in_ready && !cpl_in_valid;
  assign cpl_in_accept = cpl_q;

  assign cpl_out_valid = fire && !bc_q && cpl_out_en;
  assign cpl_out_data  = y;

  assign backcoupled   = bc_q;
  assign sharing       = share_q;

  ring_buffer #(.W(W), .DEPTH(DEPTH)) u_rb (
    .clk, .rst_n,
    .push        (fire && !bc_q && !cpl_out_en),
    .push_data   (y),
    .push_shared (share_q),
    .full        (rb_full),
    .count       (),
    .valid       (src_valid),
    .head_data   (src_data),
    .head_shared (),
    .rd          (src_rd),
    .rd_release  (src_release)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; op_q <= '0;
      a_v <= 1'b0; b_v <= 1'b0; a_st <= 1'b0; b_st <= 1'b0;
      bc_q <= 1'b0; cpl_q <= 1'b0; share_q <= 1'b0;
    end else begin
      // ---- operand A
      if (a_we) begin
        a_q  <= a_data;
        a_v  <= 1'b1;
        a_st <= a_ctrl[CTL_STICKY];
        op_q <= a_ctrl[2:0];
        bc_q <= 1'b0;                 // side effect: accumulator replaced
      end else if (fire) begin
        if (bc_q) begin
          a_q <= y;
          a_v <= 1'b1;
        end else if (!a_st) begin
          a_v <= 1'b0;
        end
      end
      // ---- operand B
      if (cpl_in_valid) begin
        b_q  <= cpl_in_data;
        b_v  <= 1'b1;
        b_st <= 1'b0;
      end else if (b_we) begin
        b_q  <= b_data;
        b_v  <= 1'b1;
        b_st <= b_ctrl[CTL_STICKY];
      end else if (fire && !b_st) begin
        b_v <= 1'b0;
      end
      // ---- hard-chaining commands, carried by an operand-B transport
      if (b_we) begin
        unique case (cmd)
          CH_BACK:     bc_q <= 1'b1;
          CH_CPL:      cpl_q <= HAS_CPL_IN;
          CH_BACK_CPL: begin bc_q <= 1'b1; cpl_q <= HAS_CPL_IN; end
          CH_SHARE:    share_q <= 1'b1;
          CH_UNSHARE:  share_q <= 1'b0;
          CH_ANNUL: begin
            bc_q <= 1'b0; cpl_q <= 1'b0; share_q <= 1'b0;
            if (!a_we) a_st <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  // Network writes only go to a ready operand register.
  a_a_ready : assert property (@(posedge clk) disable iff (!rst_n) a_we |-> a_ready);
  a_b_ready : assert property (@(posedge clk) disable iff (!rst_n) b_we |-> b_ready);
  a_cpl_in  : assert property (@(posedge clk) disable iff (!rst_n) cpl_in_valid |-> cpl_in_ready);

endmodule
