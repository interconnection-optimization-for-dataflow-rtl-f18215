// store_unit: the synZEN store unit.
//
// Three operand ports: A is a base address, B the data word, C an offset.
// When all three operand registers hold a value the unit asks its memory
// port to write B at address A + C, and consumes the operands when the write
// is granted (an operand written with control bit 3 set is kept, constant
// storing, so a base address or an offset can stay in place for a stream of
// stores). A missing operand, or a write not yet granted, makes the unit wait.
//
// Memory port: `mem_req`, `mem_addr` and `mem_wdata` are held until `mem_gnt`;
// the write happens in the cycle of the grant. Addresses count words.
//
// From the document: a store unit with three operand inputs and an address
// and a data output to memory. This design's own choices: what the third
// operand means (an offset added to the address) and the request/grant port.
module store_unit
  import synzen_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_we,
  input  logic [W-1:0]      a_data,
  input  logic [CTRL_W-1:0] a_ctrl,
  output logic              a_ready,
  input  logic              b_we,
  input  logic [W-1:0]      b_data,
  input  logic [CTRL_W-1:0] b_ctrl,
  output logic              b_ready,
  input  logic              c_we,
  input  logic [W-1:0]      c_data,
  input  logic [CTRL_W-1:0] c_ctrl,
  output logic              c_ready,
  output logic              mem_req,
  output logic [W-1:0]      mem_addr,
  output logic [W-1:0]      mem_wdata,
  input  logic              mem_gnt
);
  logic [W-1:0] a_q, b_q, c_q;
  logic         a_v, b_v, c_v, a_st, b_st, c_st;
  logic         done;

  assign mem_req   = a_v && b_v && c_v;
  assign mem_addr  = a_q + c_q;
  assign mem_wdata = b_q;
  assign done      = mem_req && mem_gnt;

  assign a_ready = !a_v || a_st || done;
  assign b_ready = !b_v || b_st || done;
  assign c_ready = !c_v || c_st || done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; c_q <= '0;
      a_v <= 1'b0; b_v <= 1'b0; c_v <= 1'b0;
      a_st <= 1'b0; b_st <= 1'b0; c_st <= 1'b0;
    end else begin
      if (a_we) begin a_q <= a_data; a_v <= 1'b1; a_st <= a_ctrl[CTL_STICKY]; end
      else if (done && !a_st) a_v <= 1'b0;
      if (b_we) begin b_q <= b_data; b_v <= 1'b1; b_st <= b_ctrl[CTL_STICKY]; end
      else if (done && !b_st) b_v <= 1'b0;
      if (c_we) begin c_q <= c_data; c_v <= 1'b1; c_st <= c_ctrl[CTL_STICKY]; end
      else if (done && !c_st) c_v <= 1'b0;
    end
  end

  a_a_ready : assert property (@(posedge clk) disable iff (!rst_n) a_we |-> a_ready);
  a_b_ready : assert property (@(posedge clk) disable iff (!rst_n) b_we |-> b_ready);
  a_c_ready : assert property (@(posedge clk) disable iff (!rst_n) c_we |-> c_ready);

endmodule
