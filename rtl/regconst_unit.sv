// regconst_unit: the synZEN register file and constant unit.
//
// Sixteen data registers with one write port and one read port on the
// transport network, plus a second source port that delivers small
// constants. The control field of the transport operation selects the
// register: the write port's destination control bits name the register
// written, the read port's source control bits name the register read. On
// the constant port the four source control bits are the constant itself,
// sign-extended to the data width (-8 .. 7).
//
// Timing: reads are combinational and always valid; a write takes effect at
// the clock edge, so a read in the same instruction returns the old value.
// All registers reset to zero.
//
// From the document: a register file with 16 entries whose port count is kept
// small, the register number carried in the four control bits, one input
// and two outputs drawn on the network. This design's own choice: the second
// output is the constant source (the document calls the unit "register file
// resp. constant unit" without saying how constants are formed).
module regconst_unit
  import synzen_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned NREGS = N_REGS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_we,
  input  logic [CTRL_W-1:0] wr_idx,
  input  logic [W-1:0]      wr_data,
  input  logic [CTRL_W-1:0] rd_idx,
  output logic [W-1:0]      rd_data,
  input  logic [CTRL_W-1:0] const_ctrl,
  output logic [W-1:0]      const_data
);
  logic [W-1:0] regs_q [NREGS];

  assign rd_data    = (32'(rd_idx) < NREGS) ? regs_q[rd_idx] : '0;
  assign const_data = W'($signed(const_ctrl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
    end else if (wr_we && 32'(wr_idx) < NREGS) begin
      regs_q[wr_idx] <= wr_data;
    end
  end
endmodule
