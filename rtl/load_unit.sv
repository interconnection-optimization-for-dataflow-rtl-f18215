// load_unit: a synZEN load unit with burst mode.
//
// Operand A is the start address; operand B is the burst length, the number
// of consecutive words to load. When operand A is written with control bit 0
// set the unit does a single load and does not wait for B. Once started, the
// unit requests the words at A, A+1, ... from its memory port, one per
// granted request, and writes the returned words in order into its ring
// buffer, from which transports read them. A request is only made while the
// ring buffer has room for it and for every word still in flight, so data
// returned by the memory is never dropped; a full buffer stalls the burst.
// Operands are consumed when the burst starts (unless written with control
// bit 3, constant storing), so the next burst can be set up meanwhile.
//
// Memory port: `mem_req`/`mem_addr` are held until `mem_gnt`; read data comes
// back in request order on `mem_rvalid`/`mem_rdata`, any number of cycles
// later. Addresses count words.
//
// From the document: load units with an address input, a ring buffer on their
// output, a memory address and data connection, and a burst mode for
// streaming. This design's own choices: operand B as the burst length, the
// single-load control bit, word addressing and the request/grant port.
module load_unit
  import synzen_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = RB_DEPTH
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
  output logic              src_valid,
  output logic [W-1:0]      src_data,
  input  logic              src_rd,
  output logic              mem_req,
  output logic [W-1:0]      mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [W-1:0]      mem_rdata,
  output logic              start,
  output logic              busy
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  a_q, b_q, addr_q, rem_q;
  logic          a_v, b_v, a_st, b_st, single_q;
  logic          busy_q;
  logic [CW-1:0] outst_q, rb_count;
  logic          gnt;

  assign start    = !busy_q && a_v && (single_q || b_v);
  assign a_ready  = !a_v || a_st || start;
  assign b_ready  = !b_v || b_st || (start && !single_q);
  assign busy     = busy_q;

  assign mem_req  = busy_q && (rem_q != '0) && ((rb_count + outst_q) < CW'(DEPTH));
  assign mem_addr = addr_q;
  assign gnt      = mem_req && mem_gnt;

  ring_buffer #(.W(W), .DEPTH(DEPTH)) u_rb (
    .clk, .rst_n,
    .push        (mem_rvalid),
    .push_data   (mem_rdata),
    .push_shared (1'b0),
    .full        (),
    .count       (rb_count),
    .valid       (src_valid),
    .head_data   (src_data),
    .head_shared (),
    .rd          (src_rd),
    .rd_release  (1'b0)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; addr_q <= '0; rem_q <= '0;
      a_v <= 1'b0; b_v <= 1'b0; a_st <= 1'b0; b_st <= 1'b0; single_q <= 1'b0;
      busy_q <= 1'b0; outst_q <= '0;
    end else begin
      // operands
      if (a_we) begin
        a_q <= a_data; a_v <= 1'b1;
        a_st <= a_ctrl[CTL_STICKY]; single_q <= a_ctrl[LCTL_SINGLE];
      end else if (start && !a_st) begin
        a_v <= 1'b0;
      end
      if (b_we) begin
        b_q <= b_data; b_v <= 1'b1; b_st <= b_ctrl[CTL_STICKY];
      end else if (start && !single_q && !b_st) begin
        b_v <= 1'b0;
      end
      // burst
      if (start) begin
        busy_q <= 1'b1;
        addr_q <= a_q;
        rem_q  <= single_q ? W'(1) : b_q;
      end else if (busy_q) begin
        if (gnt) begin
          addr_q <= addr_q + 1'b1;
          rem_q  <= rem_q - 1'b1;
        end
        if (rem_q == '0 || (gnt && rem_q == W'(1))) busy_q <= 1'b0;
      end
      outst_q <= outst_q + CW'(gnt) - CW'(mem_rvalid);
    end
  end

  a_a_ready : assert property (@(posedge clk) disable iff (!rst_n) a_we |-> a_ready);
  a_b_ready : assert property (@(posedge clk) disable iff (!rst_n) b_we |-> b_ready);
  a_rvalid  : assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> (outst_q != '0));

endmodule
