// xbar_net: the synZEN transport network, six buses with a partial set of
// switches, decoded from the six transport operations of an instruction.
//
// Transport operation i always uses bus i. Its source address selects which
// source port drives the bus (one multiplexer per bus over the sources that
// have a switch on it); its destination address selects, at the destination
// port, which bus the port takes (one multiplexer per destination over the
// buses it has a switch on). The control bits travel with the data: the
// destination control bits to the destination port, the source control bits
// to the source port. This is the centralized form of the network, with the
// address decoding done once per port instead of at every switch.
//
// Rules. A transport whose source or destination has no switch on its bus is
// not executed and is reported on `err_illegal`; so is a second transport to
// a destination already written by a lower-numbered slot, and a second
// transport reading a source with other source control bits than the first
// (a source port delivers one value per cycle, e.g. one register). Destination code 0
// marks an unused slot. An instruction can complete only when every transport
// it holds finds its source valid and its destination ready (`xfer_ok`);
// otherwise the whole instruction waits. Several transports may read the same
// source: they all get the same value and it is read once.
//
// Interface: `dst_pend` marks destinations that a transport of the current
// instruction targets (before the issue decision); `dst_we` marks the ones
// written in this cycle (`issue`). `src_ctrl` gives each source the control
// bits of the transports reading it, before the issue decision (a register
// number, say); `src_rd` marks the sources read on issue. Purely
// combinational.
//
// From the document: six buses, 19 destination and 8 source codes, 16-bit
// transport operations with 5+4 destination and 3+4 source bits, multiplexer
// based port selection, partial connectivity. This design's own choices: the
// slot-to-bus binding, the connectivity pattern (a parameter) and the
// handling of illegal transports.
module xbar_net
  import synzen_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter logic [N_SRC-1:0][N_BUS-1:0] SRC_CONN = SRC_CONN_DEF,
  parameter logic [N_DST-1:0][N_BUS-1:0] DST_CONN = DST_CONN_DEF
) (
  input  top_t [N_BUS-1:0]               tops,
  input  logic                           active,
  input  logic                           issue,
  input  logic [N_SRC-1:0]               src_valid,
  input  logic [N_SRC-1:0][W-1:0]        src_data,
  input  logic [N_DST-1:0]               dst_ready,
  output logic [N_SRC-1:0]               src_rd,
  output logic [N_SRC-1:0][CTRL_W-1:0]   src_ctrl,
  output logic [N_DST-1:0]               dst_pend,
  output logic [N_DST-1:0]               dst_we,
  output logic [N_DST-1:0][W-1:0]        dst_data,
  output logic [N_DST-1:0][CTRL_W-1:0]   dst_ctrl,
  output logic [N_BUS-1:0][W-1:0]        bus_data,
  output logic [N_BUS-1:0]               bus_used,
  output logic                           xfer_ok,
  output logic                           err_illegal
);
  logic [N_BUS-1:0] legal, slot_ok, illegal;

  // Per bus: source multiplexer and legality.
  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      bus_data[b] = '0;
      for (int s = 0; s < N_SRC; s++)
        if (SRC_CONN[s][b] && 32'(tops[b].src) == s) bus_data[b] = src_data[s];
    end
  end

  always_comb begin
    illegal = '0;
    legal   = '0;
    for (int b = 0; b < N_BUS; b++) begin
      if (active && tops[b].dst != '0) begin
        if (32'(tops[b].dst) >= N_DST || !DST_CONN[tops[b].dst][b] || !SRC_CONN[tops[b].src][b])
          illegal[b] = 1'b1;
        for (int c = 0; c < b; c++)
          if (legal[c] && (tops[c].dst == tops[b].dst ||
                           (tops[c].src == tops[b].src && tops[c].sctrl != tops[b].sctrl)))
            illegal[b] = 1'b1;
        legal[b] = !illegal[b];
      end
    end
  end

  // Per destination: bus multiplexer (port select).
  always_comb begin
    dst_pend = '0;
    dst_data = '0;
    dst_ctrl = '0;
    for (int d = 1; d < N_DST; d++)
      for (int b = 0; b < N_BUS; b++)
        if (DST_CONN[d][b] && legal[b] && 32'(tops[b].dst) == d) begin
          dst_pend[d] = 1'b1;
          dst_data[d] = bus_data[b];
          dst_ctrl[d] = tops[b].dctrl;
        end
  end

  always_comb begin
    src_rd   = '0;
    src_ctrl = '0;
    for (int b = 0; b < N_BUS; b++) begin
      slot_ok[b] = !legal[b] || (src_valid[tops[b].src] && dst_ready[tops[b].dst]);
      if (legal[b]) begin
        src_rd[tops[b].src]   = issue;
        src_ctrl[tops[b].src] = tops[b].sctrl;
      end
    end
  end

  assign dst_we      = issue ? dst_pend : '0;
  assign bus_used    = legal;
  assign xfer_ok     = &slot_ok;
  assign err_illegal = |illegal;

endmodule
