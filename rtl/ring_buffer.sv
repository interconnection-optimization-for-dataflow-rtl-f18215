// ring_buffer: result buffer on the output of a synZEN unit.
//
// Results are written in the order they are produced and read from the oldest
// entry, so a unit can run ahead of the transports that collect its results
// and does not have to stall while the network is busy. Each entry carries a
// result-sharing bit: a read of a shared entry leaves it in place, so several
// transport operations can use the same result, until a read with `rd_release`
// set takes it out. A read of an unshared entry takes it out.
//
// Interface: `push`/`push_data`/`push_shared` write one entry (the caller must
// not push when `full`); `valid`/`head_data` show the oldest entry; `rd` is a
// read by the network this cycle. A push and a read may happen in one cycle.
// `count` is the number of entries held, for units that reserve space.
//
// From the document: a buffer on the unit output that lets results be
// distributed later, and a sharing sticky bit that the buffer evaluates. This
// design's own choices: first-in first-out order, the depth, the release bit.
module ring_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  input  logic                       push_shared,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       valid,
  output logic [W-1:0]               head_data,
  output logic                       head_shared,
  input  logic                       rd,
  input  logic                       rd_release
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  data_q   [DEPTH];
  logic          shared_q [DEPTH];
  logic [AW-1:0] rd_ptr_q, wr_ptr_q;
  logic [CW-1:0] count_q;
  logic          pop;

  assign count       = count_q;
  assign full        = (count_q == CW'(DEPTH));
  assign valid       = (count_q != '0);
  assign head_data   = data_q[rd_ptr_q];
  assign head_shared = shared_q[rd_ptr_q];
  assign pop         = rd && valid && (!head_shared || rd_release);

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        data_q[i]   <= '0;
        shared_q[i] <= 1'b0;
      end
    end else begin
      if (push) begin
        data_q[wr_ptr_q]   <= push_data;
        shared_q[wr_ptr_q] <= push_shared;
        wr_ptr_q           <= ptr_inc(wr_ptr_q);
      end
      if (pop) rd_ptr_q <= ptr_inc(rd_ptr_q);
      count_q <= count_q + CW'(push) - CW'(pop);
    end
  end

  // The producer must respect `full`.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));

endmodule
