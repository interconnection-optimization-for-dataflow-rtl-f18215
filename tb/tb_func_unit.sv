// tb_func_unit: an ALU function unit with an incoming and an outgoing direct
// coupling link driven by the testbench. Covers: a plain operation and its
// latency (operand written at edge t, result readable after edge t+1),
// back-to-back firing, operand backcoupling (accumulation ended by an annul),
// constant storing, result sharing with release, direct coupling out with a
// target that is not ready at once, coupled input into operand B, and a full
// ring buffer stalling the unit. Then a random stream of 400 operations,
// operands sent in random order with random gaps and read by a slow reader.
// Results are compared with values computed here.
module tb_func_unit;
  import synzen_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_we = 0, b_we = 0, src_rd = 0, src_release = 0;
  logic [31:0] a_data = 0, b_data = 0;
  logic [3:0] a_ctrl = 0, b_ctrl = 0;
  logic a_ready, b_ready, src_valid;
  logic [31:0] src_data;
  logic cpl_out_en = 0, cpl_out_ready = 0, cpl_out_valid;
  logic [31:0] cpl_out_data;
  logic cpl_in_accept, cpl_in_ready, cpl_in_valid = 0;
  logic [31:0] cpl_in_data = 0;
  logic fire, backcoupled, sharing;

  func_unit #(.IS_MUL(1'b0), .HAS_CPL_IN(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input bit is_b, input logic [31:0] d, input logic [3:0] c);
    int n = 0;
    @(negedge clk);
    while (!(is_b ? b_ready : a_ready) && n < 50) begin @(negedge clk); n++; end
    if (!(is_b ? b_ready : a_ready)) begin check(0, "operand never ready"); return; end
    if (is_b) begin b_we = 1; b_data = d; b_ctrl = c; end
    else      begin a_we = 1; a_data = d; a_ctrl = c; end
    @(posedge clk);
    #1 a_we = 0; b_we = 0;
  endtask

  task automatic rd(output logic [31:0] d, input bit release_it);
    int n = 0;
    @(negedge clk);
    while (!src_valid && n < 50) begin @(negedge clk); n++; end
    if (!src_valid) begin check(0, "no result"); d = 'x; return; end
    d = src_data;
    src_rd = 1; src_release = release_it;
    @(posedge clk);
    #1 src_rd = 0; src_release = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference ALU
  function automatic logic [31:0] model(input logic [2:0] op, input logic [31:0] x, input logic [31:0] y);
    case (alu_op_e'(op))
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_SLL: return x << y[4:0];
      ALU_SRL: return x >> y[4:0];
      default: return 32'($signed(x) >>> y[4:0]);
    endcase
  endfunction
  logic [31:0] exp_q [$];

  logic [31:0] r, acc;
  int unsigned t;
  int n_full;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- plain operation and latency
    @(negedge clk);
    a_we = 1; a_data = 100; a_ctrl = {1'b0, ALU_SUB};
    b_we = 1; b_data = 58;  b_ctrl = {1'b0, CH_NONE};
    @(posedge clk);
    #1 a_we = 0; b_we = 0; t = cyc;
    check(!src_valid, "result too early");
    @(posedge clk); #1;
    check(src_valid && src_data == 42 && cyc == t + 1, "100-58 one cycle after the operands");
    rd(r, 0);
    // ---- back-to-back: new operands accepted in the cycle of firing
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      check(a_ready && b_ready, "operand registers ready for streaming");
      a_we = 1; a_data = 32'(i); a_ctrl = {1'b0, ALU_XOR};
      b_we = 1; b_data = 32'hf0; b_ctrl = {1'b0, CH_NONE};
      @(posedge clk); #1 a_we = 0; b_we = 0;
    end
    for (int i = 0; i < 3; i++) begin rd(r, 0); check(r == (32'(i) ^ 32'hf0), "streamed xor"); end
    // ---- operand backcoupling: 0 + 3 + 4 + 5 + 6, annulled with the last
    wr(0, 0, {1'b0, ALU_ADD});
    wr(1, 3, {1'b0, CH_BACK});
    check(backcoupled, "backcoupling set");
    acc = 3;
    for (int k = 4; k <= 6; k++) begin wr(1, 32'(k), {1'b0, CH_NONE}); acc += 32'(k); end
    wr(1, 0, {1'b0, CH_ANNUL});
    rd(r, 0);
    check(r == acc && !backcoupled, $sformatf("accumulation %0d expected %0d", r, acc));
    repeat (2) @(posedge clk);
    check(!src_valid, "backcoupled results did not go to the ring buffer");
    // ---- constant storing on A: 1000 - k for k = 1..3
    wr(0, 1000, {1'b1, ALU_SUB});
    for (int k = 1; k <= 3; k++) begin wr(1, 32'(k), {1'b0, CH_NONE}); rd(r, 0); check(r == 1000 - 32'(k), "constant kept in A"); end
    // ---- result sharing: one result read three times, released by the third
    wr(1, 10, {1'b0, CH_SHARE});
    rd(r, 0); check(r == 990, "shared read 1");
    rd(r, 0); check(r == 990, "shared read 2");
    rd(r, 1); check(r == 990, "shared read with release");
    @(negedge clk); check(!src_valid, "released entry removed");
    wr(1, 0, {1'b0, CH_ANNUL});       // clears sharing and the sticky A: 1000 - 0
    rd(r, 0); check(r == 1000 && !sharing, "annul");
    // ---- direct coupling out: target not ready for 3 cycles
    cpl_out_en = 1; cpl_out_ready = 0;
    wr(0, 6, {1'b0, ALU_SLL});
    wr(1, 2, {1'b0, CH_NONE});
    repeat (3) begin @(negedge clk); check(!fire && !cpl_out_valid, "waits for the coupled target"); end
    cpl_out_ready = 1;
    #1 check(cpl_out_valid && cpl_out_data == 24, "coupled result 6<<2");
    @(posedge clk); #1 cpl_out_en = 0; cpl_out_ready = 0;
    check(!src_valid, "coupled result bypassed the ring buffer");
    // ---- coupled input into operand B, priority over the network
    wr(1, 0, {1'b0, CH_CPL});          // B = 0 and accept coupled input
    wr(0, 50, {1'b1, ALU_ADD});        // 50 + 0
    rd(r, 0); check(r == 50 && cpl_in_accept, "accept set");
    @(negedge clk);
    cpl_in_valid = 1; cpl_in_data = 7;
    b_we = 0;
    #1 check(!b_ready, "network blocked while a coupled value arrives");
    @(posedge clk); #1 cpl_in_valid = 0;
    rd(r, 0); check(r == 57, "coupled operand B");
    wr(1, 0, {1'b0, CH_ANNUL});
    rd(r, 0); check(r == 50, "annul with coupling");
    // ---- ring buffer full: 5 results, depth 4
    wr(0, 1, {1'b1, ALU_ADD});
    n_full = 0;
    for (int k = 1; k <= 5; k++) wr(1, 32'(k), {1'b0, CH_NONE});
    repeat (2) @(negedge clk);
    check(dut.a_v && dut.b_v && !fire, "unit stalls on a full ring buffer");
    for (int k = 1; k <= 5; k++) begin rd(r, 0); check(r == 32'(1 + k), "ring order"); end
    wr(1, 0, {1'b0, CH_ANNUL});        // drops the kept A: 1 + 0
    rd(r, 0); check(r == 1, "annul after the full ring buffer");
    // ---- random stream: operands in random order and gaps, slow reader
    fork
      for (int i = 0; i < 400; i++) begin
        logic [31:0] x = $urandom, y = $urandom;
        logic [2:0] op = 3'($urandom_range(0, 7));
        exp_q.push_back(model(op, x, y));
        if ($urandom_range(0, 1) == 0) begin
          wr(0, x, {1'b0, op}); wr(1, y, {1'b0, CH_NONE});
        end else begin
          wr(1, y, {1'b0, CH_NONE}); wr(0, x, {1'b0, op});
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      for (int i = 0; i < 400; i++) begin
        logic [31:0] v;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        rd(v, 0);
        check(exp_q.size() != 0 && v == exp_q.pop_front(), $sformatf("random result %0d", i));
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
