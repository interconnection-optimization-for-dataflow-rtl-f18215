// tb_load_unit: single loads and bursts against a memory model that grants at
// random and answers after a random but in-order latency, with a reader that
// drains the ring buffer slowly so bursts must wait for space. Checks every
// word and its order, that no request is made without room for its data,
// that a burst of N makes exactly N requests, and constant storing of the
// burst length.
module tb_load_unit;
  import synzen_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic a_we = 0, b_we = 0, src_rd = 0;
  logic [31:0] a_data = 0, b_data = 0;
  logic [3:0] a_ctrl = 0, b_ctrl = 0;
  logic a_ready, b_ready, src_valid, mem_req, mem_gnt = 0, mem_rvalid = 0, start, busy;
  logic [31:0] src_data, mem_addr, mem_rdata = 0;
  load_unit dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] memval(logic [31:0] ad);
    return ad * 32'h9e37_79b9 + 32'h1234;
  endfunction

  // memory: random grant, responses in order after 1..4 cycles
  logic [31:0] q_addr [$];
  int          q_time [$];
  int unsigned now = 0;
  int n_req = 0, n_wait_space = 0;
  always @(posedge clk) begin
    now <= now + 1;
    if (mem_req && mem_gnt) begin
      q_addr.push_back(mem_addr);
      q_time.push_back(int'(now) + $urandom_range(1, 4));
      n_req++;
    end
    if (busy && dut.rem_q != 0 && !mem_req) n_wait_space++;
  end
  always @(negedge clk) begin
    mem_gnt = ($urandom_range(0, 2) != 0);
    mem_rvalid = 0;
    if (q_addr.size() != 0 && q_time[0] <= int'(now)) begin
      mem_rvalid = 1; mem_rdata = memval(q_addr[0]);
      void'(q_addr.pop_front()); void'(q_time.pop_front());
    end
  end

  // reader: takes a word about every third cycle
  logic [31:0] exp_q [$];
  always @(negedge clk) begin
    src_rd = src_valid && ($urandom_range(0, 2) == 0);
    if (src_rd) begin
      checks++;
      if (exp_q.size() == 0 || src_data != exp_q[0]) begin
        failures++; $display("FAIL: read %h", src_data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic wr(input bit is_b, input logic [31:0] d, input logic [3:0] c);
    @(negedge clk);
    while (!(is_b ? b_ready : a_ready)) @(negedge clk);
    if (is_b) begin b_we = 1; b_data = d; b_ctrl = c; end
    else      begin a_we = 1; a_data = d; a_ctrl = c; end
    @(posedge clk); #1 a_we = 0; b_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single loads
    for (int i = 0; i < 5; i++) begin
      exp_q.push_back(memval(32'(100 + i)));
      wr(0, 32'(100 + i), 4'b0001);
    end
    @(negedge clk); while (busy || start || dut.a_v || q_addr.size() != 0) @(negedge clk);
    // bursts of 1..9 words
    for (int n = 1; n <= 9; n++) begin
      for (int i = 0; i < n; i++) exp_q.push_back(memval(32'(1000 * n + i)));
      n0 = n_req;
      wr(1, 32'(n), 4'h0);
      wr(0, 32'(1000 * n), 4'h0);
      @(negedge clk); while (busy || start) @(negedge clk);
      checks++;
      if (n_req - n0 != n) begin failures++; $display("FAIL: burst %0d made %0d requests", n, n_req - n0); end
    end
    // burst length kept (constant storing), two bursts of 3
    wr(1, 3, 4'b1000);
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 3; i++) exp_q.push_back(memval(32'(500 + 10 * r + i)));
      wr(0, 32'(500 + 10 * r), 4'h0);
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (src_valid || n_wait_space == 0) begin failures++; $display("FAIL: leftover %b, waits %0d", src_valid, n_wait_space); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
