// tb_store_unit: stores with all three operands sent each time, then with a
// kept base and offset (constant storing) and only the data sent, against a
// memory with a random grant. Checks each write's address and data, that
// nothing is written while an operand is missing, and the operand handshake.
module tb_store_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic a_we = 0, b_we = 0, c_we = 0;
  logic [31:0] a_data = 0, b_data = 0, c_data = 0;
  logic [3:0] a_ctrl = 0, b_ctrl = 0, c_ctrl = 0;
  logic a_ready, b_ready, c_ready, mem_req, mem_gnt = 0;
  logic [31:0] mem_addr, mem_wdata;
  store_unit dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] exp_q [$];   // {addr, data}

  always @(posedge clk) mem_gnt <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (mem_req && mem_gnt) begin
      checks++;
      if (exp_q.size() == 0 || {mem_addr, mem_wdata} != exp_q[0]) begin
        failures++; $display("FAIL: write %h @ %h", mem_wdata, mem_addr);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic wr(input int p, input logic [31:0] d, input logic [3:0] c);
    @(negedge clk);
    while (!(p == 0 ? a_ready : p == 1 ? b_ready : c_ready)) @(negedge clk);
    case (p)
      0: begin a_we = 1; a_data = d; a_ctrl = c; end
      1: begin b_we = 1; b_data = d; b_ctrl = c; end
      default: begin c_we = 1; c_data = d; c_ctrl = c; end
    endcase
    @(posedge clk); #1 a_we = 0; b_we = 0; c_we = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ad, d, o;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      ad = $urandom; d = $urandom; o = $urandom_range(0, 100);
      exp_q.push_back({ad + o, d});
      wr(1, d, 0);
      wr(0, ad, 0);
      repeat (2) begin @(negedge clk); checks++; if (mem_req) begin failures++; $display("FAIL: request without offset"); end end
      wr(2, o, 0);
    end
    wr(0, 32'h4000, 4'b1000);
    wr(2, 32'd8, 4'b1000);
    for (int i = 0; i < 10; i++) begin
      d = $urandom;
      exp_q.push_back({32'h4008, d});
      wr(1, d, 0);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || mem_req) begin failures++; $display("FAIL: %0d writes missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
