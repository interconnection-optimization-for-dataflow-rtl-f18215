// tb_bpu: the branch unit on every condition with random and equal operands,
// operands from the registers and from the bus of the same instruction,
// constant storing, `ok` (stall) while an operand is missing, and a dynamic
// branch: SETADDR then a branch to the stored address. Decisions are compared
// with comparisons computed here.
module tb_bpu;
  import synzen_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  brop_t br = '0;
  logic active = 0, issue = 0, a_pend = 0, b_pend = 0;
  logic [31:0] a_data = 0, b_data = 0;
  logic [3:0] a_ctrl = 0, b_ctrl = 0;
  logic a_ready, b_ready, ok, taken, halt;
  logic [IMEM_AW-1:0] target;
  bpu dut (.*);
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit ref_cmp(br_cond_e c, logic [31:0] x, logic [31:0] y);
    case (c)
      BR_ALWAYS: return 1;
      BR_EQ: return x == y;
      BR_NE: return x != y;
      BR_LT: return $signed(x) < $signed(y);
      BR_GE: return $signed(x) >= $signed(y);
      BR_LTU: return x < y;
      BR_GEU: return x >= y;
      default: return 0;
    endcase
  endfunction

  // one instruction: optional operand transports, branch op, issue if ok
  task automatic instr(input br_cond_e c, input logic dyn, input int tgt,
                       input bit pa, input logic [31:0] da, input bit pb, input logic [31:0] db,
                       input logic [3:0] ca);
    @(negedge clk);
    active = 1; br.cond = c; br.dyn = dyn; br.target = IMEM_AW'(tgt);
    a_pend = pa; a_data = da; a_ctrl = ca; b_pend = pb; b_data = db; b_ctrl = 0;
    #1 issue = ok && (!pa || a_ready) && (!pb || b_ready);
    @(posedge clk);
    #1 issue = 0; active = 0; a_pend = 0; b_pend = 0; br = '0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] x, y;
  br_cond_e c;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // operands from the bus, same instruction as the branch
    for (int i = 0; i < 400; i++) begin
      c = br_cond_e'(1 + (i % 7));
      x = $urandom; y = (i % 3 == 0) ? x : $urandom;
      if (i % 5 == 0) y = {~x[31], x[30:0]};
      @(negedge clk);
      active = 1; br.cond = c; br.dyn = 0; br.target = IMEM_AW'(i);
      a_pend = (c != BR_ALWAYS); a_data = x; b_pend = (c != BR_ALWAYS); b_data = y; a_ctrl = 0; b_ctrl = 0;
      #1;
      check(ok, "operands on the bus are enough");
      check(taken == ref_cmp(c, x, y) && target == IMEM_AW'(i), $sformatf("cond %0d %h %h", c, x, y));
      issue = 1;
      @(posedge clk);
      #1 issue = 0; active = 0; a_pend = 0; b_pend = 0;
    end
    // operands written earlier, branch later; missing operand -> not ok
    instr(BR_NONE, 0, 0, 1, 32'd9, 0, 0, 4'h0);
    @(negedge clk); active = 1; br.cond = BR_LTU; br.target = 8'd77; #1;
    check(!ok, "stall while operand B is missing");
    active = 0; br = '0;
    instr(BR_NONE, 0, 0, 0, 0, 1, 32'd10, 4'h0);
    @(negedge clk); active = 1; br.cond = BR_LTU; br.target = 8'd77; #1;
    check(ok && taken && target == 77, "9 < 10 from the operand registers");
    issue = 1; @(posedge clk); #1 issue = 0; active = 0; br = '0;
    @(negedge clk); active = 1; br.cond = BR_EQ; #1;
    check(!ok, "operands consumed by the branch");
    active = 0; br = '0;
    // constant storing: B = 0 kept over several branches
    instr(BR_NONE, 0, 0, 0, 0, 0, 0, 4'h0);
    @(negedge clk); b_pend = 1; b_data = 0; b_ctrl = 4'b1000; active = 1; br.cond = BR_NONE; #1 issue = 1;
    @(posedge clk); #1 issue = 0; b_pend = 0; b_ctrl = 0; active = 0;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); active = 1; br.cond = BR_NE; br.target = 8'(k); a_pend = 1; a_data = 32'(k); #1;
      check(ok && taken == (k != 0), "compare with a stored constant");
      issue = 1; @(posedge clk); #1 issue = 0; active = 0; a_pend = 0;
    end
    // dynamic branch: two instructions
    @(negedge clk); active = 1; br.cond = BR_SETADDR; a_pend = 1; a_data = 32'd200; #1;
    check(ok && !taken, "SETADDR does not branch");
    issue = 1; @(posedge clk); #1 issue = 0; active = 0; a_pend = 0;
    @(negedge clk); active = 1; br.cond = BR_ALWAYS; br.dyn = 1; br.target = 8'd3; #1;
    check(ok && taken && target == 200, "dynamic target");
    issue = 1; @(posedge clk); #1 issue = 0; active = 0; br = '0;
    @(negedge clk); active = 1; br.cond = BR_HALT; #1;
    check(halt && !taken && ok, "halt");
    active = 0; br = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
