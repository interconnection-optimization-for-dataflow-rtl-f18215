// tb_instr_fetch: fills the instruction memory with random words, starts at
// a random address and then completes, stalls, branches and halts at random.
// A model program counter checks every cycle that the instruction register
// holds the word at the expected address: the next word after a completed
// instruction, the target after a taken branch (no lost cycle), the same word
// while stalled; and that halt drops `ir_valid` and raises `done`.
module tb_instr_fetch;
  import synzen_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic imem_we = 0, start = 0, done, issue = 0, taken = 0, halt = 0, ir_valid;
  logic [IMEM_AW-1:0] imem_waddr = 0, start_pc = 0, target = 0, pc;
  instr_t imem_wdata = '0, ir;
  instr_fetch dut (.*);
  int checks = 0, failures = 0;
  instr_t image [256];
  logic [IMEM_AW-1:0] mpc;
  int n_taken = 0, n_stall = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      image[i] = instr_t'({$urandom, $urandom, $urandom, $urandom});
      @(negedge clk); imem_we = 1; imem_waddr = IMEM_AW'(i); imem_wdata = image[i];
    end
    @(negedge clk); imem_we = 0;
    check(!ir_valid && !done, "idle before start");
    for (int run = 0; run < 4; run++) begin
      mpc = IMEM_AW'($urandom);
      start = 1; start_pc = mpc;
      @(negedge clk); start = 0;
      for (int c = 0; c < 300; c++) begin
        check(ir_valid && ir == image[mpc] && pc == mpc, $sformatf("run %0d cycle %0d: pc %0d expected %0d", run, c, pc, mpc));
        issue  = ($urandom_range(0, 3) != 0);
        taken  = ($urandom_range(0, 3) == 0);
        target = IMEM_AW'($urandom);
        halt   = (c == 299);
        @(negedge clk);
        if (issue) begin
          if (taken) n_taken++;
          mpc = taken ? target : mpc + 1'b1;
        end else n_stall++;
        if (issue && halt) break;
        if (halt) begin issue = 1; taken = 0; @(negedge clk); break; end
      end
      issue = 0; halt = 0; taken = 0;
      check(!ir_valid && done, "halted");
      repeat (3) @(negedge clk);
      check(!ir_valid && done, "stays halted");
    end
    check(n_taken > 50 && n_stall > 50, "branches and stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
