// tb_regconst_unit: random writes and reads of the 16 registers against a
// model (reads in the cycle of a write return the old value), reset to zero,
// and all sixteen constants of the constant port.
module tb_regconst_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_we = 0;
  logic [3:0] wr_idx = 0, rd_idx = 0, const_ctrl = 0;
  logic [31:0] wr_data = 0, rd_data, const_data;
  regconst_unit dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] model [16];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) model[i] = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); rd_idx = 4'(i); #1;
      checks++; if (rd_data != 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      wr_we = ($urandom_range(0, 1) == 1); wr_idx = 4'($urandom); wr_data = $urandom;
      rd_idx = ($urandom_range(0, 3) == 0) ? wr_idx : 4'($urandom);
      #1;
      checks++;
      if (rd_data != model[rd_idx]) begin failures++; $display("FAIL r%0d: %h expected %h", rd_idx, rd_data, model[rd_idx]); end
      @(posedge clk);
      if (wr_we) model[wr_idx] = wr_data;
    end
    wr_we = 0;
    for (int k = 0; k < 16; k++) begin
      const_ctrl = 4'(k); #1;
      checks++;
      if (const_data != ((k < 8) ? 32'(k) : 32'(k - 16))) begin failures++; $display("FAIL const %0d: %h", k, const_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
