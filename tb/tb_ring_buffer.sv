// tb_ring_buffer: random push/read traffic against a queue model, with
// shared entries that survive reads until a release. Checks order, data,
// the shared bit, `full`, `valid` and `count` every cycle.
module tb_ring_buffer;
  localparam int unsigned W = 16, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push = 0, push_shared = 0, rd = 0, rd_release = 0;
  logic [W-1:0] push_data = '0;
  logic full, valid, head_shared;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] head_data;

  ring_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W:0] model [$];   // {shared, data}
  int n_full = 0, n_shared_keep = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare outputs with the model
      checks++;
      if (valid != (model.size() != 0) || full != (model.size() == DEPTH) || count != model.size()) begin
        failures++; $display("FAIL flags cyc %0d: valid %b full %b count %0d model %0d", cyc, valid, full, count, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (head_data != model[0][W-1:0] || head_shared != model[0][W]) begin
          failures++; $display("FAIL head cyc %0d: %h/%b expected %h/%b", cyc, head_data, head_shared, model[0][W-1:0], model[0][W]);
        end
      end
      if (full) n_full++;
      // drive
      push        = !full && ($urandom_range(0, 99) < 55);
      push_data   = W'($urandom);
      push_shared = ($urandom_range(0, 3) == 0);
      rd          = ($urandom_range(0, 99) < 50);
      rd_release  = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      // model update
      if (rd && model.size() != 0) begin
        if (!model[0][W] || rd_release) void'(model.pop_front());
        else n_shared_keep++;
      end
      if (push) model.push_back({push_shared, push_data});
    end
    checks++;
    if (n_full == 0 || n_shared_keep == 0) begin failures++; $display("FAIL: full %0d shared %0d", n_full, n_shared_keep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
