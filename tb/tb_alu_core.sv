// tb_alu_core: every ALU operation on directed corner values and random
// operands, compared with results computed here.
// The ALU datapath is combinational and has no clock: each case sets the
// operation and operands, waits one time unit and compares the output.
module tb_alu_core;
  import synzen_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  alu_core dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int sh = int'(z[4:0]);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR : return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLL: return x << sh;
      ALU_SRL: return x >> sh;
      default: begin
        logic [31:0] r = x;
        for (int i = 0; i < sh; i++) r = {r[31], r[31:1]};
        return r;
      end
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 8);
      case (i / 8)
        0: begin a = 32'hffff_ffff; b = 32'h1; end
        1: begin a = 32'h8000_0000; b = 32'd31; end
        2: begin a = 32'h7fff_ffff; b = 32'hffff_ffff; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      checks++;
      if (y !== ref_alu(op, a, b)) begin
        failures++;
        $display("FAIL op %0d a %h b %h: %h expected %h", op, a, b, y, ref_alu(op, a, b));
      end
    end
    checks++;
    a = 32'd5; b = 32'd7; op = ALU_SUB; #1;
    if (y != 32'hffff_fffe) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
