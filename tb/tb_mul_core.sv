// tb_mul_core: the four product forms on corner values and random operands,
// compared with 64-bit products computed here.
// The multiplier datapath is combinational and has no clock: each case sets
// the form and operands, waits one time unit and compares the output.
module tb_mul_core;
  import synzen_pkg::*;
  mul_op_e op;
  logic [31:0] a, b, y;
  mul_core dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_mul(mul_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'h0, x}), uz = longint'({32'h0, z});
    logic [63:0] p;
    case (o)
      MUL_LO : p = ux * uz;
      MUL_HS : p = sx * sz;
      MUL_HU : p = ux * uz;
      default: p = sx * uz;
    endcase
    return (o == MUL_LO) ? p[31:0] : p[63:32];
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
      op = mul_op_e'(i % 4);
      case (i / 4)
        0: begin a = 32'hffff_ffff; b = 32'hffff_ffff; end
        1: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        2: begin a = 32'hffff_fffe; b = 32'd3; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      checks++;
      if (y !== ref_mul(op, a, b)) begin
        failures++;
        $display("FAIL op %0d a %h b %h: %h expected %h", op, a, b, y, ref_mul(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
