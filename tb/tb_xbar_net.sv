// tb_xbar_net: random instructions of six transport operations, random source
// data/valid and destination ready, against a reference written here slot by
// slot. Checks for every destination whether it is written and with which
// data and control bits, for every source whether it is read, the all-or-
// nothing issue condition and the illegal-transport flag. A few directed
// cases come first: a transport on a bus its destination has no switch on, two
// transports to one destination, one source read twice with the same and with
// different control bits, and the bus-to-destination routing of each slot.
// A second random phase builds only legal instructions and adds a single
// duplicate destination to a quarter of them, so that this one error is seen
// on its own.
module tb_xbar_net;
  import synzen_pkg::*;
  top_t [N_BUS-1:0] tops;
  logic active, issue;
  logic [N_SRC-1:0] src_valid, src_rd;
  logic [N_SRC-1:0][31:0] src_data;
  logic [N_DST-1:0] dst_ready, dst_pend, dst_we;
  logic [N_SRC-1:0][3:0] src_ctrl;
  logic [N_DST-1:0][31:0] dst_data;
  logic [N_DST-1:0][3:0] dst_ctrl;
  logic [N_BUS-1:0][31:0] bus_data;
  logic [N_BUS-1:0] bus_used;
  logic xfer_ok, err_illegal;
  xbar_net dut (.*);
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic top_t T(input int d, input int s, input int dc, input int sc);
    top_t t;
    t.dst = 5'(d); t.src = 3'(s); t.dctrl = 4'(dc); t.sctrl = 4'(sc);
    return t;
  endfunction

  // reference
  logic [N_DST-1:0] e_pend;
  logic [N_DST-1:0][31:0] e_data;
  logic [N_DST-1:0][3:0] e_ctrl;
  logic [N_SRC-1:0] e_read;
  logic [N_SRC-1:0][3:0] e_sctrl;
  logic e_ok, e_ill;
  task automatic reference();
    bit taken_d [N_DST];
    bit seen_s [N_SRC];
    e_pend = '0; e_data = '0; e_ctrl = '0; e_read = '0; e_sctrl = '0; e_ok = 1; e_ill = 0;
    foreach (taken_d[i]) taken_d[i] = 0;
    foreach (seen_s[i]) seen_s[i] = 0;
    for (int b = 0; b < N_BUS; b++) begin
      int d = int'(tops[b].dst), s = int'(tops[b].src);
      if (!active || d == 0) continue;
      if (d >= N_DST || !DST_CONN_DEF[d][b] || !SRC_CONN_DEF[s][b] || taken_d[d] ||
          (seen_s[s] && e_sctrl[s] != tops[b].sctrl)) begin
        e_ill = 1;
        continue;
      end
      taken_d[d] = 1;
      seen_s[s] = 1;
      e_pend[d] = 1; e_data[d] = src_data[s]; e_ctrl[d] = tops[b].dctrl;
      e_read[s] = 1; e_sctrl[s] = tops[b].sctrl;
      if (!src_valid[s] || !dst_ready[d]) e_ok = 0;
    end
  endtask

  task automatic compare(input string tag);
    #1;
    reference();
    check(dst_pend == e_pend, {tag, ": pend"});
    for (int d = 0; d < N_DST; d++)
      if (e_pend[d]) check(dst_data[d] == e_data[d] && dst_ctrl[d] == e_ctrl[d], $sformatf("%s: dst %0d data", tag, d));
    check(dst_we == (issue ? e_pend : '0), {tag, ": we"});
    check(src_rd == (issue ? e_read : '0), {tag, ": src_rd"});
    for (int s = 0; s < N_SRC; s++) if (e_read[s]) check(src_ctrl[s] == e_sctrl[s], {tag, ": sctrl"});
    check(xfer_ok == e_ok && err_illegal == e_ill, $sformatf("%s: ok %b/%b ill %b/%b", tag, xfer_ok, e_ok, err_illegal, e_ill));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N_SRC; s++) src_data[s] = 32'h1000_0000 * (s + 1) + 32'h55;
    src_valid = '1; dst_ready = '1; active = 1; issue = 1;
    // directed: each slot to the multiplier operand A (switches on all buses)
    for (int b = 0; b < N_BUS; b++) begin
      tops = '0; tops[b] = T(D_MUL_A, S_MUL, b, 0);
      #1 check(dst_we[D_MUL_A] && dst_data[D_MUL_A] == src_data[S_MUL] && dst_ctrl[D_MUL_A] == 4'(b) &&
               bus_used == (6'b1 << b) && !err_illegal, $sformatf("slot %0d routing", b));
    end
    // directed: ALU0 operand A has no switch on bus 5
    tops = '0; tops[5] = T(D_ALU0_A, S_REG, 0, 0);
    #1 check(err_illegal && !dst_we[D_ALU0_A], "no switch, not executed");
    // directed: two transports to one destination, the first wins
    tops = '0; tops[0] = T(D_ST_B, S_REG, 1, 0); tops[1] = T(D_ST_B, S_MUL, 2, 0);
    #1 check(err_illegal && dst_data[D_ST_B] == src_data[S_REG] && dst_ctrl[D_ST_B] == 1, "double destination");
    // directed: one source, same control bits, two destinations
    tops = '0; tops[0] = T(D_ST_A, S_CONST, 0, 5); tops[1] = T(D_ST_C, S_CONST, 0, 5);
    #1 check(!err_illegal && dst_we[D_ST_A] && dst_we[D_ST_C] && src_ctrl[S_CONST] == 5, "multicast");
    tops[1] = T(D_ST_C, S_CONST, 0, 6);
    #1 check(err_illegal && !dst_we[D_ST_C], "one source, two different controls");
    // directed: stall on a missing source
    tops = '0; tops[2] = T(D_MUL_B, S_LD0, 0, 0); src_valid[S_LD0] = 0;
    #1 check(!xfer_ok, "stall on invalid source");
    src_valid = '1;
    tops[2] = T(D_MUL_B, S_LD0, 0, 0); dst_ready[D_MUL_B] = 0;
    #1 check(!xfer_ok, "stall on busy destination");
    dst_ready = '1;
    // random
    for (int i = 0; i < 20000; i++) begin
      for (int b = 0; b < N_BUS; b++) begin
        int d = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, N_DST - 1 + (i % 50 == 0 ? 8 : 0));
        tops[b] = T(d, $urandom_range(0, N_SRC - 1), $urandom_range(0, 15), $urandom_range(0, 3));
      end
      for (int s = 0; s < N_SRC; s++) src_data[s] = $urandom;
      src_valid = N_SRC'($urandom) | N_SRC'($urandom);
      dst_ready = N_DST'($urandom) | N_DST'($urandom) | N_DST'($urandom);
      active = ($urandom_range(0, 7) != 0);
      issue = active && ($urandom_range(0, 1) == 1);
      compare($sformatf("random %0d", i));
    end
    // random legal instructions; a quarter of them get one duplicate destination
    for (int i = 0; i < 20000; i++) begin
      bit used_d [N_DST];
      logic [N_SRC-1:0][3:0] sc;
      foreach (used_d[k]) used_d[k] = 0;
      for (int s = 0; s < N_SRC; s++) sc[s] = 4'($urandom_range(0, 3));
      tops = '0;
      for (int b = 0; b < N_BUS; b++) begin
        int d, s, n = 0;
        do begin d = $urandom_range(1, N_DST - 1); n++; end
        while ((used_d[d] || !DST_CONN_DEF[d][b]) && n < 100);
        do s = $urandom_range(0, N_SRC - 1); while (!SRC_CONN_DEF[s][b]);
        if (!used_d[d] && DST_CONN_DEF[d][b] && $urandom_range(0, 5) != 0) begin
          used_d[d] = 1;
          tops[b] = T(d, s, $urandom_range(0, 15), sc[s]);
        end
      end
      if ($urandom_range(0, 3) == 0) begin
        int b1 = $urandom_range(0, N_BUS - 2);
        int b2 = $urandom_range(b1 + 1, N_BUS - 1);
        int s2;
        tops[b1].dst = D_MUL_A; tops[b2].dst = D_MUL_A;   // switches on every bus
        for (int b = 0; b < N_BUS; b++)
          if (b != b1 && b != b2 && tops[b].dst == D_MUL_A) tops[b] = '0;
        do s2 = $urandom_range(0, N_SRC - 1); while (!SRC_CONN_DEF[s2][b2]);
        tops[b2].src = 3'(s2); tops[b2].sctrl = sc[s2];
      end
      for (int s = 0; s < N_SRC; s++) src_data[s] = $urandom;
      src_valid = N_SRC'($urandom) | N_SRC'($urandom) | N_SRC'($urandom);
      dst_ready = N_DST'($urandom) | N_DST'($urandom) | N_DST'($urandom);
      active = ($urandom_range(0, 7) != 0);
      issue = active && ($urandom_range(0, 1) == 1);
      compare($sformatf("legal %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
