// tb_synzen_top: end-to-end test of the synZEN coprocessor at its default
// parameters.
//
// The testbench plays the main processor and the data memory. It assembles a
// program (a small assembler below places each transport operation on the
// first bus that both of its ports have a switch on), writes it into the
// instruction memory, starts the coprocessor and waits for `done`. The data
// memory grants requests at random and answers loads after a fixed latency.
// The program:
//   1. dynamic branch: SETADDR, then a jump over an instruction that must not
//      execute;
//   2. dot product of two 6-element vectors: burst loads on two load units,
//      multiplier -> ALU 0 direct coupling, ALU 0 operand backcoupling,
//      then an explicit annul and a store of the sum;
//   3. a count-down loop with the register file, soft chaining through the
//      ring buffers, a constant kept in ALU 1 (constant storing), a shared
//      result read twice and a static conditional branch;
//   4. ALU 0 -> ALU 1 direct coupling;
//   5. five results queued in ALU 0 so that its ring buffer fills up;
//   6. halt.
// The memory and register contents are compared with values computed here,
// and each mechanism is counted; one that never happens counts as a failure.
// The run is repeated with fresh random vectors.
// A run that has not halted after 2000 cycles counts as a failure; the
// coprocessor is then reset (the program memory keeps its contents) and the
// next run goes on, so a broken mechanism still shows in every check.
module tb_synzen_top;
  import synzen_pkg::*;

  localparam int unsigned MEMW = 64;
  localparam int unsigned LAT  = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                imem_we = 1'b0;
  logic [IMEM_AW-1:0]  imem_waddr = '0;
  instr_t              imem_wdata = '0;
  logic                start = 1'b0;
  logic [IMEM_AW-1:0]  start_pc = '0;
  logic                done;
  logic [2:0]          ld_req, ld_gnt, ld_rvalid;
  logic [2:0][31:0]    ld_addr, ld_rdata;
  logic                st_req, st_gnt;
  logic [31:0]         st_addr, st_wdata;
  logic                stall, err_illegal;

  synzen_top dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- data memory
  logic [31:0] dmem [MEMW];
  logic [LAT-1:0]       pipe_v [3];
  logic [LAT-1:0][31:0] pipe_a [3];

  always_ff @(posedge clk) begin
    ld_gnt <= 3'($urandom_range(0, 7));
    st_gnt <= ($urandom_range(0, 3) != 0);
  end

  for (genvar p = 0; p < 3; p++) begin : g_port
    assign ld_rvalid[p] = pipe_v[p][LAT-1];
    assign ld_rdata[p]  = dmem[pipe_a[p][LAT-1] % MEMW];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        pipe_v[p] <= '0;
        pipe_a[p] <= '0;
      end else begin
        pipe_v[p] <= {pipe_v[p][LAT-2:0], ld_req[p] && ld_gnt[p]};
        pipe_a[p] <= {pipe_a[p][LAT-2:0], ld_addr[p]};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && st_req && st_gnt) dmem[st_addr % MEMW] <= st_wdata;
  end

  // ---------------------------------------------------------- assembler
  function automatic top_t T(input dst_e d, input logic [3:0] dc, input src_e s, input logic [3:0] sc);
    top_t t;
    t.dst = d; t.dctrl = dc; t.src = s; t.sctrl = sc;
    return t;
  endfunction

  function automatic brop_t BR(input br_cond_e c, input logic dyn, input int tgt);
    brop_t b;
    b.cond = c; b.dyn = dyn; b.target = IMEM_AW'(tgt);
    return b;
  endfunction

  instr_t prog [256];
  int     plen;
  instr_t cur;

  function automatic void put(input top_t t);
    for (int b = 0; b < N_BUS; b++) begin
      if (cur.tops[b].dst == D_NONE && DST_CONN_DEF[t.dst][b] && SRC_CONN_DEF[t.src][b]) begin
        cur.tops[b] = t;
        return;
      end
    end
    $fatal(1, "assembler: no bus for transport to %0d", t.dst);
  endfunction

  function automatic void emit(input brop_t b);
    cur.br = b;
    prog[plen] = cur;
    plen++;
    cur = '0;
  endfunction

  function automatic logic [3:0] C(input int v);   // 4-bit constant
    return 4'(v);
  endfunction

  localparam logic [3:0] STK = 4'b1000;           // constant storing bit

  int loop_pc;

  task automatic build_program();
    plen = 0;
    cur  = '0;
    // ---- 1. dynamic branch over a poisoned instruction
    put(T(D_BPU_A, 4'h0, S_CONST, C(3)));
    emit(BR(BR_SETADDR, 1'b0, 0));                                   // 0
    emit(BR(BR_ALWAYS, 1'b1, 0));                                    // 1
    put(T(D_REG_W, 4'd15, S_CONST, C(-1)));
    emit(BR(BR_NONE, 1'b0, 0));                                      // 2 (skipped)
    // ---- 2. dot product a[0..5] . b[6..11] -> dmem[14]
    put(T(D_LD0_A, 4'h0, S_CONST, C(0)));
    put(T(D_ALU0_A, {1'b0, ALU_ADD}, S_CONST, C(0)));
    put(T(D_ALU0_B, {1'b0, CH_BACK_CPL}, S_CONST, C(0)));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_LD0_B, 4'h0, S_CONST, C(6)));
    put(T(D_LD1_A, 4'h0, S_CONST, C(6)));
    put(T(D_LD1_B, 4'h0, S_CONST, C(6)));
    emit(BR(BR_NONE, 1'b0, 0));
    for (int i = 0; i < 6; i++) begin
      put(T(D_MUL_A, {1'b0, MUL_LO}, S_LD0, 4'h0));
      put(T(D_MUL_B, {1'b0, CH_NONE}, S_LD1, 4'h0));
      emit(BR(BR_NONE, 1'b0, 0));
    end
    put(T(D_ALU0_B, {1'b0, CH_ANNUL}, S_CONST, C(0)));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_A, STK, S_CONST, C(7)));                              // base kept
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(7)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    // ---- 3. loop: r1 = sum(r0 .. 1), r0 = 5 -> dmem[13]
    put(T(D_REG_W, 4'd0, S_CONST, C(5)));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU1_B, {STK[3], CH_SHARE}, S_CONST, C(1)));             // constant 1 kept
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_REG_W, 4'd1, S_CONST, C(0)));
    emit(BR(BR_NONE, 1'b0, 0));
    loop_pc = plen;
    put(T(D_ALU1_A, {1'b0, ALU_SUB}, S_REG, 4'd0));                  // r0 - 1
    put(T(D_ALU0_A, {1'b0, ALU_ADD}, S_REG, 4'd0));                  // r0 + ...
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU0_B, {1'b0, CH_NONE}, S_REG, 4'd1));                  // ... + r1
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_REG_W, 4'd1, S_ALU0, 4'h0));                             // soft chain result
    put(T(D_BPU_B, 4'h0 | STK, S_CONST, C(0)));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_REG_W, 4'd0, S_ALU1, 4'h0));                             // shared: stays
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_BPU_A, 4'h0, S_ALU1, 4'h1));                             // release
    emit(BR(BR_NE, 1'b0, loop_pc));
    put(T(D_ALU1_B, {1'b0, CH_ANNUL}, S_CONST, C(0)));               // drop constant, sharing
    put(T(D_ALU0_A, {1'b0, ALU_OR}, S_REG, 4'd1));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU0_B, {1'b0, CH_NONE}, S_CONST, C(0)));
    put(T(D_ALU1_A, {1'b0, ALU_ADD}, S_CONST, C(0)));                // consume ALU1_B = 0
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(6)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    // ---- 4. ALU0 -> ALU1 direct coupling into ALU1 = 7 - B
    put(T(D_ALU1_B, {1'b0, CH_CPL}, S_CONST, C(-2)));
    put(T(D_ALU0_A, {1'b0, ALU_SLL}, S_ALU1, 4'h0));                 // ALU1 leftover (0)
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU1_A, {STK[3], ALU_SUB}, S_CONST, C(7)));              // 7 kept: 7 - (-2) = 9
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU0_B, {1'b0, CH_NONE}, S_CONST, C(3)));                // 0 << 3 -> ALU1: 7
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(5)));
    put(T(D_ST_B, 4'h0, S_ALU1, 4'h0));                              // dmem[12] = 9
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU0_A, {1'b0, ALU_ADD}, S_CONST, C(-3)));
    put(T(D_ALU0_B, {1'b0, CH_NONE}, S_CONST, C(-3)));               // -6 -> ALU1: 13
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(4)));
    put(T(D_ST_B, 4'h0, S_ALU1, 4'h0));                              // dmem[11] = 7
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(3)));
    put(T(D_ST_B, 4'h0, S_ALU1, 4'h0));                              // dmem[10] = 13
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ALU1_B, {1'b0, CH_ANNUL}, S_CONST, C(0)));               // last: 7 - 0 = 7
    emit(BR(BR_NONE, 1'b0, 0));
    // ---- 5. fill ALU0's ring buffer: 5 results 1+k, k = 1..5, then drain
    put(T(D_ALU0_A, {STK[3], ALU_ADD}, S_CONST, C(1)));
    emit(BR(BR_NONE, 1'b0, 0));
    for (int k = 1; k <= 5; k++) begin
      put(T(D_ALU0_B, {1'b0, CH_NONE}, S_CONST, C(k)));
      emit(BR(BR_NONE, 1'b0, 0));
    end
    put(T(D_ST_C, 4'h0, S_CONST, C(-7)));                            // dmem[0..4]
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(-6)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(-5)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(-4)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(-3)));
    put(T(D_ST_B, 4'h0, S_ALU0, 4'h0));
    emit(BR(BR_NONE, 1'b0, 0));
    put(T(D_ST_C, 4'h0, S_CONST, C(-2)));
    put(T(D_ST_B, 4'h0, S_ALU1, 4'h0));                              // 7 -> dmem[5]
    emit(BR(BR_NONE, 1'b0, 0));
    // ---- 6. halt
    emit(BR(BR_HALT, 1'b0, 0));
  endtask

  // --------------------------------------------------- mechanism counters
  int n_stall, n_cpl_mul, n_cpl_alu, n_backc, n_shared_rd, n_const, n_burst_full;
  int n_fu_full, n_soft, n_taken_static, n_taken_dyn, n_setaddr, n_halt, n_illegal;
  int n_bubble, n_issue;
  logic running = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cycles <= cycles + 1;
      if (stall) n_stall++;
      if (dut.u_mul.cpl_out_valid) n_cpl_mul++;
      if (dut.u_alu0.cpl_out_valid) n_cpl_alu++;
      if (dut.u_alu0.fire && dut.u_alu0.backcoupled) n_backc++;
      if (dut.src_rd[S_ALU1] && dut.u_alu1.u_rb.head_shared && !dut.src_ctrl[S_ALU1][0]) n_shared_rd++;
      if ((dut.u_alu1.fire && dut.u_alu1.b_st) || (dut.u_alu0.fire && dut.u_alu0.a_st) ||
          (dut.u_st.done && dut.u_st.a_st)) n_const++;
      if (dut.g_ld[0].u_ld.busy_q && dut.g_ld[0].u_ld.rem_q != 0 && !dut.ld_req[0]) n_burst_full++;
      if (dut.u_alu0.a_v && dut.u_alu0.b_v && !dut.u_alu0.fire) n_fu_full++;
      if (dut.issue && (dut.src_rd[S_ALU0] || dut.src_rd[S_ALU1]) &&
          (dut.dst_we[D_REG_W] || dut.dst_we[D_ALU0_A] || dut.dst_we[D_ALU1_B])) n_soft++;
      if (dut.issue && dut.br_taken && !dut.ir.br.dyn) n_taken_static++;
      if (dut.issue && dut.br_taken && dut.ir.br.dyn) n_taken_dyn++;
      if (dut.issue && dut.ir.br.cond == BR_SETADDR) n_setaddr++;
      if (dut.issue && dut.br_halt) n_halt++;
      if (err_illegal) n_illegal++;
      if (start) running <= 1'b1;
      else if (done) running <= 1'b0;
      if (running && !done && !dut.ir_valid) n_bubble++;
      if (dut.issue) n_issue++;
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- test
  logic [31:0] va [6], vb [6];
  logic [31:0] dot;
  int unsigned t0;

  initial begin
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < plen; i++) begin
      imem_we <= 1'b1; imem_waddr <= IMEM_AW'(i); imem_wdata <= prog[i];
      @(posedge clk);
    end
    imem_we <= 1'b0;

    for (int run = 0; run < 3; run++) begin
      dot = '0;
      for (int i = 0; i < MEMW; i++) dmem[i] = 32'hdead_0000 + i;
      for (int i = 0; i < 6; i++) begin
        va[i] = (run == 0) ? 32'(i + 1) : $urandom;
        vb[i] = (run == 0) ? 32'(2 * i + 3) : $urandom;
        dmem[i] = va[i];
        dmem[6 + i] = vb[i];
        dot += va[i] * vb[i];
      end
      start <= 1'b1; start_pc <= '0;
      t0 = cycles;
      @(posedge clk);
      start <= 1'b0;
      @(posedge clk);
      while (!done && cycles - t0 < 2000) @(posedge clk);
      check(done, $sformatf("run %0d did not reach its halt", run));
      $display("run %0d: %0d instructions, %0d cycles", run, plen, cycles - t0);
      repeat (4) @(posedge clk);
      if (!done) begin
        // a hung run: reset the coprocessor (the program memory keeps its
        // contents) so that the next run starts clean
        rst_n <= 1'b0;
        repeat (2) @(posedge clk);
        rst_n <= 1'b1;
      end
      check(dmem[14] == dot, $sformatf("dot product %h, expected %h", dmem[14], dot));
      check(dmem[13] == 32'd15, $sformatf("loop sum %0d, expected 15", dmem[13]));
      check(dut.u_rc.regs_q[0] == 0 && dut.u_rc.regs_q[1] == 15, "loop registers");
      check(dut.u_rc.regs_q[15] == 0, "instruction skipped by dynamic branch executed");
      check(dmem[12] == 32'd9, $sformatf("coupled chain 1: %0d, expected 9", dmem[12]));
      check(dmem[11] == 32'd7, $sformatf("coupled chain 2: %0d, expected 7", dmem[11]));
      check(dmem[10] == 32'd13, $sformatf("coupled chain 3: %0d, expected 13", dmem[10]));
      for (int k = 1; k <= 5; k++)
        check(dmem[k - 1] == 32'(1 + k), $sformatf("ring buffer entry %0d: %0d", k, dmem[k - 1]));
      check(dmem[5] == 32'd7, "last coupled-chain result");
      // every cycle of a run executes or stalls an instruction: taken
      // branches, static or dynamic, cost no extra cycle
      check(n_bubble == 0, $sformatf("%0d cycles without an instruction", n_bubble));
    end

    check(n_stall > 0,        "no instruction stall");
    check(n_cpl_mul == 18,    $sformatf("multiplier->ALU0 couplings %0d, expected 18", n_cpl_mul));
    check(n_cpl_alu == 6,     $sformatf("ALU0->ALU1 couplings %0d, expected 6", n_cpl_alu));
    check(n_backc >= 18,      "no operand backcoupling");
    check(n_shared_rd == 15,  $sformatf("shared reads %0d, expected 15", n_shared_rd));
    check(n_const > 0,        "no constant storing");
    check(n_burst_full > 0,   "load burst never waited for ring-buffer space");
    check(n_fu_full > 0,      "ALU never waited for ring-buffer space");
    check(n_soft > 0,         "no soft chaining");
    check(n_taken_static == 12, $sformatf("static taken branches %0d, expected 12", n_taken_static));
    check(n_taken_dyn == 3,   "dynamic branches");
    check(n_setaddr == 3,     "SETADDR operations");
    check(n_halt == 3,        "halt");
    check(n_illegal == 0,     "illegal transports");
    $display("mechanisms: stall=%0d cplMUL=%0d cplALU=%0d back=%0d shared=%0d const=%0d burstfull=%0d fufull=%0d soft=%0d static=%0d dyn=%0d",
             n_stall, n_cpl_mul, n_cpl_alu, n_backc, n_shared_rd, n_const, n_burst_full, n_fu_full,
             n_soft, n_taken_static, n_taken_dyn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
