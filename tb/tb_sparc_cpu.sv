// tb_sparc_cpu: runs a machine program on the CPU with a behavioural
// memory (random busy delays) and a behavioural I/O device. The program
// exercises the four addressing modes, immediates through (R15)+, the
// two-operand and one-operand instructions, branches, CALL/RTS, the Arabic
// shape and vowel instructions, the six I/O instructions, a masked and an
// unmasked interrupt with RTI, HALT and restart with START. Results are
// stored by the program to a table in memory and compared with values the
// testbench computes itself.
module tb_sparc_cpu;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0, rst, start;
  logic [15:0] intline;
  logic reset_out, halted;
  logic mrd, mwr, mbusy;
  word_t maddr, mwdata, mrdata;
  word_t io_dout, io_din, cs_out, cs_in;
  logic io_dv, io_acc_in, io_ready, io_acc_out, cs_rdy;

  word_t mem [32768];
  int checks = 0, failures = 0, cycles = 0, mem_wait = 0;
  word_t outs [$];
  word_t cmds [$];
  int n_in = 0;

  sparc_cpu dut (
    .clk, .rst, .start, .intline, .reset_out, .halted,
    .mem_read(mrd), .mem_write(mwr), .mem_addr(maddr), .mem_wdata(mwdata),
    .mem_rdata(mrdata), .mem_busy(mbusy),
    .io_dout, .io_datavalid(io_dv), .io_accept_in(io_acc_in), .io_din, .io_ready,
    .io_accept_out(io_acc_out), .cs_out, .cs_rdy, .cs_in
  );

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  // memory with 0..2 busy cycles per access
  always_comb begin
    mrdata = mem[maddr[15:1]];
    mbusy  = (mrd || mwr) && (mem_wait != 0);
  end
  always @(posedge clk) begin
    if ((mrd || mwr) && mem_wait == 0) begin
      if (mwr) mem[maddr[15:1]] <= mwdata;
      mem_wait <= $urandom % 3;
    end else if ((mrd || mwr) && mem_wait != 0) mem_wait <= mem_wait - 1;
  end

  // I/O device: accepts output after random delays, supplies two input words
  always @(posedge clk) begin
    io_acc_in <= ($urandom % 3 == 0);
    io_ready  <= ($urandom % 3 == 0);
    if (io_dv && io_acc_in) outs.push_back(io_dout);
    if (cs_rdy && io_acc_in) cmds.push_back(cs_out);
    if (io_ready && io_acc_out) n_in <= n_in + 1;
  end
  assign io_din = (n_in == 0) ? 16'hC0DE : 16'h55AA;
  assign cs_in  = 16'h5A5A;

  // ---- program builder ----
  int pc;
  task automatic e(input word_t w);
    mem[pc/2] = w; pc += 2;
  endtask
  // MOV #imm, Rd
  task automatic li(input word_t v, input int rd);
    e(two(OP_MOV, AM_AUTOINC, 15, AM_REG, rd)); e(v);
  endtask
  // MOV Rs, (R2)+ : append to the result table
  task automatic st(input int rs);
    e(two(OP_MOV, AM_REG, rs, AM_AUTOINC, 2));
  endtask

  localparam int RES = 'h0400;   // byte address of the result table
  word_t exp_q [$];

  initial begin
    int loop, fwd1, fwd2, fwd3, sub_at, patch_sub, hnd, wait_lp, skip1, skip2;
    word_t r0, r1, ca, cb, r9;
    rst = 1; start = 0; intline = 0; io_acc_in = 0; io_ready = 0;
    for (int i = 0; i < 32768; i++) mem[i] = 16'h0000;
    pc = 0;
    // --- arithmetic and addressing modes ---
    li(16'h1234, 0); li(16'h0FF0, 1); li(16'(RES), 2);
    r0 = 16'h1234; r1 = 16'h0FF0;
    e(two(OP_ADD, AM_REG, 1, AM_REG, 0)); st(0); r0 = r0 + r1;        exp_q.push_back(r0);
    e(two(OP_SUB, AM_REG, 1, AM_REG, 0)); st(0); r0 = r0 - r1;        exp_q.push_back(r0);
    e(two(OP_XOR, AM_REG, 1, AM_REG, 0)); st(0); r0 = r0 ^ r1;        exp_q.push_back(r0);
    e(two(OP_BIC, AM_REG, 1, AM_REG, 0)); st(0); r0 = r0 & ~r1;       exp_q.push_back(r0);
    e(two(OP_BIS, AM_REG, 1, AM_REG, 0)); st(0); r0 = r0 | r1;        exp_q.push_back(r0);
    e(onea(A_COM, AM_REG, 0)); st(0); r0 = ~r0;                       exp_q.push_back(r0);
    e(onea(A_NEG, AM_REG, 0)); st(0); r0 = -r0;                       exp_q.push_back(r0);
    e(oneb(B_ASL, AM_REG, 0)); st(0); r0 = r0 << 1;                   exp_q.push_back(r0);
    e(oneb(B_LSR, AM_REG, 0)); st(0); r0 = r0 >> 1;                   exp_q.push_back(r0);
    e(oneb(B_SWAB, AM_REG, 0)); st(0); r0 = {r0[7:0], r0[15:8]};      exp_q.push_back(r0);
    e(oneb(B_ASR, AM_REG, 0)); st(0);
    begin logic c; c = r0[0]; r0 = {r0[15], r0[15:1]}; exp_q.push_back(r0);
      e(oneb(B_ROR, AM_REG, 0)); st(0); r0 = {c, r0[15:1]}; exp_q.push_back(r0); end
    e(onea(A_INC, AM_REG, 0)); st(0); r0 = r0 + 1;                    exp_q.push_back(r0);
    e(onea(A_DEC, AM_REG, 1)); st(1); r1 = r1 - 1;                    exp_q.push_back(r1);
    // autodecrement, immediate into memory (read-modify-write), indirect
    e(two(OP_MOV, AM_AUTODEC, 2, AM_REG, 3));                 // R3 = last entry, R2 back
    e(two(OP_ADD, AM_AUTOINC, 15, AM_INDIR, 2)); e(16'd1);    // @R2 += 1
    exp_q[$] = r1 + 1;
    e(onea(A_TST, AM_AUTOINC, 2));                            // step R2 past it
    st(3); exp_q.push_back(r1);                               // value read through -(R2)
    // --- loop: sum 10..1 ---
    li(16'd10, 4); e(onea(A_CLR, AM_REG, 5));
    loop = pc;
    e(two(OP_ADD, AM_REG, 4, AM_REG, 5));
    e(onea(A_DEC, AM_REG, 4));
    e(br(BC_BNE, pc, loop));
    st(5); exp_q.push_back(16'd55);
    // --- compare and branches: CMP #7,R4 with R4 = 5 ---
    li(16'd5, 4);
    e(two(OP_CMP, AM_AUTOINC, 15, AM_REG, 4)); e(16'd7);
    fwd1 = pc; e(16'h0);                                      // BGT (taken)
    e(two(OP_MOV, AM_AUTOINC, 15, AM_AUTOINC, 2)); e(16'hBAD0);
    mem[fwd1/2] = br(BC_BGT, fwd1, pc);
    fwd2 = pc; e(16'h0);                                      // BCS (not taken)
    e(two(OP_MOV, AM_AUTOINC, 15, AM_AUTOINC, 2)); e(16'h600D);
    exp_q.push_back(16'h600D);
    mem[fwd2/2] = br(BC_BCS, fwd2, pc);
    // --- CALL / RTS ---
    li(16'h7000, 14);
    patch_sub = pc + 2; li(16'h0, 6);
    e(oneb(B_CALL, AM_INDIR, 6));
    st(7); exp_q.push_back(16'h5157);
    st(14); exp_q.push_back(16'h7000);
    fwd3 = pc; e(16'h0);                                      // BR over the subroutine
    sub_at = pc;
    li(16'h5157, 7); e(misc(M_RTS, 0));
    mem[fwd3/2] = br(BC_BR, fwd3, pc);
    mem[patch_sub/2] = 16'(sub_at);
    // --- Arabic shape and vowel instructions ---
    ca = chr(7'h28, SHAPE_LEFT, 5'h03);
    cb = chr(7'h2A, SHAPE_RIGHT, 5'h11);
    li(ca, 8); li(cb, 9);
    e(two(OP_MOVS, AM_REG, 8, AM_REG, 9)); st(9);
    r9 = chr(7'h2A, SHAPE_LEFT, 5'h11); exp_q.push_back(r9);
    e(two(OP_MOVV, AM_REG, 8, AM_REG, 9)); st(9);
    r9 = chr(7'h2A, SHAPE_LEFT, 5'h03); exp_q.push_back(r9);
    e(onea(A_CLR, AM_REG, 10));
    e(two(OP_CMPS, AM_REG, 8, AM_REG, 9));                    // equal shapes
    skip1 = pc; e(br(BC_BNE, pc, pc + 4));
    e(onea(A_INC, AM_REG, 10));
    st(10); exp_q.push_back(16'd1);
    e(puts(5'b11000, 9)); st(9);
    r9 = chr(7'h2A, SHAPE_BOTH, 5'h03); exp_q.push_back(r9);
    e(putv(5'h1F, 9)); st(9);
    r9 = chr(7'h2A, SHAPE_BOTH, 5'h1F); exp_q.push_back(r9);
    e(onea(A_CLR, AM_REG, 10));
    e(two(OP_CMPV, AM_REG, 8, AM_REG, 9));                    // 03 < 1F: borrow
    skip2 = pc; e(br(BC_BCC, pc, pc + 4));
    e(onea(A_INC, AM_REG, 10));
    st(10); exp_q.push_back(16'd1);
    // MOVS into a memory operand
    e(two(OP_MOV, AM_AUTOINC, 15, AM_INDIR, 2)); e(cb);
    e(two(OP_MOVS, AM_REG, 8, AM_AUTOINC, 2));
    exp_q.push_back(chr(7'h2A, SHAPE_LEFT, 5'h11));
    // --- I/O ---
    li(16'h1357, 11);
    e(io(IO_OUTW, AM_REG, 11));
    e(io(IO_OUTB, AM_REG, 11));
    e(io(IO_OUTC, AM_AUTOINC, 15)); e(16'h0123);
    e(io(IO_INW, AM_REG, 12)); st(12); exp_q.push_back(16'hC0DE);
    e(io(IO_INB, AM_AUTOINC, 2)); exp_q.push_back(16'h00AA);
    e(io(IO_INS, AM_REG, 13)); st(13); exp_q.push_back(16'h5A5A);
    // --- flags: SEC then ADC ---
    e(onea(A_CLR, AM_REG, 3));
    e(misc(M_SECC, 1));
    e(onea(A_ADC, AM_REG, 3)); st(3); exp_q.push_back(16'd1);
    // --- interrupts: line 3 enabled, line 5 masked ---
    li(16'h0008, 1); e(misc(M_MTMSR, 1));
    e(onea(A_CLR, AM_REG, 0));
    e(misc(M_EI, 0));
    wait_lp = pc;
    e(onea(A_TST, AM_REG, 0));
    e(br(BC_BEQ, pc, wait_lp));
    e(misc(M_DI, 0));
    st(0); exp_q.push_back(16'd1);
    e(misc(M_HALT, 0));
    // after restart
    li(16'hF00D, 3); st(3); exp_q.push_back(16'hF00D);
    e(misc(M_HALT, 0));
    // interrupt handler and vector for line 3
    hnd = 'h3000;
    mem[hnd/2] = onea(A_INC, AM_REG, 0);
    mem[hnd/2 + 1] = misc(M_RTI, 0);
    mem[32'h7FF3] = 16'(hnd);

    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    checks++; if (!halted) begin failures++; $display("FAIL not waiting for START"); end
    #1 start = 1; @(posedge clk); #1 start = 0;
    // raise the masked line, then the enabled one, once interrupts are on
    wait (dut.enif == 1'b1);
    @(posedge clk); #1 intline[5] = 1; @(posedge clk); #1 intline[5] = 0;
    repeat (40) @(posedge clk);
    checks++; if (dut.u_rf.r[0] !== 16'd0) begin failures++; $display("FAIL masked interrupt taken"); end
    #1 intline[3] = 1; @(posedge clk); #1 intline[3] = 0;
    wait (halted);
    @(posedge clk);
    #1 start = 1; @(posedge clk); #1 start = 0;
    @(posedge clk);
    wait (halted);
    @(posedge clk);
    for (int i = 0; i < exp_q.size(); i++) begin
      checks++;
      if (mem[RES/2 + i] !== exp_q[i]) begin
        failures++;
        $display("FAIL result %0d: got %h exp %h", i, mem[RES/2 + i], exp_q[i]);
      end
    end
    checks++; if (outs.size() != 2 || outs[0] !== 16'h1357 || outs[1] !== 16'h0057) begin
      failures++; $display("FAIL outputs %p", outs); end
    checks++; if (cmds.size() != 1 || cmds[0] !== 16'h0123) begin
      failures++; $display("FAIL commands %p", cmds); end
    checks++; if (dut.u_intc.intr[5] !== 1'b1) begin failures++; $display("FAIL masked request lost"); end
    $display("cycles=%0d results=%0d", cycles, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
