// tb_sparc_text_workload: a shape/vowel comparison routine run on the whole
// computer at its default size, written twice:
//   A. with the field instructions: CMPV and CMPS against a key character;
//   B. with general instructions only: copy, mask the field with BIC, CMP.
// Both count, over a text of NCHARS random 14-bit character words, how many
// characters carry the key's vowel code and how many the key's shape code.
// The counts are checked against the testbench's own count, and the cycles
// from START to HALT of each version are measured and reported; version A
// must be the faster one.
module tb_sparc_text_workload;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NCHARS = 256;
  localparam int TEXT   = 'h2000;     // byte address of the text
  localparam int OUTP   = 'h1F00;     // byte address of the two counts

  logic clk = 0, rst, start;
  logic halted, reset_out;
  word_t dev_dout, dev_cs_out;
  logic dev_dv, dev_acc_out, dev_cs_rdy;

  sparc_top dut (
    .clk, .rst, .start, .ext_int(16'h0), .halted, .reset_out,
    .dev_dout, .dev_datavalid(dev_dv), .dev_accept(1'b1), .dev_din(16'h0), .dev_ready(1'b0),
    .dev_accept_out(dev_acc_out), .dev_cs_out, .dev_cs_rdy, .dev_cs_in(16'h0)
  );

  int checks = 0, failures = 0, cycles = 0;
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  int pc;
  task automatic e(input word_t w);
    dut.u_mem.mem[pc/2] = w; pc += 2;
  endtask
  task automatic li(input word_t v, input int rd);
    e(two(OP_MOV, AM_AUTOINC, 15, AM_REG, rd)); e(v);
  endtask

  // common prologue: R3 = text, R4 = count, R5/R6 = results, R8 = key
  task automatic prologue(input word_t key);
    li(16'(TEXT), 3); li(16'(NCHARS), 4);
    e(onea(A_CLR, AM_REG, 5)); e(onea(A_CLR, AM_REG, 6));
    li(key, 8);
  endtask
  task automatic epilogue;
    li(16'(OUTP), 2);
    e(two(OP_MOV, AM_REG, 5, AM_AUTOINC, 2));
    e(two(OP_MOV, AM_REG, 6, AM_AUTOINC, 2));
    e(misc(M_HALT, 0));
  endtask

  // version A: field instructions
  task automatic build_a(input word_t key);
    int lp, b1, b2;
    pc = 0;
    prologue(key);
    lp = pc;
    e(two(OP_CMPV, AM_REG, 8, AM_INDIR, 3));
    b1 = pc; e(16'h0);
    e(onea(A_INC, AM_REG, 5));
    dut.u_mem.mem[b1/2] = br(BC_BNE, b1, pc);
    e(two(OP_CMPS, AM_REG, 8, AM_AUTOINC, 3));
    b2 = pc; e(16'h0);
    e(onea(A_INC, AM_REG, 6));
    dut.u_mem.mem[b2/2] = br(BC_BNE, b2, pc);
    e(onea(A_DEC, AM_REG, 4));
    e(br(BC_BNE, pc, lp));
    epilogue();
  endtask

  // version B: general instructions only
  task automatic build_b(input word_t key);
    int lp, b1, b2;
    pc = 0;
    prologue(key);
    li(key & 16'h001F, 10);       // key vowel
    li(key & 16'h0060, 11);       // key shape
    lp = pc;
    e(two(OP_MOV, AM_INDIR, 3, AM_REG, 9));
    e(two(OP_BIC, AM_AUTOINC, 15, AM_REG, 9)); e(16'hFFE0);
    e(two(OP_CMP, AM_REG, 10, AM_REG, 9));
    b1 = pc; e(16'h0);
    e(onea(A_INC, AM_REG, 5));
    dut.u_mem.mem[b1/2] = br(BC_BNE, b1, pc);
    e(two(OP_MOV, AM_AUTOINC, 3, AM_REG, 9));
    e(two(OP_BIC, AM_AUTOINC, 15, AM_REG, 9)); e(16'hFF9F);
    e(two(OP_CMP, AM_REG, 11, AM_REG, 9));
    b2 = pc; e(16'h0);
    e(onea(A_INC, AM_REG, 6));
    dut.u_mem.mem[b2/2] = br(BC_BNE, b2, pc);
    e(onea(A_DEC, AM_REG, 4));
    e(br(BC_BNE, pc, lp));
    epilogue();
  endtask

  task automatic run(output int ncyc);
    int t0;
    #1 start = 1; @(posedge clk); #1 start = 0;
    t0 = cycles;
    @(posedge clk);
    wait (halted);
    ncyc = cycles - t0;
    @(posedge clk);
  endtask

  initial begin
    word_t key;
    int exp_v, exp_s, cyc_a, cyc_b;
    rst = 1; start = 0;
    @(posedge clk);
    key = chr(7'h48, SHAPE_BOTH, 5'h02);
    exp_v = 0; exp_s = 0;
    for (int i = 0; i < NCHARS; i++) begin
      word_t c;
      c = chr(7'h41 + 7'($urandom % 36), 2'($urandom), ($urandom % 3 == 0) ? 5'h02 : 5'($urandom % 8));
      dut.u_mem.mem[TEXT/2 + i] = c;
      if (c[4:0] == key[4:0]) exp_v++;
      if (c[6:5] == key[6:5]) exp_s++;
    end
    build_a(key);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    run(cyc_a);
    checks += 2;
    if (dut.u_mem.mem[OUTP/2] !== 16'(exp_v)) begin failures++; $display("FAIL A vowel count %0d exp %0d", dut.u_mem.mem[OUTP/2], exp_v); end
    if (dut.u_mem.mem[OUTP/2 + 1] !== 16'(exp_s)) begin failures++; $display("FAIL A shape count %0d exp %0d", dut.u_mem.mem[OUTP/2 + 1], exp_s); end
    dut.u_mem.mem[OUTP/2] = 0; dut.u_mem.mem[OUTP/2 + 1] = 0;
    #1 rst = 1;
    build_b(key);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    run(cyc_b);
    checks += 2;
    if (dut.u_mem.mem[OUTP/2] !== 16'(exp_v)) begin failures++; $display("FAIL B vowel count %0d exp %0d", dut.u_mem.mem[OUTP/2], exp_v); end
    if (dut.u_mem.mem[OUTP/2 + 1] !== 16'(exp_s)) begin failures++; $display("FAIL B shape count %0d exp %0d", dut.u_mem.mem[OUTP/2 + 1], exp_s); end
    checks++;
    if (cyc_a >= cyc_b) begin failures++; $display("FAIL field-instruction version not faster"); end
    $display("%0d characters, %0d with the key vowel, %0d with the key shape", NCHARS, exp_v, exp_s);
    $display("cycles: field instructions %0d, general instructions %0d, ratio %0d.%02d",
             cyc_a, cyc_b, cyc_b / cyc_a, (cyc_b * 100 / cyc_a) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
