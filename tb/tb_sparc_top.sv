// tb_sparc_top: end-to-end run of the whole computer at its default size
// (64K-byte memory). A behavioural I/O device supplies two Arabic words as
// 14-bit character codes with their shape codes, and accepts output words.
// The program:
//   1. programs the DMA controller to read the 9 text words from the device
//      into memory, and meanwhile keeps the CPU writing to memory, so the
//      memory controller sees contention; the DMA end-of-block interrupt
//      ends the wait loop;
//   2. matches the two words the usual way (character codes only) and with
//      shape codes, counting the characters compared in each case;
//   3. sends the second word back to the device by DMA and, while the DMA
//      controller owns the I/O bus, issues an output word that must wait.
// The letter codes are the ISO 8859-6 codes without bit 7 (ASMO 449 layout),
// and the shapes are those of the two written words. Each mechanism (memory
// contention, memory wait, DMA in both directions, interrupt entry, CPU I/O
// held off by the DMA controller, HALT) is counted and must occur.
module tb_sparc_top;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0, rst, start;
  logic [15:0] ext_int;
  logic halted, reset_out;
  word_t dev_dout, dev_din, dev_cs_out, dev_cs_in;
  logic dev_dv, dev_accept, dev_ready, dev_acc_out, dev_cs_rdy;

  sparc_top dut (
    .clk, .rst, .start, .ext_int, .halted, .reset_out,
    .dev_dout, .dev_datavalid(dev_dv), .dev_accept, .dev_din, .dev_ready,
    .dev_accept_out(dev_acc_out), .dev_cs_out, .dev_cs_rdy, .dev_cs_in
  );

  int checks = 0, failures = 0, cycles = 0;
  int n_conflict = 0, n_memwait = 0, n_dma_in = 0, n_dma_out = 0, n_irq = 0, n_io_held = 0, n_halt = 0;

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (!rst) begin
      if (dut.pmc_conflict) n_conflict++;
      if (dut.c_busy) n_memwait++;
      if (dut.u_cpu.state == dut.u_cpu.S_INT_VEC && !dut.c_busy) n_irq++;
      if (dut.u_cpu.state == dut.u_cpu.S_IO && dut.dma_busy) n_io_held++;
    end
  end

  // the two words: (a) dad-ra-ba-blank, (b) dad-ra-ba-ta-mim
  word_t text [9];
  word_t got [$];
  int in_idx = 0;
  always @(posedge clk) begin
    dev_accept <= ($urandom % 2 == 0);
    dev_ready  <= ($urandom % 2 == 0);
    if (dev_dv && dev_accept) got.push_back(dev_dout);
    if (dev_ready && dev_acc_out) begin
      in_idx <= in_idx + 1;
      if (dut.dma_busy) n_dma_in++;
    end
    if (dev_dv && dev_accept && dut.dma_busy) n_dma_out++;
  end
  assign dev_din   = text[in_idx % 9];
  assign dev_cs_in = 16'h0000;

  int pc;
  task automatic e(input word_t w);
    dut.u_mem.mem[pc/2] = w; pc += 2;
  endtask
  task automatic li(input word_t v, input int rd);
    e(two(OP_MOV, AM_AUTOINC, 15, AM_REG, rd)); e(v);
  endtask
  task automatic cmd(input dma_reg_e r, input logic [10:0] v);
    e(io(IO_OUTC, AM_AUTOINC, 15)); e({DMA_SEL, r, v});
  endtask

  function automatic int match_len(input int na, input int nb, input bit use_shape);
    // characters compared until the first difference
    for (int i = 0; i < na && i < nb; i++) begin
      word_t x, y;
      x = use_shape ? text[i] : (text[i] & 16'h3F80);
      y = use_shape ? text[4 + i] : (text[4 + i] & 16'h3F80);
      if (x != y) return i + 1;
    end
    return (na < nb ? na : nb) + 1;
  endfunction

  initial begin
    int wl, m1, m2;
    text[0] = chr(7'h56, SHAPE_LEFT,     5'h00);  // dad
    text[1] = chr(7'h51, SHAPE_RIGHT,    5'h00);  // ra
    text[2] = chr(7'h48, SHAPE_ISOLATED, 5'h00);  // ba, end of word
    text[3] = chr(7'h20, SHAPE_ISOLATED, 5'h00);  // blank
    text[4] = chr(7'h56, SHAPE_LEFT,     5'h00);  // dad
    text[5] = chr(7'h51, SHAPE_RIGHT,    5'h00);  // ra
    text[6] = chr(7'h48, SHAPE_LEFT,     5'h00);  // ba, joined to ta
    text[7] = chr(7'h4A, SHAPE_BOTH,     5'h00);  // ta
    text[8] = chr(7'h65, SHAPE_RIGHT,    5'h00);  // mim
    rst = 1; start = 0; ext_int = 0;
    @(posedge clk);
    for (int i = 0; i < 32768; i++) dut.u_mem.mem[i] = 16'h0000;
    pc = 0;
    li(16'h7000, 14);
    li(16'h8000, 1); e(misc(M_MTMSR, 1));
    e(onea(A_CLR, AM_REG, 0));
    e(misc(M_EI, 0));
    cmd(DMA_ADDR_LO, 11'h000); cmd(DMA_ADDR_HI, 11'h008); cmd(DMA_COUNT, 11'd9); cmd(DMA_START, 11'd1);
    li(16'h0C00, 2);
    wl = pc;
    e(two(OP_MOV, AM_REG, 7, AM_AUTOINC, 2));
    e(onea(A_INC, AM_REG, 7));
    e(onea(A_TST, AM_REG, 0));
    e(br(BC_BEQ, pc, wl));
    e(misc(M_DI, 0));
    // matching with shape codes
    li(16'h0800, 3); li(16'h0808, 4); e(onea(A_CLR, AM_REG, 5));
    m1 = pc;
    e(onea(A_INC, AM_REG, 5));
    e(two(OP_CMP, AM_AUTOINC, 3, AM_AUTOINC, 4));
    e(br(BC_BEQ, pc, m1));
    // usual matching on the character codes only
    li(16'h0800, 3); li(16'h0808, 4); e(onea(A_CLR, AM_REG, 6));
    m2 = pc;
    e(onea(A_INC, AM_REG, 6));
    e(two(OP_MOV, AM_AUTOINC, 3, AM_REG, 8));
    e(two(OP_BIC, AM_AUTOINC, 15, AM_REG, 8)); e(16'h007F);
    e(two(OP_MOV, AM_AUTOINC, 4, AM_REG, 9));
    e(two(OP_BIC, AM_AUTOINC, 15, AM_REG, 9)); e(16'h007F);
    e(two(OP_CMP, AM_REG, 8, AM_REG, 9));
    e(br(BC_BEQ, pc, m2));
    li(16'h0A00, 2);
    e(two(OP_MOV, AM_REG, 5, AM_AUTOINC, 2));
    e(two(OP_MOV, AM_REG, 6, AM_AUTOINC, 2));
    // send word (b) back by DMA, then one word from the CPU
    cmd(DMA_ADDR_LO, 11'h008); cmd(DMA_ADDR_HI, 11'h008); cmd(DMA_COUNT, 11'd5); cmd(DMA_START, 11'd0);
    e(io(IO_OUTW, AM_AUTOINC, 15)); e(16'hE0F0);
    e(misc(M_HALT, 0));
    // interrupt handler for the DMA line (15)
    dut.u_mem.mem[32'h1800]     = onea(A_INC, AM_REG, 0);
    dut.u_mem.mem[32'h1800 + 1] = misc(M_RTI, 0);
    dut.u_mem.mem[32'h7FFF] = 16'h3000;

    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (2) @(posedge clk);
    #1 start = 1; @(posedge clk); #1 start = 0;
    @(posedge clk);
    wait (halted);
    n_halt++;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (dut.u_mem.mem[32'h0400 + i] !== text[i]) begin
        failures++; $display("FAIL text %0d = %h exp %h", i, dut.u_mem.mem[32'h0400 + i], text[i]);
      end
    end
    checks++;
    if (dut.u_mem.mem[32'h0500] !== 16'(match_len(4, 5, 1'b1))) begin
      failures++; $display("FAIL shape-aware match compared %0d", dut.u_mem.mem[32'h0500]); end
    checks++;
    if (dut.u_mem.mem[32'h0500 + 1] !== 16'(match_len(4, 5, 1'b0))) begin
      failures++; $display("FAIL plain match compared %0d", dut.u_mem.mem[32'h0500 + 1]); end
    $display("characters compared: with shape codes %0d, without %0d",
             dut.u_mem.mem[32'h0500], dut.u_mem.mem[32'h0500 + 1]);
    checks++;
    if (got.size() != 6) begin failures++; $display("FAIL device got %0d words", got.size()); end
    for (int i = 0; i < 5 && i < got.size(); i++) begin
      checks++;
      if (got[i] !== text[4 + i]) begin failures++; $display("FAIL out %0d = %h", i, got[i]); end
    end
    checks++;
    if (got.size() == 6 && got[5] !== 16'hE0F0) begin failures++; $display("FAIL cpu word %h", got[5]); end
    checks++;
    if (dut.u_cpu.u_rf.r[0] !== 16'd1) begin failures++; $display("FAIL interrupt count %0d", dut.u_cpu.u_rf.r[0]); end
    $display("mechanisms: contention=%0d memwait=%0d dma_in=%0d dma_out=%0d irq=%0d io_held=%0d halt=%0d cycles=%0d",
             n_conflict, n_memwait, n_dma_in, n_dma_out, n_irq, n_io_held, n_halt, cycles);
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no memory contention"); end
    checks++; if (n_memwait == 0) begin failures++; $display("FAIL no memory wait"); end
    checks++; if (n_dma_in != 9) begin failures++; $display("FAIL dma in %0d", n_dma_in); end
    checks++; if (n_dma_out != 5) begin failures++; $display("FAIL dma out %0d", n_dma_out); end
    checks++; if (n_irq != 1) begin failures++; $display("FAIL irq %0d", n_irq); end
    checks++; if (n_io_held == 0) begin failures++; $display("FAIL cpu I/O never held off"); end
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
