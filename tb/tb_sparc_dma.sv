// tb_sparc_dma: programs the DMA controller over the command bus, then
// runs one memory-to-device block and one device-to-memory block. The
// memory side is a behavioural memory with a random busy delay, the device
// side a behavioural device that accepts/supplies words after random
// delays. Checks the words seen by the device, the words written to
// memory, the done pulse, and that commands are refused while busy.
module tb_sparc_dma;
  import sparc_pkg::*;
  logic clk = 0, rst;
  word_t cs_cmd;
  logic  cs_rdy, cs_accept;
  logic  mrd, mwr, mbusy, busy, done;
  word_t maddr, mwdata, mrdata;
  word_t io_dout, io_din;
  logic  io_dv, io_acc_in, io_ready, io_acc_out;
  word_t mem [512];
  word_t got [$];
  int checks = 0, failures = 0, cycles = 0, n_done = 0, mem_wait = 0;

  sparc_dma dut (
    .clk, .rst, .cs_cmd, .cs_rdy, .cs_accept,
    .mem_read(mrd), .mem_write(mwr), .mem_addr(maddr), .mem_wdata(mwdata), .mem_rdata(mrdata), .mem_busy(mbusy),
    .io_dout, .io_datavalid(io_dv), .io_accept_in(io_acc_in), .io_din, .io_ready, .io_accept_out(io_acc_out),
    .busy, .done
  );

  always #5 clk = !clk;
  always @(posedge clk) cycles++;
  always @(negedge clk) if (done) n_done++;

  // behavioural memory: busy for a random 0..2 cycles, then completes
  always_comb begin
    mrdata = mem[maddr[9:1]];
    mbusy  = (mrd || mwr) && (mem_wait != 0);
  end
  always @(posedge clk) begin
    if ((mrd || mwr) && mem_wait == 0) begin
      if (mwr) mem[maddr[9:1]] <= mwdata;
      mem_wait <= $urandom % 3;
    end else if ((mrd || mwr) && mem_wait != 0) mem_wait <= mem_wait - 1;
  end

  // behavioural device: accepts output words, supplies input words
  int dev_in_next = 0;
  always @(posedge clk) begin
    io_acc_in <= ($urandom % 2 == 0);
    io_ready  <= ($urandom % 2 == 0);
    if (io_dv && io_acc_in) got.push_back(io_dout);
    if (io_ready && io_acc_out) dev_in_next <= dev_in_next + 1;
  end
  assign io_din = 16'hA000 + 16'(dev_in_next);

  task automatic command(input dma_reg_e r, input logic [10:0] v);
    @(posedge clk); #1;
    cs_cmd = {DMA_SEL, r, v}; cs_rdy = 1;
    #1;
    while (!cs_accept) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    cs_rdy = 0;
  endtask

  initial begin
    rst = 1; cs_cmd = 0; cs_rdy = 0; io_acc_in = 0; io_ready = 0;
    for (int i = 0; i < 512; i++) mem[i] = 16'(32'h1000 + i);
    @(posedge clk); #1; rst = 0;
    // a command for another device is not accepted
    cs_cmd = 16'h2001; cs_rdy = 1; #1;
    checks++; if (cs_accept) begin failures++; $display("FAIL foreign command"); end
    cs_rdy = 0;
    // memory to device: 20 words from byte address 0x0040
    command(DMA_ADDR_LO, 11'h040);
    command(DMA_ADDR_HI, 11'h000);
    command(DMA_COUNT, 11'd20);
    command(DMA_START, 11'd0);
    #1; checks++; if (!busy) begin failures++; $display("FAIL not busy"); end
    // while busy a command is refused
    cs_cmd = {DMA_SEL, DMA_COUNT, 11'd3}; cs_rdy = 1; #1;
    checks++; if (cs_accept) begin failures++; $display("FAIL accepted while busy"); end
    cs_rdy = 0;
    wait (!busy);
    @(posedge clk); @(negedge clk);
    checks++; if (got.size() != 20) begin failures++; $display("FAIL got %0d words", got.size()); end
    for (int i = 0; i < got.size() && i < 20; i++) begin
      checks++;
      if (got[i] !== 16'(32'h1000 + 32 + i)) begin failures++; $display("FAIL word %0d = %h", i, got[i]); end
    end
    checks++; if (n_done != 1) begin failures++; $display("FAIL done %0d", n_done); end
    // device to memory: 12 words to byte address 0x0200
    command(DMA_ADDR_LO, 11'h000);
    command(DMA_ADDR_HI, 11'h002);
    command(DMA_COUNT, 11'd12);
    command(DMA_START, 11'd1);
    @(posedge clk);
    wait (!busy);
    @(posedge clk); @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (mem[256 + i] !== 16'(32'hA000 + i)) begin failures++; $display("FAIL mem %0d = %h", 256 + i, mem[256 + i]); end
    end
    checks++; if (mem[256 + 12] !== 16'(32'h1000 + 268)) begin failures++; $display("FAIL past block"); end   // nothing past the block
    checks++; if (n_done != 2) begin failures++; $display("FAIL done %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
