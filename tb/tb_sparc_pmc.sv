// tb_sparc_pmc: two random requesters (CPU and DMA side) that follow the
// busy handshake, a behavioural one-cycle RAM, and a shadow copy of the
// memory. Checks read data, that a write lands, that the DMA side wins
// when both ask in the same free cycle, and that an uncontested access
// completes in 2 cycles.
module tb_sparc_pmc;
  import sparc_pkg::*;
  logic clk = 0, rst;
  logic cr, cw, cb, dr, dw, db, men, mwe, conflict;
  word_t ca, cwd, crd, da, dwd, drd, mwd, mrd;
  logic [7:0] maddr;
  word_t ram [256];
  word_t shadow [256];
  int checks = 0, failures = 0, cycles = 0, n_conflict = 0, n_cpu = 0, n_dma = 0;

  sparc_pmc #(.AW(8)) dut (
    .clk, .rst,
    .cpu_read(cr), .cpu_write(cw), .cpu_addr(ca), .cpu_wdata(cwd), .cpu_rdata(crd), .cpu_busy(cb),
    .dma_read(dr), .dma_write(dw), .dma_addr(da), .dma_wdata(dwd), .dma_rdata(drd), .dma_busy(db),
    .mem_en(men), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd), .mem_rdata(mrd), .conflict
  );

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (men) begin
      if (mwe) ram[maddr] <= mwd;
      else     mrd <= ram[maddr];
    end
  end

  // Requester: holds its request until busy is low at a clock edge.
  task automatic requester(input bit is_dma, input int n);
    for (int k = 0; k < n; k++) begin
      logic wr; word_t a, d; int t0;
      repeat ($urandom % 3) @(posedge clk);
      #1;
      wr = 1'($urandom); a = {7'b0, 8'($urandom), 1'b0}; d = 16'($urandom);
      if (is_dma) begin dr = !wr; dw = wr; da = a; dwd = d; end
      else        begin cr = !wr; cw = wr; ca = a; cwd = d; end
      t0 = cycles;
      #1;
      while (is_dma ? db : cb) begin @(posedge clk); #1; end
      // completing cycle: busy low
      if (!wr) begin
        checks++;
        if ((is_dma ? drd : crd) !== shadow[a[8:1]]) begin
          failures++;
          if (failures < 10) $display("FAIL %s read %h got %h exp %h", is_dma ? "dma" : "cpu", a, is_dma ? drd : crd, shadow[a[8:1]]);
        end
      end else shadow[a[8:1]] = d;
      @(posedge clk);
      if (is_dma) begin dr = 0; dw = 0; n_dma++; end else begin cr = 0; cw = 0; n_cpu++; end
    end
  endtask

  always @(posedge clk) if (!rst && conflict) begin
    n_conflict++;
    // DMA must be served first: the CPU is still busy next cycle
    #1; checks++;
    if (!cb) begin failures++; $display("FAIL cpu served on conflict"); end
  end

  initial begin
    rst = 1; cr = 0; cw = 0; dr = 0; dw = 0; ca = 0; da = 0; cwd = 0; dwd = 0; mrd = 0;
    for (int i = 0; i < 256; i++) begin ram[i] = 16'(i * 3); shadow[i] = 16'(i * 3); end
    @(posedge clk); #1; rst = 0;
    // uncontested latency
    cr = 1; ca = 16'h0010;
    #1;
    checks++; if (!cb) failures++;     // first cycle: issue
    @(posedge clk); #1;
    checks++; if (cb) begin failures++; $display("FAIL latency"); end   // second: done
    checks++; if (crd !== shadow[8]) failures++;
    @(posedge clk); #1; cr = 0;
    fork
      requester(1'b0, 800);
      requester(1'b1, 800);
    join
    checks++;
    if (n_conflict == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("contention cycles=%0d cpu=%0d dma=%0d", n_conflict, n_cpu, n_dma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
