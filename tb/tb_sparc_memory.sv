// tb_sparc_memory: writes a pattern over the whole 32K-word memory, reads it
// back with the one-cycle read latency, then random writes and reads
// checked against a shadow array.
module tb_sparc_memory;
  logic clk = 0;
  logic en, we;
  logic [14:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [32768];
  int checks = 0, failures = 0, cycles = 0;

  sparc_memory dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 32768; i++) begin
      en = 1; we = 1; addr = 15'(i); wdata = 16'(i * 37 + 5);
      shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 32768; i += 7) begin
      en = 1; we = 0; addr = 15'(i);
      @(posedge clk); #1;
      en = 0;
      checks++;
      if (rdata !== shadow[i]) begin failures++; if (failures < 10) $display("FAIL %h: %h", i, rdata); end
      // rdata holds while no new read
      @(posedge clk); #1;
      checks++;
      if (rdata !== shadow[i]) failures++;
    end
    for (int k = 0; k < 5000; k++) begin
      en = 1; we = 1'($urandom); addr = 15'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) shadow[addr] = wdata;
      else begin
        checks++;
        if (rdata !== shadow[addr]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
