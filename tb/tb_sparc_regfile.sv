// tb_sparc_regfile: random writes and reads on both ports of the register
// bank, checked against a shadow array kept by the testbench; also checks
// reset and that a read in the write cycle returns the old value.
module tb_sparc_regfile;
  logic clk = 0, rst;
  logic [3:0] ra, rb, wa;
  logic [15:0] rda, rdb, wd;
  logic we;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0, cycles = 0;

  sparc_regfile dut (.clk, .rst, .ra_addr(ra), .ra_data(rda), .rb_addr(rb), .rb_data(rdb), .we, .wa, .wd);

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      shadow[i] = 0;
      ra = 4'(i); #1;
      checks++; if (rda !== 16'h0) failures++;
    end
    for (int k = 0; k < 4000; k++) begin
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      ra = (k % 5 == 0) ? wa : 4'($urandom); rb = 4'($urandom);
      #1;
      checks += 2;
      if (rda !== shadow[ra]) begin failures++; if (failures < 10) $display("FAIL A r%0d %h exp %h", ra, rda, shadow[ra]); end
      if (rdb !== shadow[rb]) begin failures++; if (failures < 10) $display("FAIL B r%0d %h exp %h", rb, rdb, shadow[rb]); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
