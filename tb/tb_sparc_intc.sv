// tb_sparc_intc: interrupt latch, mask and priority. Random pulses on the
// lines, random masks and enable; a reference copy of the request register
// is kept in the testbench and the pending line with the lowest number is
// expected on id. Acknowledges clear the selected request.
module tb_sparc_intc;
  logic clk = 0, rst;
  logic [15:0] intline, msr, intr;
  logic enif, ack, req;
  logic [3:0] ack_id, id;
  logic [15:0] ref_intr;
  int checks = 0, failures = 0, cycles = 0;

  sparc_intc dut (.clk, .rst, .intline, .msr, .enif, .ack, .ack_id, .intr, .req, .id);

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  function automatic int lowest(input logic [15:0] v);
    for (int i = 0; i < 16; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    rst = 1; intline = 0; msr = 0; enif = 0; ack = 0; ack_id = 0;
    ref_intr = 0;
    @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 3000; k++) begin
      intline = ($urandom % 4 == 0) ? 16'(1 << ($urandom % 16)) : 16'h0;
      msr     = ($urandom % 8 == 0) ? 16'($urandom) : 16'hFFFF;
      enif    = ($urandom % 5 != 0);
      #1;
      checks += 3;
      if (intr !== ref_intr) failures++;
      if (req !== (enif && |(ref_intr & msr))) failures++;
      if (req && id !== 4'(lowest(ref_intr & msr))) begin
        failures++;
        if (failures < 10) $display("FAIL id=%0d pend=%h", id, ref_intr & msr);
      end
      ack = req && ($urandom % 2 == 0);
      ack_id = id;
      @(posedge clk);
      for (int i = 0; i < 16; i++) begin
        if (intline[i]) ref_intr[i] = 1'b1;
        else if (ack && ack_id == 4'(i)) ref_intr[i] = 1'b0;
      end
      #1; ack = 0;
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
