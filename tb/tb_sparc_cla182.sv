// tb_sparc_cla182: exhaustive test of the carry-lookahead unit. For every
// combination of the four slice p/g pairs and the carry in, the expected
// carries are formed by rippling c(i+1) = g(i) | p(i) & c(i).
module tb_sparc_cla182;
  logic [3:0] p, g;
  logic cn, cx, cy, cz, pg, gg;
  int checks = 0, failures = 0;

  sparc_cla182 dut (.p, .g, .cn, .cx, .cy, .cz, .pg, .gg);

  initial begin
    logic [4:0] c;
    for (int i = 0; i < 512; i++) begin
      {p, g, cn} = 9'(i);
      #1;
      c[0] = cn;
      for (int k = 0; k < 4; k++) c[k+1] = g[k] | (p[k] & c[k]);
      checks++;
      if ({cx, cy, cz} !== {c[1], c[2], c[3]} || pg !== &p || (gg | (pg & cn)) !== c[4]) begin
        failures++;
        $display("FAIL p=%b g=%b cn=%b", p, g, cn);
      end
      checks++;
      // group generate alone: carry out with no carry in
      begin
        logic [4:0] c0;
        c0[0] = 1'b0;
        for (int k = 0; k < 4; k++) c0[k+1] = g[k] | (p[k] & c0[k]);
        if (gg !== c0[4]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
