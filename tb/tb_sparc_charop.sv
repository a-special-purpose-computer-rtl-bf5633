// tb_sparc_charop: test of the Arabic character field unit. Builds
// character words from random character, shape and vowel codes and checks
// every operation field by field against expected words assembled in the
// testbench.
module tb_sparc_charop;
  import sparc_pkg::*;
  chr_op_e    op;
  word_t      src, dst, y;
  logic [4:0] imm;
  logic       cin;
  flags_t     fl;
  int checks = 0, failures = 0;

  sparc_charop dut (.op, .src, .dst, .imm, .cin, .y, .flags(fl));

  function automatic word_t mkchar(input logic [6:0] ch, input logic [1:0] sh, input logic [4:0] vw);
    return {2'b00, ch, sh, vw};
  endfunction

  task automatic expect_eq(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [6:0] c1, c2; logic [1:0] s1, s2; logic [4:0] v1, v2;
      c1 = 7'($urandom); c2 = 7'($urandom);
      s1 = 2'($urandom); s2 = (k % 3 == 0) ? s1 : 2'($urandom);
      v1 = 5'($urandom); v2 = (k % 4 == 0) ? v1 : 5'($urandom);
      src = mkchar(c1, s1, v1);
      dst = mkchar(c2, s2, v2);
      imm = 5'($urandom);
      cin = 1'($urandom);

      op = CH_MOVS; #1;
      expect_eq("MOVS", y, mkchar(c2, s1, v2));
      expect_eq("MOVS flags", 16'(fl), 16'({1'b0, y == 0, 1'b0, cin}));
      op = CH_MOVV; #1;
      expect_eq("MOVV", y, mkchar(c2, s2, v1));
      op = CH_PUTS; #1;
      expect_eq("PUTS", y, mkchar(c2, imm[4:3], v2));
      op = CH_PUTV; #1;
      expect_eq("PUTV", y, mkchar(c2, s2, imm));
      op = CH_CMPS; #1;
      expect_eq("CMPS y", y, dst);
      expect_eq("CMPS z", 16'(fl.z), 16'(s1 == s2));
      expect_eq("CMPS c", 16'(fl.c), 16'(s1 < s2));
      op = CH_CMPV; #1;
      expect_eq("CMPV z", 16'(fl.z), 16'(v1 == v2));
      expect_eq("CMPV c", 16'(fl.c), 16'(v1 < v2));
      expect_eq("CMPV v", 16'(fl.v), 16'(0));
    end
    // the character code field never takes part in the compare
    src = mkchar(7'h28, SHAPE_RIGHT, 5'h03);
    dst = mkchar(7'h2A, SHAPE_RIGHT, 5'h03);
    op = CH_CMPS; #1; expect_eq("CMPS ignores char", 16'(fl.z), 16'(1));
    op = CH_CMPV; #1; expect_eq("CMPV ignores char", 16'(fl.z), 16'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
