// tb_sparc_alu: random and corner-case test of the 16-bit ALU against a
// reference model written with plain 17-bit integer arithmetic and the
// PDP-11 flag rules.
module tb_sparc_alu;
  import sparc_pkg::*;
  alu_op_e op;
  word_t   a, b, y;
  logic    cin;
  flags_t  fl;
  int checks = 0, failures = 0;

  sparc_alu dut (.op, .a, .b, .cin, .y, .flags(fl));

  function automatic void model(input alu_op_e o, input word_t a, input word_t b, input logic ci,
                                output word_t r, output flags_t f);
    logic [16:0] w;
    logic signed [17:0] sw;
    f = '{n: 1'b0, z: 1'b0, v: 1'b0, c: ci};
    r = '0;
    case (o)
      ALU_PASSB: r = b;
      ALU_AND:   r = a & b;
      ALU_BIC:   r = a & ~b;
      ALU_OR:    r = a | b;
      ALU_XOR:   r = a ^ b;
      ALU_CLR:   begin r = 0; f.c = 0; end
      ALU_COM:   begin r = ~a; f.c = 1; end
      ALU_TST:   begin r = a; f.c = 0; end
      ALU_ADD, ALU_ADDC, ALU_ADC: begin
        w  = {1'b0, a} + ((o == ALU_ADC) ? 17'd0 : {1'b0, b}) + ((o == ALU_ADD) ? 17'd0 : 17'(ci));
        sw = 18'(signed'(a)) + ((o == ALU_ADC) ? 18'sd0 : 18'(signed'(b))) + ((o == ALU_ADD) ? 18'sd0 : 18'(ci));
        r = w[15:0]; f.c = w[16]; f.v = (sw > 32767 || sw < -32768);
      end
      ALU_SUB, ALU_SUBC, ALU_SBC, ALU_CMP, ALU_NEG: begin
        word_t x, z; logic bi;
        x = a; z = b; bi = 0;
        if (o == ALU_CMP) begin x = b; z = a; end
        if (o == ALU_NEG) begin x = 0; z = a; end
        if (o == ALU_SBC) z = 0;
        if (o == ALU_SUBC || o == ALU_SBC) bi = ci;
        w  = {1'b0, x} - {1'b0, z} - 17'(bi);
        sw = 18'(signed'(x)) - 18'(signed'(z)) - 18'(bi);
        r = w[15:0]; f.c = w[16]; f.v = (sw > 32767 || sw < -32768);
      end
      ALU_INC: begin r = a + 1; f.v = (a == 16'h7FFF); end
      ALU_DEC: begin r = a - 1; f.v = (a == 16'h8000); end
      ALU_LSR: begin r = a >> 1; f.c = a[0]; end
      ALU_ASR: begin r = word_t'(signed'(a) >>> 1); f.c = a[0]; end
      ALU_ASL: begin r = a << 1; f.c = a[15]; end
      ALU_ROR: begin r = {ci, a[15:1]}; f.c = a[0]; end
      ALU_ROL: begin r = {a[14:0], ci}; f.c = a[15]; end
      ALU_SWAB: begin r = {a[7:0], a[15:8]}; f.c = 0; end
      default: ;
    endcase
    f.n = r[15];
    f.z = (r == 0);
    if (o inside {ALU_LSR, ALU_ASR, ALU_ASL, ALU_ROR, ALU_ROL}) f.v = f.n ^ f.c;
    if (o == ALU_SWAB) begin f.n = r[7]; f.z = (r[7:0] == 0); f.v = 0; end
  endfunction

  task automatic check_one(input alu_op_e o, input word_t x, input word_t z, input logic c);
    word_t r; flags_t f;
    op = o; a = x; b = z; cin = c;
    #1;
    model(o, x, z, c, r, f);
    checks++;
    if (y !== r || fl !== f) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h c=%b y=%h exp=%h flags=%b exp=%b", o.name(), x, z, c, y, r, fl, f);
    end
  endtask

  localparam word_t CORNER[6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5555};

  initial begin
    for (int o = 0; o <= int'(ALU_SWAB); o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          for (int c = 0; c < 2; c++)
            check_one(alu_op_e'(o), CORNER[i], CORNER[j], 1'(c));
      for (int k = 0; k < 2000; k++)
        check_one(alu_op_e'(o), 16'($urandom), 16'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
