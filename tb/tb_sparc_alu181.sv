// tb_sparc_alu181: exhaustive test of the 4-bit ALU slice against the
// 74181 function table (active-high data) written out function by function:
// all 16 logic functions and all 16 arithmetic functions, every a, b and
// carry in. Also checks p/g against the carry out of a 5-bit sum.
module tb_sparc_alu181;
  logic [3:0] a, b, s, f;
  logic       m, cin, p, g, cout, aeqb;
  int checks = 0, failures = 0;

  sparc_alu181 dut (.a, .b, .s, .m, .cin, .f, .p, .g, .cout, .aeqb);

  function automatic logic [3:0] logic_ref(input logic [3:0] s, input logic [3:0] a, input logic [3:0] b);
    case (s)
      4'h0: return ~a;        4'h1: return ~(a | b);
      4'h2: return ~a & b;    4'h3: return 4'h0;
      4'h4: return ~(a & b);  4'h5: return ~b;
      4'h6: return a ^ b;     4'h7: return a & ~b;
      4'h8: return ~a | b;    4'h9: return ~(a ^ b);
      4'hA: return b;         4'hB: return a & b;
      4'hC: return 4'hF;      4'hD: return a | ~b;
      4'hE: return a | b;     default: return a;
    endcase
  endfunction

  // arithmetic: result = first + second + cin, 5 bits wide
  function automatic logic [4:0] arith_ref(input logic [3:0] s, input logic [3:0] a, input logic [3:0] b, input logic c);
    logic [3:0] x, y;
    case (s)
      4'h0: begin x = a;          y = 0;        end
      4'h1: begin x = a | b;      y = 0;        end
      4'h2: begin x = a | ~b;     y = 0;        end
      4'h3: begin x = 4'hF;      y = 0;        end  // minus 1
      4'h4: begin x = a;          y = a & ~b;   end
      4'h5: begin x = a | b;      y = a & ~b;   end
      4'h6: begin x = a;          y = ~b; end  // A minus B minus 1
      4'h7: begin x = a & ~b;     y = 4'hF;    end
      4'h8: begin x = a;          y = a & b;    end
      4'h9: begin x = a;          y = b;        end
      4'hA: begin x = a | ~b;     y = a & b;    end
      4'hB: begin x = a & b;      y = 4'hF;    end
      4'hC: begin x = a;          y = a;        end
      4'hD: begin x = a | b;      y = a;        end
      4'hE: begin x = a | ~b;     y = a;        end
      default: begin x = a;       y = 4'hF;    end
    endcase
    return 5'(x) + 5'(y) + 5'(c);
  endfunction

  initial begin
    logic [4:0] r, r0, r1;
    for (int i = 0; i < 2*16*16*16*2; i++) begin
      {m, s, a, b, cin} = 14'(i);
      #1;
      if (m) begin
        checks++;
        if (f !== logic_ref(s, a, b)) begin
          failures++;
          $display("FAIL logic s=%h a=%h b=%h f=%h", s, a, b, f);
        end
      end else begin
        r = arith_ref(s, a, b, cin);
        checks++;
        if (f !== r[3:0] || cout !== r[4]) begin
          failures++;
          $display("FAIL arith s=%h a=%h b=%h cin=%b f=%h cout=%b exp=%h", s, a, b, cin, f, cout, r);
        end
        // generate = carry out with cin 0, propagate|generate = carry out with cin 1
        checks++;
        r0 = arith_ref(s, a, b, 1'b0);
        r1 = arith_ref(s, a, b, 1'b1);
        if (g !== r0[4] || (g | p) !== r1[4]) begin
          failures++;
          $display("FAIL pg s=%h a=%h b=%h p=%b g=%b", s, a, b, p, g);
        end
      end
      checks++;
      if (aeqb !== (f == 4'hF)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
