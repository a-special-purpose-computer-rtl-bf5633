// sparc_cpu: the SPARC processor, a 16-bit PDP-11-like CPU with
// instructions for Arabic character shapes and vowels.
//
// Datapath: sixteen 16-bit registers (sparc_regfile; R15 is the PC, R14 the
// stack pointer), the 74181/74182-style ALU (sparc_alu), the character field
// unit (sparc_charop) and the interrupt logic (sparc_intc). Non-programmable
// registers, named after the machine's register-transfer description: IR,
// SR/SA (source operand and address), DR/DA (destination operand and
// address), RES (result), TEMP, MSR (interrupt mask), the flags N Z V C and
// the interrupt enable ENIF.
//
// Control: a multi-cycle state machine in the order of the machine's control
// sequence. Before each instruction it checks for an interrupt (S_IFCHK),
// fetches the word at PC (S_FETCH, waiting while the memory is busy), adds 2
// to the PC (S_PCINC), decodes, fetches the source and destination operands
// through the four addressing modes (register, register indirect,
// autoincrement, autodecrement), executes and writes the result back to a
// register or memory. A word after the instruction is read as an immediate
// with mode (R15)+. HALT returns to the wait-for-START state.
// Interrupt entry pushes the status word {ENIF,N,Z,V,C} and the PC, clears
// ENIF and jumps through the vector word at VEC_BASE + 2*line. RTI pops both.
// CALL pushes the PC and jumps to the operand's address (or a register's
// value in register mode); RTS pops the PC. See sparc_pkg for the formats.
//
// Memory port (to the primary memory controller): read or write with a byte
// address, held until busy is low at a clock edge; rdata is valid then.
// I/O bus: output word/byte put the data on io_dout with io_datavalid until
// io_accept_in; output command puts the word on cs_out with cs_rdy until
// io_accept_in; input word/byte wait for io_ready and take io_din, raising
// io_accept_out in that cycle; input status reads cs_in at once.
// Field positions, register count and roles, the addressing modes, the
// PUTS/PUTV format and the instruction classes follow the machine's
// description; opcode values, cycle counts, the stack frame, the vector
// table and the I/O handshakes are this design's own.
module sparc_cpu
  import sparc_pkg::*;
#(
  parameter word_t VEC_BASE = 16'hFFE0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] intline,
  output logic        reset_out,
  output logic        halted,
  // memory port
  output logic        mem_read,
  output logic        mem_write,
  output word_t       mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  input  logic        mem_busy,
  // I/O bus
  output word_t       io_dout,
  output logic        io_datavalid,
  input  logic        io_accept_in,
  input  word_t       io_din,
  input  logic        io_ready,
  output logic        io_accept_out,
  output word_t       cs_out,
  output logic        cs_rdy,
  input  word_t       cs_in
);
  typedef enum logic [4:0] {
    S_HALT, S_IFCHK, S_FETCH, S_PCINC, S_DECODE, S_SRC_EA, S_SRC_RD,
    S_DST_EA, S_DST_RD, S_EXEC, S_WB, S_IO, S_JUMP, S_CALL_DEC, S_CALL_WR,
    S_POP_RD, S_POP_INC, S_PSW_RD, S_PSW_INC, S_INT_DEC1, S_INT_WR1,
    S_INT_DEC2, S_INT_WR2, S_INT_VEC
  } state_e;

  state_e      state;
  word_t       ir, sr, sa, dr, da, res, temp, msr;
  flags_t      fl;
  logic        enif;
  logic [3:0]  int_id;

  // instruction fields
  logic [3:0]  op4, sreg, dreg, cond;
  logic [2:0]  grp, fn3;
  logic [4:0]  mfn, imm5;
  logic [1:0]  smode, dmode;
  logic        is_two, is_chr, is_jmp, is_call, is_in, io_ok, writes, need_rd;

  // register file ports
  logic [3:0]  ra, rb, wa;
  word_t       rva, rvb, wd;
  logic        we;

  // units
  alu_op_e     aop;
  word_t       alu_y, chr_y;
  flags_t      alu_f, chr_f;
  chr_op_e     cop;
  logic        int_req, int_ack;
  logic [3:0]  int_sel;
  logic [15:0] intr;
  word_t       ea_next;     // effective address for modes 1..3
  word_t       reg_next;    // register update for modes 2 and 3
  word_t       br_target;

  always_comb begin
    op4   = ir[15:12];
    grp   = ir[11:9];
    fn3   = ir[8:6];
    mfn   = ir[8:4];
    imm5  = ir[8:4];
    smode = ir[11:10];
    sreg  = ir[9:6];
    dmode = ir[5:4];
    dreg  = ir[3:0];
    cond  = ir[11:8];
    is_two  = (op4 != OP_GRP0) && (op4 != OP_BR);
    is_chr  = is_two && (op4 inside {OP_MOVS, OP_MOVV, OP_CMPS, OP_CMPV});
    is_jmp  = (op4 == OP_GRP0) && (grp == G_ONEB) && (fn3 == B_JMP);
    is_call = (op4 == OP_GRP0) && (grp == G_ONEB) && (fn3 == B_CALL);
    is_in   = (op4 == OP_GRP0) && (grp == G_IO) && fn3[2];
    io_ok   = !(fn3 inside {IO_RSV3, IO_RSV7});
    if (is_two)
      writes = !(op4 inside {OP_CMP, OP_BIT, OP_CMPS, OP_CMPV});
    else if (grp == G_ONEA)
      writes = (fn3 != A_TST);
    else if (grp == G_ONEB)
      writes = 1'b1;
    else
      writes = is_in;
    need_rd = !(is_jmp || is_call || is_in ||
                (is_two && op4 == OP_MOV) ||
                (!is_two && grp == G_ONEA && fn3 == A_CLR));
    br_target = rvb + {{7{ir[7]}}, ir[7:0], 1'b0};
  end

  // ALU operation for the instruction in IR
  always_comb begin
    aop = ALU_PASSB;
    if (is_two) begin
      unique case (op_e'(op4))
        OP_CMP:  aop = ALU_CMP;
        OP_BIT:  aop = ALU_AND;
        OP_BIC:  aop = ALU_BIC;
        OP_BIS:  aop = ALU_OR;
        OP_ADD:  aop = ALU_ADD;
        OP_SUB:  aop = ALU_SUB;
        OP_XOR:  aop = ALU_XOR;
        OP_ADDC: aop = ALU_ADDC;
        OP_SUBC: aop = ALU_SUBC;
        default: aop = ALU_PASSB;
      endcase
    end else if (grp == G_ONEA) begin
      unique case (onea_e'(fn3))
        A_CLR: aop = ALU_CLR;
        A_COM: aop = ALU_COM;
        A_INC: aop = ALU_INC;
        A_DEC: aop = ALU_DEC;
        A_NEG: aop = ALU_NEG;
        A_TST: aop = ALU_TST;
        A_ADC: aop = ALU_ADC;
        A_SBC: aop = ALU_SBC;
      endcase
    end else begin
      unique case (oneb_e'(fn3))
        B_LSR:   aop = ALU_LSR;
        B_ASR:   aop = ALU_ASR;
        B_ASL:   aop = ALU_ASL;
        B_ROR:   aop = ALU_ROR;
        B_ROL:   aop = ALU_ROL;
        B_SWAB:  aop = ALU_SWAB;
        default: aop = ALU_PASSB;
      endcase
    end
    unique case (op_e'(op4))
      OP_MOVS: cop = CH_MOVS;
      OP_MOVV: cop = CH_MOVV;
      OP_CMPS: cop = CH_CMPS;
      OP_CMPV: cop = CH_CMPV;
      default: cop = (grp == G_PUTS) ? CH_PUTS : CH_PUTV;
    endcase
  end

  sparc_regfile #(.NREGS(16), .WIDTH(16)) u_rf (
    .clk, .rst, .ra_addr(ra), .ra_data(rva), .rb_addr(rb), .rb_data(rvb),
    .we, .wa, .wd
  );

  sparc_alu u_alu (.op(aop), .a(dr), .b(sr), .cin(fl.c), .y(alu_y), .flags(alu_f));

  // PUTS/PUTV work on the register itself, the others on the fetched operands
  sparc_charop u_chr (
    .op(cop), .src(sr), .dst(is_two ? dr : rva), .imm(imm5), .cin(fl.c),
    .y(chr_y), .flags(chr_f)
  );

  sparc_intc #(.NLINES(16)) u_intc (
    .clk, .rst, .intline, .msr, .enif, .ack(int_ack), .ack_id(int_id),
    .intr, .req(int_req), .id(int_sel)
  );

  // Register ports, effective addresses and bus outputs
  always_comb begin
    logic [1:0] mode;
    ra = (state == S_SRC_EA) ? sreg :
         (state inside {S_CALL_WR, S_INT_WR2}) ? REG_PC : dreg;
    rb = (state inside {S_CALL_DEC, S_CALL_WR, S_POP_RD, S_POP_INC, S_PSW_RD,
                        S_PSW_INC, S_INT_DEC1, S_INT_WR1, S_INT_DEC2, S_INT_WR2})
         ? REG_SP : REG_PC;
    mode     = (state == S_SRC_EA) ? smode : dmode;
    reg_next = (mode == AM_AUTODEC) ? rva - 16'd2 : rva + 16'd2;
    ea_next  = (mode == AM_AUTODEC) ? reg_next : rva;

    mem_read      = 1'b0;
    mem_write     = 1'b0;
    mem_addr      = rvb;
    mem_wdata     = res;
    io_dout       = dr;
    io_datavalid  = 1'b0;
    io_accept_out = 1'b0;
    cs_out        = dr;
    cs_rdy        = 1'b0;
    int_ack       = 1'b0;
    unique case (state)
      S_FETCH:   mem_read = 1'b1;
      S_SRC_RD:  begin mem_read = 1'b1; mem_addr = sa; end
      S_DST_RD:  begin mem_read = 1'b1; mem_addr = da; end
      S_WB:      begin mem_write = (dmode != AM_REG); mem_addr = da; end
      S_CALL_WR, S_INT_WR2: begin mem_write = 1'b1; mem_wdata = rva; end
      S_INT_WR1: begin mem_write = 1'b1; mem_wdata = {11'b0, enif, fl}; end
      S_POP_RD, S_PSW_RD: mem_read = 1'b1;
      S_INT_VEC: begin
        mem_read = 1'b1;
        mem_addr = VEC_BASE + {11'b0, int_id, 1'b0};
        int_ack  = !mem_busy;
      end
      S_IO: begin
        unique case (io_e'(fn3))
          IO_OUTW: io_datavalid = 1'b1;
          IO_OUTB: begin io_datavalid = 1'b1; io_dout = {8'h00, dr[7:0]}; end
          IO_OUTC: cs_rdy = 1'b1;
          IO_INW, IO_INB: io_accept_out = io_ready;
          default: ;
        endcase
      end
      default: ;
    endcase

    // register file write port
    we = 1'b0;
    wa = dreg;
    wd = res;
    unique case (state)
      S_PCINC:  begin we = 1'b1; wa = REG_PC; wd = rvb + 16'd2; end
      S_DECODE: begin we = (op4 == OP_BR) && branch_taken(cond, fl); wa = REG_PC; wd = br_target; end
      S_SRC_EA: begin we = (smode inside {AM_AUTOINC, AM_AUTODEC}); wa = sreg; wd = reg_next; end
      S_DST_EA: begin we = (dmode inside {AM_AUTOINC, AM_AUTODEC}); wa = dreg; wd = reg_next; end
      S_EXEC:   begin we = (op4 == OP_GRP0) && (grp inside {G_PUTS, G_PUTV}); wa = dreg; wd = chr_y; end
      S_WB:     begin we = (dmode == AM_REG); wa = dreg; wd = res; end
      S_JUMP:   begin we = 1'b1; wa = REG_PC; wd = temp; end
      S_CALL_WR: begin we = !mem_busy; wa = REG_PC; wd = temp; end
      S_CALL_DEC, S_INT_DEC1, S_INT_DEC2: begin we = 1'b1; wa = REG_SP; wd = rvb - 16'd2; end
      S_POP_INC, S_PSW_INC: begin we = 1'b1; wa = REG_SP; wd = rvb + 16'd2; end
      S_POP_RD, S_INT_VEC: begin we = !mem_busy; wa = REG_PC; wd = mem_rdata; end
      default: ;
    endcase
  end

  assign halted = (state == S_HALT);

  always_ff @(posedge clk) begin
    reset_out <= rst;
    if (rst) begin
      state  <= S_HALT;
      ir     <= '0;
      sr     <= '0;
      sa     <= '0;
      dr     <= '0;
      da     <= '0;
      res    <= '0;
      temp   <= '0;
      msr    <= '0;
      fl     <= '0;
      enif   <= 1'b0;
      int_id <= '0;
    end else begin
      unique case (state)
        S_HALT:  if (start) state <= S_IFCHK;
        S_IFCHK: state <= int_req ? S_INT_DEC1 : S_FETCH;
        S_FETCH: if (!mem_busy) begin
          ir    <= mem_rdata;
          state <= S_PCINC;
        end
        S_PCINC: state <= S_DECODE;
        S_DECODE: begin
          state <= S_IFCHK;
          if (is_two) begin
            state <= S_SRC_EA;
          end else if (op4 == OP_GRP0) begin
            unique case (grp_e'(grp))
              G_MISC: begin
                unique case (mfn)
                  M_HALT:  state <= S_HALT;
                  M_RTI, M_RTS: state <= S_POP_RD;
                  M_CLCC:  fl   <= fl & ~ir[3:0];
                  M_SECC:  fl   <= fl | ir[3:0];
                  M_EI:    enif <= 1'b1;
                  M_DI:    enif <= 1'b0;
                  M_MTMSR: msr  <= rva;
                  default: ;
                endcase
              end
              G_PUTS, G_PUTV: state <= S_EXEC;
              G_ONEA, G_ONEB: state <= S_DST_EA;
              G_IO:    if (io_ok) state <= S_DST_EA;
              default: ;
            endcase
          end
        end
        S_SRC_EA: begin
          if (smode == AM_REG) begin
            sr    <= rva;
            state <= S_DST_EA;
          end else begin
            sa    <= ea_next;
            state <= S_SRC_RD;
          end
        end
        S_SRC_RD: if (!mem_busy) begin
          sr    <= mem_rdata;
          state <= S_DST_EA;
        end
        S_DST_EA: begin
          if (dmode == AM_REG) begin
            dr   <= rva;
            temp <= rva;
          end else begin
            da   <= ea_next;
            temp <= ea_next;
          end
          if (is_call)                            state <= S_CALL_DEC;
          else if (is_jmp)                        state <= S_JUMP;
          else if (dmode != AM_REG && need_rd)    state <= S_DST_RD;
          else                                    state <= S_EXEC;
        end
        S_DST_RD: if (!mem_busy) begin
          dr    <= mem_rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          state <= S_IFCHK;
          if (is_chr || (op4 == OP_GRP0 && grp inside {G_PUTS, G_PUTV})) begin
            fl  <= chr_f;
            res <= chr_y;
            if (is_chr && writes) state <= S_WB;
          end else if (op4 == OP_GRP0 && grp == G_IO) begin
            state <= S_IO;
          end else begin
            fl  <= alu_f;
            res <= alu_y;
            if (writes) state <= S_WB;
          end
        end
        S_IO: begin
          unique case (io_e'(fn3))
            IO_OUTW, IO_OUTB, IO_OUTC: if (io_accept_in) state <= S_IFCHK;
            IO_INW: if (io_ready) begin res <= io_din; state <= S_WB; end
            IO_INB: if (io_ready) begin res <= {8'h00, io_din[7:0]}; state <= S_WB; end
            IO_INS: begin res <= cs_in; state <= S_WB; end
            default: state <= S_IFCHK;
          endcase
        end
        S_WB:       if (dmode == AM_REG || !mem_busy) state <= S_IFCHK;
        S_JUMP:     state <= S_IFCHK;
        S_CALL_DEC: state <= S_CALL_WR;
        S_CALL_WR:  if (!mem_busy) state <= S_IFCHK;
        S_POP_RD:   if (!mem_busy) state <= S_POP_INC;
        S_POP_INC:  state <= (mfn == M_RTI) ? S_PSW_RD : S_IFCHK;
        S_PSW_RD: if (!mem_busy) begin
          fl    <= mem_rdata[3:0];
          enif  <= mem_rdata[4];
          state <= S_PSW_INC;
        end
        S_PSW_INC:  state <= S_IFCHK;
        S_INT_DEC1: begin int_id <= int_sel; state <= S_INT_WR1; end
        S_INT_WR1:  if (!mem_busy) state <= S_INT_DEC2;
        S_INT_DEC2: state <= S_INT_WR2;
        S_INT_WR2:  if (!mem_busy) state <= S_INT_VEC;
        S_INT_VEC: if (!mem_busy) begin
          enif  <= 1'b0;
          state <= S_IFCHK;
        end
        default: state <= S_HALT;
      endcase
    end
  end

  // Memory handshake: a request is held until the controller completes it.
  a_mem_hold: assert property (@(posedge clk) disable iff (rst)
    (mem_read && mem_busy) |=> mem_read);
  a_mem_excl: assert property (@(posedge clk) disable iff (rst)
    !(mem_read && mem_write));
endmodule
