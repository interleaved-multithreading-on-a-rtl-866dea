// Instruction decode stage (the DI entity).
// Holds the EI/DI stage register. It decodes the MIPS-I instruction word into the control
// bundle used by EX and MEM, presents the source register numbers to the register bank of
// the instruction's own thread, and packs the (bypassed) operand values, immediate, shift
// amount, jump index and coprocessor-0 register number for EX.
// Supported: SLL SRL SRA SLLV SRLV SRAV JR JALR SYSCALL BREAK MFHI MTHI MFLO MTLO MULT MULTU
// DIV DIVU ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU, BLTZ BGEZ BLTZAL BGEZAL, J JAL BEQ BNE
// BLEZ BGTZ, ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI, MFC0 MTC0 RFE, LB LH LW LBU LHU SB SH SW.
// Any other word is flagged illegal and raises a reserved-instruction exception in EX.
// Encodings are those of the MIPS-I instruction set; the control bundle is this design's.
//   advance        : load the stage register from EI
//   in             : fetched instruction
//   tid, rs_addr, rt_addr : register-bank read request
//   rs_val, rt_val : operands after the bypass
//   out            : decoded instruction for EX
module di_stage
  import mips_imt_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     advance,
  input  ei_di_t   in,
  output tid_t     tid,
  output regaddr_t rs_addr,
  output regaddr_t rt_addr,
  input  word_t    rs_val,
  input  word_t    rt_val,
  output di_ex_t   out
);
  ei_di_t r;

  always_ff @(posedge clk) begin
    if (!rst_n)       r <= '0;
    else if (advance) r <= in;
  end

  function automatic ctrl_t decode(input word_t ir);
    ctrl_t c;
    logic [5:0] op, fn;
    regaddr_t rs, rt, rd;
    word_t sext, zext;
    op   = ir[31:26];
    fn   = ir[5:0];
    rs   = ir[25:21];
    rt   = ir[20:16];
    rd   = ir[15:11];
    sext = {{16{ir[15]}}, ir[15:0]};
    zext = {16'b0, ir[15:0]};
    c = '0;
    c.alu_op  = ALU_ADD;
    c.res_sel = RES_ALU;
    c.br      = BR_NONE;
    c.jmp     = JMP_NONE;
    c.md      = MD_NONE;
    c.size    = SZ_WORD;
    c.imm     = sext;
    unique case (op)
      6'h00: begin
        c.rd = rd;
        c.reg_write = 1'b1;
        unique case (fn)
          6'h00: c.alu_op = ALU_SLL;
          6'h02: c.alu_op = ALU_SRL;
          6'h03: c.alu_op = ALU_SRA;
          6'h04: begin c.alu_op = ALU_SLL; c.shamt_var = 1'b1; end
          6'h06: begin c.alu_op = ALU_SRL; c.shamt_var = 1'b1; end
          6'h07: begin c.alu_op = ALU_SRA; c.shamt_var = 1'b1; end
          6'h08: begin c.jmp = JMP_REG; c.reg_write = 1'b0; end
          6'h09: begin c.jmp = JMP_REG; c.res_sel = RES_LINK; end
          6'h0C: begin c.syscall = 1'b1; c.reg_write = 1'b0; end
          6'h0D: begin c.brk = 1'b1; c.reg_write = 1'b0; end
          6'h10: begin c.res_sel = RES_HILO; c.hilo_hi = 1'b1; end
          6'h11: begin c.md = MD_MTHI; c.reg_write = 1'b0; end
          6'h12: begin c.res_sel = RES_HILO; c.hilo_hi = 1'b0; end
          6'h13: begin c.md = MD_MTLO; c.reg_write = 1'b0; end
          6'h18: begin c.md = MD_MULT;  c.reg_write = 1'b0; end
          6'h19: begin c.md = MD_MULTU; c.reg_write = 1'b0; end
          6'h1A: begin c.md = MD_DIV;   c.reg_write = 1'b0; end
          6'h1B: begin c.md = MD_DIVU;  c.reg_write = 1'b0; end
          6'h20: begin c.alu_op = ALU_ADD; c.trap_ov = 1'b1; end
          6'h21: c.alu_op = ALU_ADD;
          6'h22: begin c.alu_op = ALU_SUB; c.trap_ov = 1'b1; end
          6'h23: c.alu_op = ALU_SUB;
          6'h24: c.alu_op = ALU_AND;
          6'h25: c.alu_op = ALU_OR;
          6'h26: c.alu_op = ALU_XOR;
          6'h27: c.alu_op = ALU_NOR;
          6'h2A: c.alu_op = ALU_SLT;
          6'h2B: c.alu_op = ALU_SLTU;
          default: begin c.illegal = 1'b1; c.reg_write = 1'b0; end
        endcase
      end
      6'h01: begin
        unique case (rt)
          5'h00: c.br = BR_LTZ;
          5'h01: c.br = BR_GEZ;
          5'h10: begin c.br = BR_LTZ; c.br_link = 1'b1; end
          5'h11: begin c.br = BR_GEZ; c.br_link = 1'b1; end
          default: c.illegal = 1'b1;
        endcase
        if (c.br_link) begin
          c.reg_write = 1'b1;
          c.rd        = 5'd31;
          c.res_sel   = RES_LINK;
        end
      end
      6'h02: c.jmp = JMP_IMM;
      6'h03: begin c.jmp = JMP_IMM; c.reg_write = 1'b1; c.rd = 5'd31; c.res_sel = RES_LINK; end
      6'h04: c.br = BR_EQ;
      6'h05: c.br = BR_NE;
      6'h06: c.br = BR_LEZ;
      6'h07: c.br = BR_GTZ;
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F: begin
        c.rd        = rt;
        c.reg_write = 1'b1;
        c.b_imm     = 1'b1;
        unique case (op[2:0])
          3'd0: begin c.alu_op = ALU_ADD; c.trap_ov = 1'b1; end
          3'd1: c.alu_op = ALU_ADD;
          3'd2: c.alu_op = ALU_SLT;
          3'd3: c.alu_op = ALU_SLTU;
          3'd4: begin c.alu_op = ALU_AND; c.imm = zext; end
          3'd5: begin c.alu_op = ALU_OR;  c.imm = zext; end
          3'd6: begin c.alu_op = ALU_XOR; c.imm = zext; end
          default: begin c.alu_op = ALU_LUI; c.imm = {ir[15:0], 16'b0}; end
        endcase
      end
      6'h10: begin
        if (rs == 5'h00) begin
          c.mfc0 = 1'b1; c.reg_write = 1'b1; c.rd = rt; c.res_sel = RES_COP0;
        end else if (rs == 5'h04) begin
          c.mtc0 = 1'b1;
        end else if (rs[4] && fn == 6'h10) begin
          c.rfe = 1'b1;
        end else begin
          c.illegal = 1'b1;
        end
      end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
        c.load = 1'b1; c.reg_write = 1'b1; c.rd = rt;
        c.load_unsigned = op[2];
        c.size = (op[1:0] == 2'b00) ? SZ_BYTE : (op[1:0] == 2'b01) ? SZ_HALF : SZ_WORD;
      end
      6'h28, 6'h29, 6'h2B: begin
        c.store = 1'b1;
        c.size = (op[1:0] == 2'b00) ? SZ_BYTE : (op[1:0] == 2'b01) ? SZ_HALF : SZ_WORD;
      end
      default: c.illegal = 1'b1;
    endcase
    return c;
  endfunction

  always_comb begin
    tid         = r.tid;
    rs_addr     = r.instr[25:21];
    rt_addr     = r.instr[20:16];
    out.valid   = r.valid;
    out.tid     = r.tid;
    out.pc      = r.pc;
    out.ctrl    = decode(r.instr);
    out.rs_val  = rs_val;
    out.rt_val  = rt_val;
    out.shamt   = r.instr[10:6];
    out.jidx    = r.instr[25:0];
    out.cp0_reg = r.instr[15:11];
  end
endmodule
