// Test of the decode stage: a directed list of MIPS-I instructions, one per cycle, with the
// expected control fields written out here from the instruction-set definition, plus the
// register-number outputs, operand pass-through and the hold of the stage register.
module tb_di_stage;
  import mips_imt_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 0, rst_n = 0, advance = 0;
  ei_di_t in = '0;
  tid_t tid;
  regaddr_t rs_addr, rt_addr;
  word_t rs_val = 32'h1111_1111, rt_val = 32'h2222_2222;
  di_ex_t out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  di_stage dut (.*);

  task automatic put(input logic [31:0] ir);
    in = '{valid: 1, tid: 1, pc: 32'h0000_0100, instr: ir};
    advance = 1;
    @(posedge clk); #1 advance = 0;
  endtask
  task automatic expect_c(input string n, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", n); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    expect_c("reset bubble", !out.valid);
    put(addu(3, 1, 2));
    expect_c("addu", out.valid && out.tid == 1 && out.ctrl.reg_write && out.ctrl.rd == 3 &&
             out.ctrl.alu_op == ALU_ADD && !out.ctrl.b_imm && !out.ctrl.trap_ov &&
             rs_addr == 1 && rt_addr == 2 && tid == 1 && out.rs_val == rs_val && out.rt_val == rt_val);
    put(add(3, 1, 2));       expect_c("add", out.ctrl.trap_ov && out.ctrl.alu_op == ALU_ADD);
    put(sub(4, 1, 2));       expect_c("sub", out.ctrl.trap_ov && out.ctrl.alu_op == ALU_SUB && out.ctrl.rd == 4);
    put(nor_r(4, 1, 2));     expect_c("nor", out.ctrl.alu_op == ALU_NOR);
    put(sltu(4, 1, 2));      expect_c("sltu", out.ctrl.alu_op == ALU_SLTU);
    put(addiu(5, 6, -3));    expect_c("addiu", out.ctrl.rd == 5 && out.ctrl.b_imm && out.ctrl.imm == 32'hFFFF_FFFD && rs_addr == 6 && !out.ctrl.trap_ov);
    put(addi(5, 6, 1));      expect_c("addi", out.ctrl.trap_ov && out.ctrl.b_imm);
    put(slti(5, 6, -1));     expect_c("slti", out.ctrl.alu_op == ALU_SLT && out.ctrl.imm == '1);
    put(andi(5, 6, 'h8000)); expect_c("andi zero-extends", out.ctrl.imm == 32'h0000_8000 && out.ctrl.alu_op == ALU_AND);
    put(xori(5, 6, 'hF0F0)); expect_c("xori", out.ctrl.imm == 32'h0000_F0F0 && out.ctrl.alu_op == ALU_XOR);
    put(lui(7, 'h1234));     expect_c("lui", out.ctrl.imm == 32'h1234_0000 && out.ctrl.alu_op == ALU_LUI && out.ctrl.rd == 7);
    put(lw(8, -4, 9));       expect_c("lw", out.ctrl.load && out.ctrl.size == SZ_WORD && out.ctrl.rd == 8 && out.ctrl.imm == 32'hFFFF_FFFC && out.ctrl.reg_write);
    put(lbu(8, 1, 9));       expect_c("lbu", out.ctrl.load && out.ctrl.size == SZ_BYTE && out.ctrl.load_unsigned);
    put(lh(8, 2, 9));        expect_c("lh", out.ctrl.load && out.ctrl.size == SZ_HALF && !out.ctrl.load_unsigned);
    put(sh(8, 2, 9));        expect_c("sh", out.ctrl.store && out.ctrl.size == SZ_HALF && !out.ctrl.reg_write && rt_addr == 8);
    put(sb(8, 2, 9));        expect_c("sb", out.ctrl.store && out.ctrl.size == SZ_BYTE);
    put(beq(1, 2, 5));       expect_c("beq", out.ctrl.br == BR_EQ && !out.ctrl.reg_write && out.ctrl.imm == 5);
    put(bne(1, 2, -2));      expect_c("bne", out.ctrl.br == BR_NE);
    put(blez(1, 3));         expect_c("blez", out.ctrl.br == BR_LEZ);
    put(bgtz(1, 3));         expect_c("bgtz", out.ctrl.br == BR_GTZ);
    put(bltz(1, 3));         expect_c("bltz", out.ctrl.br == BR_LTZ && !out.ctrl.reg_write);
    put(bgezal(1, 3));       expect_c("bgezal", out.ctrl.br == BR_GEZ && out.ctrl.br_link && out.ctrl.rd == 31 && out.ctrl.res_sel == RES_LINK);
    put(jal(32'h0040_0010)); expect_c("jal", out.ctrl.jmp == JMP_IMM && out.ctrl.rd == 31 && out.ctrl.reg_write && out.jidx == 26'h010_0004);
    put(j(32'h0040_0010));   expect_c("j", out.ctrl.jmp == JMP_IMM && !out.ctrl.reg_write);
    put(jalr(4, 5));         expect_c("jalr", out.ctrl.jmp == JMP_REG && out.ctrl.rd == 4 && out.ctrl.res_sel == RES_LINK);
    put(jr(5));              expect_c("jr", out.ctrl.jmp == JMP_REG && !out.ctrl.reg_write);
    put(sllv(1, 2, 3));      expect_c("sllv", out.ctrl.alu_op == ALU_SLL && out.ctrl.shamt_var);
    put(sra(1, 2, 7));       expect_c("sra", out.ctrl.alu_op == ALU_SRA && !out.ctrl.shamt_var && out.shamt == 7);
    put(mult(1, 2));         expect_c("mult", out.ctrl.md == MD_MULT && !out.ctrl.reg_write);
    put(divu(1, 2));         expect_c("divu", out.ctrl.md == MD_DIVU);
    put(mthi(1));            expect_c("mthi", out.ctrl.md == MD_MTHI);
    put(mfhi(6));            expect_c("mfhi", out.ctrl.res_sel == RES_HILO && out.ctrl.hilo_hi && out.ctrl.rd == 6);
    put(mflo(6));            expect_c("mflo", out.ctrl.res_sel == RES_HILO && !out.ctrl.hilo_hi);
    put(mfc0(3, 12));        expect_c("mfc0", out.ctrl.mfc0 && out.ctrl.rd == 3 && out.cp0_reg == 12 && out.ctrl.res_sel == RES_COP0);
    put(mtc0(3, 14));        expect_c("mtc0", out.ctrl.mtc0 && !out.ctrl.reg_write && out.cp0_reg == 14);
    put(rfe());              expect_c("rfe", out.ctrl.rfe && !out.ctrl.illegal);
    put(syscall_i());        expect_c("syscall", out.ctrl.syscall && !out.ctrl.reg_write);
    put(break_i());          expect_c("break", out.ctrl.brk);
    put(32'hFC00_0000);      expect_c("reserved opcode", out.ctrl.illegal && !out.ctrl.reg_write);
    put(rtype(6'h3F, 1, 2, 3)); expect_c("reserved funct", out.ctrl.illegal && !out.ctrl.reg_write);
    // the register holds while the pipeline is stalled
    in.instr = addu(9, 9, 9);
    @(posedge clk); #1;
    expect_c("hold", out.ctrl.illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
