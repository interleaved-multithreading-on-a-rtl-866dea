// Test of the execute stage. Hand-built decoded instructions are loaded one per cycle and
// the stage's outputs are compared with values computed here: random ALU operations (with
// the signed-overflow rule), shifts, branch conditions and targets, jumps and link values,
// load/store addresses and alignment exceptions, MULT/MULTU/DIV/DIVU results on HI/LO,
// MFHI/MFC0 results, the exception path (no write, PC reload to the vector) and the
// delay-slot flag for the instruction that follows a branch of the same thread.
module tb_ex_stage;
  import mips_imt_pkg::*;
  localparam word_t VEC = 32'h8000_0080;
  logic clk = 0, rst_n = 0, advance = 1;
  di_ex_t in = '0;
  tid_t tid;
  word_t hi = 32'hAAAA_0001, lo = 32'h5555_0002, hi_wdata, lo_wdata;
  logic hi_we, lo_we;
  logic cp_valid, cp_bd, cp_exc_req, cp_mtc0, cp_rfe;
  word_t cp_pc, cp_badvaddr, cp_wdata, cp_rdata = 32'hC0C0_0000;
  exc_e cp_exc_code;
  regaddr_t cp_reg;
  logic take_exc;
  word_t exc_vector = VEC;
  logic redirect, branch_taken;
  word_t redirect_target;
  ex_mem_t out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign take_exc = cp_valid && cp_exc_req;   // stands in for the coprocessor
  ex_stage dut (.*);

  function automatic di_ex_t mk(input alu_op_e op, input word_t a, input word_t b);
    di_ex_t x;
    x = '0;
    x.valid = 1; x.tid = 0; x.pc = 32'h0000_1000;
    x.ctrl.alu_op = op; x.ctrl.reg_write = 1; x.ctrl.rd = 5'd3;
    x.ctrl.res_sel = RES_ALU; x.ctrl.br = BR_NONE; x.ctrl.jmp = JMP_NONE; x.ctrl.md = MD_NONE;
    x.ctrl.size = SZ_WORD;
    x.rs_val = a; x.rt_val = b;
    return x;
  endfunction
  task automatic run(input di_ex_t x);
    in = x;
    @(posedge clk); #1;
    in = '0;
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
    di_ex_t x;
    @(posedge clk); #1 rst_n = 1;
    // random ALU operations
    for (int i = 0; i < 500; i++) begin
      word_t a, b, e;
      logic eov, t;
      alu_op_e op;
      a = $urandom; b = $urandom;
      if (i % 5 == 0) begin a = 32'h7FFF_FFF0 + 32'($urandom_range(0, 31)); b = 32'($urandom_range(0, 31)); end
      op = alu_op_e'($urandom_range(0, 7));
      t = $urandom;
      eov = 0;
      case (op)
        ALU_ADD:  begin e = a + b; eov = (a[31] == b[31]) && (e[31] != a[31]); end
        ALU_SUB:  begin e = a - b; eov = (a[31] != b[31]) && (e[31] != a[31]); end
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_XOR:  e = a ^ b;
        ALU_NOR:  e = ~(a | b);
        ALU_SLT:  e = ($signed(a) < $signed(b)) ? 1 : 0;
        default:  e = (a < b) ? 1 : 0;
      endcase
      x = mk(op, a, b);
      x.ctrl.trap_ov = t;
      run(x);
      if (t && eov)
        expect_c("overflow trap", cp_exc_req && cp_exc_code == EXC_OV && !out.valid &&
                 redirect && redirect_target == VEC);
      else
        expect_c($sformatf("alu op %0d", op), out.valid && out.result == e && !cp_exc_req && !redirect && out.rd == 3);
    end
    // immediate operand, shifts, LUI
    x = mk(ALU_ADD, 32'd10, 32'd0); x.ctrl.b_imm = 1; x.ctrl.imm = 32'hFFFF_FFFE;
    run(x); expect_c("addiu", out.result == 32'd8);
    x = mk(ALU_SRA, 32'd0, 32'h8000_0000); x.shamt = 4;
    run(x); expect_c("sra", out.result == 32'hF800_0000);
    x = mk(ALU_SRL, 32'd4, 32'h8000_0000); x.ctrl.shamt_var = 1; x.shamt = 9;
    run(x); expect_c("srlv", out.result == 32'h0800_0000);
    x = mk(ALU_SLL, 32'd0, 32'h0000_0003); x.shamt = 31;
    run(x); expect_c("sll", out.result == 32'h8000_0000);
    x = mk(ALU_LUI, 32'd0, 32'd0); x.ctrl.b_imm = 1; x.ctrl.imm = 32'h1234_0000;
    run(x); expect_c("lui", out.result == 32'h1234_0000);
    // branches
    x = mk(ALU_ADD, 32'd7, 32'd7); x.ctrl.reg_write = 0; x.ctrl.br = BR_EQ; x.ctrl.imm = 32'hFFFF_FFFC;
    run(x); expect_c("beq taken", redirect && branch_taken && redirect_target == 32'h0000_1000 + 4 - 16);
    // the next instruction of thread 0 is the delay slot
    x = mk(ALU_ADD, 32'd1, 32'd1);
    run(x); expect_c("delay slot flag", cp_bd && !redirect);
    x = mk(ALU_ADD, 32'd1, 32'd1);
    run(x); expect_c("no delay slot flag", !cp_bd);
    x = mk(ALU_ADD, 32'd7, 32'd8); x.ctrl.br = BR_EQ; x.ctrl.imm = 32'd3;
    run(x); expect_c("beq not taken", !redirect && !branch_taken);
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.br = BR_LEZ;
    run(x); expect_c("blez 0", redirect);
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.br = BR_GTZ;
    run(x); expect_c("bgtz 0", !redirect);
    x = mk(ALU_ADD, 32'hFFFF_FFFF, 32'd0); x.ctrl.br = BR_LTZ; x.ctrl.br_link = 1; x.ctrl.res_sel = RES_LINK; x.ctrl.rd = 31;
    x.ctrl.imm = 32'd2;
    run(x); expect_c("bltzal", redirect && redirect_target == 32'h0000_100C && out.result == 32'h0000_1008 && out.rd == 31);
    x = mk(ALU_ADD, 32'h0000_0001, 32'd0); x.ctrl.br = BR_GEZ;
    run(x); expect_c("bgez", redirect);
    // jumps
    x = mk(ALU_ADD, 32'd0, 32'd0); x.pc = 32'hBFC0_0010; x.ctrl.jmp = JMP_IMM; x.jidx = 26'h000_0040;
    x.ctrl.res_sel = RES_LINK;
    run(x); expect_c("jal", redirect && redirect_target == 32'hB000_0100 && out.result == 32'hBFC0_0018);
    x = mk(ALU_ADD, 32'h0000_2468, 32'd0); x.ctrl.jmp = JMP_REG;
    run(x); expect_c("jr", redirect && redirect_target == 32'h0000_2468);
    // loads and stores
    x = mk(ALU_ADD, 32'h0000_1000, 32'h0000_0055); x.ctrl.load = 1; x.ctrl.imm = 32'hFFFF_FFFC;
    run(x); expect_c("lw address", out.valid && out.load && out.result == 32'h0000_0FFC && !cp_exc_req);
    x = mk(ALU_ADD, 32'h0000_1000, 32'h0000_0055); x.ctrl.load = 1; x.ctrl.imm = 32'd2;
    run(x); expect_c("lw misaligned", cp_exc_req && cp_exc_code == EXC_ADEL && cp_badvaddr == 32'h0000_1002 && !out.valid);
    x = mk(ALU_ADD, 32'h0000_1000, 32'h0000_0055); x.ctrl.store = 1; x.ctrl.reg_write = 0; x.ctrl.size = SZ_HALF; x.ctrl.imm = 32'd1;
    run(x); expect_c("sh misaligned", cp_exc_req && cp_exc_code == EXC_ADES);
    x = mk(ALU_ADD, 32'h0000_1000, 32'h0000_0055); x.ctrl.store = 1; x.ctrl.reg_write = 0; x.ctrl.size = SZ_BYTE; x.ctrl.imm = 32'd3;
    run(x); expect_c("sb", out.valid && out.store && out.result == 32'h0000_1003 && out.store_data == 32'h55);
    // multiply / divide
    for (int i = 0; i < 200; i++) begin
      word_t a, b;
      logic [63:0] p;
      md_e m;
      a = $urandom; b = (i % 50 == 0) ? 0 : $urandom;
      m = md_e'($urandom_range(1, 4));
      x = mk(ALU_ADD, a, b); x.ctrl.reg_write = 0; x.ctrl.md = m;
      run(x);
      case (m)
        MD_MULT:  begin p = 64'($signed(a)) * 64'($signed(b)); expect_c("mult", hi_we && lo_we && {hi_wdata, lo_wdata} == p); end
        MD_MULTU: begin p = {32'b0, a} * {32'b0, b};         expect_c("multu", {hi_wdata, lo_wdata} == p); end
        MD_DIV:   if (b != 0) expect_c("div", lo_wdata == word_t'($signed(a) / $signed(b)) && hi_wdata == word_t'($signed(a) % $signed(b)));
        default:  if (b != 0) expect_c("divu", lo_wdata == a / b && hi_wdata == a % b);
      endcase
    end
    x = mk(ALU_ADD, 32'h1357, 32'd0); x.ctrl.md = MD_MTLO; x.ctrl.reg_write = 0;
    run(x); expect_c("mtlo", lo_we && !hi_we && lo_wdata == 32'h1357);
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.res_sel = RES_HILO; x.ctrl.hilo_hi = 1;
    run(x); expect_c("mfhi", out.result == hi);
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.res_sel = RES_COP0; x.cp0_reg = 5'd12; x.ctrl.mfc0 = 1;
    run(x); expect_c("mfc0", out.result == cp_rdata && cp_reg == 12);
    // exception: syscall does nothing but reload its thread's PC with the vector
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.syscall = 1; x.ctrl.md = MD_MULT; x.tid = 1;
    run(x); expect_c("syscall", cp_exc_req && cp_exc_code == EXC_SYS && !out.valid && !hi_we &&
                     redirect && redirect_target == VEC && tid == 1);
    x = mk(ALU_ADD, 32'd0, 32'd0); x.ctrl.illegal = 1;
    run(x); expect_c("reserved", cp_exc_code == EXC_RI && cp_exc_req);
    // stalled: no side effects
    x = mk(ALU_ADD, 32'd7, 32'd7); x.ctrl.br = BR_EQ; x.ctrl.md = MD_MULT;
    run(x); advance = 0; #1;
    expect_c("stall blocks redirect and HI/LO", !redirect && !hi_we && !lo_we);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
