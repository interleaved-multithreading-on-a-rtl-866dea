// System-level instruction-set test of the interleaved core at its default parameters.
// Both threads run the same test sequence (shared code); each first points r20 at its own
// result area, so the two contexts must give identical, independent results. The sequence
// executes every implemented instruction at least once: ALU and shift operations, every
// immediate form, MULT/MULTU/DIV/DIVU/MTHI/MTLO/MFHI/MFLO, every branch taken and not taken
// (checking that exactly the delay slot executes), the link value of BLTZAL/BGEZAL/JAL/JALR,
// J/JR, byte/halfword/word loads and stores, and BREAK plus a reserved instruction, whose
// exceptions a small handler counts and logs. After each step the result is stored; the
// expected values are computed here in SystemVerilog while the program is assembled.
module tb_minimips_isa;
  import mips_asm_pkg::*;
  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800, COMMON = 32'hBFC0_0400;
  localparam logic [31:0] VEC = 32'h8000_0080;
  localparam int AREA0 = 'h1400, AREA1 = 'h1800, DONE_OFS = 'h3FC, LOG_OFS = 'h300;

  logic clk = 0, rst_n = 0;
  logic mem_req, mem_we, mem_ack;
  logic [3:0] mem_be;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic ev_stall, ev_retire, ev_retire_tid, ev_bypass, ev_branch, ev_exception, ev_interrupt;
  logic ld_en = 0;
  logic [11:0] ld_idx = '0;
  logic [31:0] ld_data = '0;
  always #5 clk = ~clk;

  minimips_imt dut (
    .clk, .rst_n, .irq (2'b00),
    .mem_req, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .ev_stall, .ev_retire, .ev_retire_tid, .ev_bypass, .ev_branch, .ev_exception, .ev_interrupt
  );
  mem_model u_mem (
    .clk, .ld_en, .ld_idx, .ld_data, .hold (1'b0),
    .req (mem_req), .we (mem_we), .be (mem_be), .addr (mem_addr), .wdata (mem_wdata),
    .rdata (mem_rdata), .ack (mem_ack)
  );

  int checks = 0, failures = 0;
  logic [31:0] img [4096];
  logic [31:0] at;
  logic [31:0] expv [256];
  string names [256];
  int nres = 0;
  task automatic org(input logic [31:0] a); at = a; endtask
  task automatic emit(input logic [31:0] w); img[u_mem.index_of(at)] = w; at += 4; endtask
  function automatic logic [31:0] rd_mem(input int a); return u_mem.mem[u_mem.index_of(32'(a))]; endfunction
  // store register r into the next result slot and remember what it must hold
  task automatic res(input string n, input int r, input logic [31:0] e);
    emit(sw(r, 4 * nres, 20));
    expv[nres] = e; names[nres] = n; nres++;
  endtask
  // branch probe: r6 = 1 if taken (slot runs, next skipped), 3 if not taken
  task automatic probe(input string n, input logic [31:0] br_word, input logic taken);
    emit(or_r(6, 0, 0));
    emit(br_word);
    emit(addiu(6, 6, 1));
    emit(addiu(6, 6, 2));
    res(n, 6, taken ? 1 : 3);
  endtask
  task automatic li(input int r, input logic [31:0] v);
    emit(lui(r, v[31:16])); emit(ori(r, r, v[15:0]));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, c, d, tgt, lnk;
    logic [63:0] p;
    for (int i = 0; i < 4096; i++) img[i] = '0;
    a = 32'h1234_5678; b = 32'hFEDC_BA98; c = 32'hFFFF_FFFB; d = 32'd7;

    org(VEC);                                   // count, log Cause, skip the instruction
    emit(mfc0(26, 14)); emit(mfc0(27, 13));
    emit(sw(27, 0, 24)); emit(addiu(24, 24, 4)); emit(addiu(25, 25, 1));
    emit(addiu(26, 26, 4)); emit(jr(26)); emit(rfe());

    org(T0); emit(addiu(20, 0, AREA0)); emit(j(COMMON)); emit(nop());
    org(T1); emit(addiu(20, 0, AREA1)); emit(j(COMMON)); emit(nop());

    org(COMMON);
    emit(addiu(24, 20, LOG_OFS)); emit(or_r(25, 0, 0));
    li(1, a); li(2, b); emit(addiu(3, 0, -5)); emit(addiu(4, 0, 7));
    emit(addu(5, 1, 2));  res("addu", 5, a + b);
    emit(subu(5, 1, 2));  res("subu", 5, a - b);
    emit(add(5, 1, 2));   res("add", 5, a + b);
    emit(sub(5, 2, 1));   res("sub", 5, b - a);
    emit(and_r(5, 1, 2)); res("and", 5, a & b);
    emit(or_r(5, 1, 2));  res("or", 5, a | b);
    emit(xor_r(5, 1, 2)); res("xor", 5, a ^ b);
    emit(nor_r(5, 1, 2)); res("nor", 5, ~(a | b));
    emit(slt(5, 3, 4));   res("slt", 5, 1);
    emit(sltu(5, 3, 4));  res("sltu", 5, 0);
    emit(slt(5, 2, 1));   res("slt neg", 5, 1);
    emit(sll(5, 1, 4));   res("sll", 5, a << 4);
    emit(srl(5, 2, 8));   res("srl", 5, b >> 8);
    emit(sra(5, 2, 8));   res("sra", 5, 32'($signed(b) >>> 8));
    emit(sllv(5, 1, 4));  res("sllv", 5, a << 7);
    emit(rtype('h06, 4, 2, 5)); res("srlv", 5, b >> 7);
    emit(srav(5, 2, 4));  res("srav", 5, 32'($signed(b) >>> 7));
    emit(addi(5, 1, -1)); res("addi", 5, a - 1);
    emit(addiu(5, 1, 'h8000)); res("addiu", 5, a - 32'h8000);
    emit(slti(5, 3, -4)); res("slti", 5, 1);
    emit(sltiu(5, 3, 5)); res("sltiu", 5, 0);
    emit(andi(5, 2, 'hF0F0)); res("andi", 5, b & 32'hF0F0);
    emit(ori(5, 0, 'hBEEF));  res("ori", 5, 32'hBEEF);
    emit(xori(5, 1, 'hFFFF)); res("xori", 5, a ^ 32'hFFFF);
    emit(lui(5, 'hABCD));     res("lui", 5, 32'hABCD_0000);
    p = 64'($signed(b)) * 64'($signed(d));
    emit(mult(2, 4));  emit(mfhi(5)); res("mult hi", 5, p[63:32]); emit(mflo(5)); res("mult lo", 5, p[31:0]);
    p = {32'b0, b} * {32'b0, d};
    emit(multu(2, 4)); emit(mfhi(5)); res("multu hi", 5, p[63:32]); emit(mflo(5)); res("multu lo", 5, p[31:0]);
    emit(div(2, 4));   emit(mfhi(5)); res("div rem", 5, 32'($signed(b) % $signed(d)));
    emit(mflo(5)); res("div quo", 5, 32'($signed(b) / $signed(d)));
    emit(divu(2, 4));  emit(mfhi(5)); res("divu rem", 5, b % d); emit(mflo(5)); res("divu quo", 5, b / d);
    emit(mthi(1)); emit(mtlo(2)); emit(mfhi(5)); res("mthi", 5, a); emit(mflo(5)); res("mtlo", 5, b);
    probe("beq taken", beq(4, 4, 2), 1);
    probe("beq not", beq(4, 3, 2), 0);
    probe("bne taken", bne(4, 3, 2), 1);
    probe("bne not", bne(4, 4, 2), 0);
    probe("blez taken", blez(3, 2), 1);
    probe("blez zero", blez(0, 2), 1);
    probe("blez not", blez(4, 2), 0);
    probe("bgtz taken", bgtz(4, 2), 1);
    probe("bgtz not", bgtz(0, 2), 0);
    probe("bltz taken", bltz(3, 2), 1);
    probe("bltz not", bltz(4, 2), 0);
    probe("bgez taken", bgez(0, 2), 1);
    probe("bgez not", bgez(3, 2), 0);
    lnk = at + 4 + 8;
    probe("bltzal taken", bltzal(3, 2), 1); res("bltzal link", 31, lnk);
    emit(or_r(31, 0, 0));
    lnk = at + 4 + 8;
    probe("bgezal not", bgezal(3, 2), 0); res("bgezal link anyway", 31, lnk);
    // JAL over one instruction
    emit(or_r(6, 0, 0));
    lnk = at + 8; tgt = at + 12;
    emit(jal(tgt)); emit(addiu(6, 6, 1)); emit(addiu(6, 6, 2));
    res("jal slot", 6, 1); res("jal link", 31, lnk);
    // JALR through a register
    emit(or_r(6, 0, 0));
    tgt = at + 8 + 12;                          // after li (2), jalr, slot, skipped
    li(8, tgt);
    lnk = at + 8;
    emit(jalr(7, 8)); emit(addiu(6, 6, 1)); emit(addiu(6, 6, 2));
    res("jalr slot", 6, 1); res("jalr link", 7, lnk);
    // J and JR
    emit(or_r(6, 0, 0));
    tgt = at + 12;
    emit(j(tgt)); emit(addiu(6, 6, 1)); emit(addiu(6, 6, 2));
    res("j slot", 6, 1);
    emit(or_r(6, 0, 0));
    tgt = at + 8 + 12;
    li(9, tgt);
    emit(jr(9)); emit(addiu(6, 6, 1)); emit(addiu(6, 6, 2));
    res("jr slot", 6, 1);
    // loads and stores in the thread's own area
    emit(sw(2, 'h200, 20));
    emit(sb(1, 'h201, 20));                     // byte 0x78 into lane 1
    emit(sh(1, 'h206, 20));                     // half 0x5678 into the upper half of +0x204
    emit(lw(5, 'h200, 20)); res("sb into word", 5, {b[31:16], 8'h78, b[7:0]});
    emit(lw(5, 'h204, 20)); res("sh into word", 5, {16'h5678, 16'h0000});
    emit(lb(5, 'h203, 20)); res("lb", 5, {{24{b[31]}}, b[31:24]});
    emit(lbu(5, 'h203, 20)); res("lbu", 5, {24'h0, b[31:24]});
    emit(lh(5, 'h206, 20)); res("lh", 5, 32'h0000_5678);
    emit(lhu(5, 'h202, 20)); res("lhu", 5, {16'h0, b[31:16]});
    emit(lh(5, 'h202, 20)); res("lh neg", 5, {{16{b[31]}}, b[31:16]});
    // exceptions that are only counted here
    emit(break_i());
    emit(32'hFC00_0000);                        // reserved opcode
    res("exceptions", 25, 2);
    emit(lw(5, LOG_OFS, 20)); emit(andi(5, 5, 'h7C)); res("break code", 5, 9 << 2);
    emit(lw(5, LOG_OFS + 4, 20)); emit(andi(5, 5, 'h7C)); res("reserved code", 5, 10 << 2);
    emit(addiu(1, 0, 1)); emit(sw(1, DONE_OFS, 20));
    emit(beq(0, 0, -1)); emit(nop());

    // the result, log and scratch words must be zero at the start
    for (int i = 0; i < 4096; i++) begin
      ld_en = 1; ld_idx = 12'(i); ld_data = img[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    @(posedge clk); #1 rst_n = 1;
    while (!(rd_mem(AREA0 + DONE_OFS) == 1 && rd_mem(AREA1 + DONE_OFS) == 1)) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < nres; i++) begin
        logic [31:0] g;
        g = rd_mem((t == 0 ? AREA0 : AREA1) + 4 * i);
        checks++;
        if (g !== expv[i]) begin
          failures++;
          $display("FAIL thread %0d %s: got %08h expected %08h", t, names[i], g, expv[i]);
        end
      end
    $display("%0d results per thread", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
