// End-to-end test of the two-thread interleaved core at its default parameters.
// Both threads run from the same memory. They share one 4x4 matrix-multiply routine
// (thread 0 computes rows 0-1 of C = A*B, thread 1 rows 2-3), each with its own registers.
// Thread 0 also runs directed checks: branch delay slot, back-to-back dependent ALU and
// load instructions (bypass), byte/halfword loads and stores, MULT/MULTU/DIV with MFHI/MFLO,
// and three exceptions (SYSCALL, overflow on ADDI, misaligned LW). Thread 1 enables its
// interrupt and takes an interrupt raised by the testbench while it multiplies, plus one
// SYSCALL. A shared handler at the exception vector logs Cause, counts the entry and
// returns past the faulting instruction (or to it, for an interrupt) with JR + RFE.
// For a stretch of the run the memory inserts random wait states.
// Checked: all results in memory against values computed here; the exception log of each
// thread; Status restored by RFE; and the cycle accounting of the interleaved pipeline: every
// cycle in which the pipeline advances retires one instruction, except the 4 fill cycles and
// 2 slots per exception (the faulting instruction and its thread's next one), so CPI is 1 for
// the two threads together apart from memory stalls.
// Each mechanism (bus stall, wait state, bypass, taken branch, exception, interrupt) must
// occur at least once, and instructions must complete in strict A B A B thread order.
module tb_minimips_imt;
  import mips_asm_pkg::*;

  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800, MM = 32'hBFC0_0400;
  localparam logic [31:0] VEC = 32'h8000_0080;
  localparam int A_B = 'h1000, B_B = 'h1040, C_B = 'h1080, LOG0 = 'h1100, LOG1 = 'h1180;
  localparam int RES = 'h1200, DONE0 = 'h12F0, DONE1 = 'h12F4;

  logic clk = 0, rst_n = 0;
  logic [1:0] irq = '0;
  logic mem_req, mem_we, mem_ack, hold = 0;
  logic [3:0] mem_be;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic ev_stall, ev_retire, ev_retire_tid, ev_bypass, ev_branch, ev_exception, ev_interrupt;
  logic ld_en = 0;
  logic [11:0] ld_idx = '0;
  logic [31:0] ld_data = '0;

  always #5 clk = ~clk;

  minimips_imt dut (
    .clk, .rst_n, .irq,
    .mem_req, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .ev_stall, .ev_retire, .ev_retire_tid, .ev_bypass, .ev_branch, .ev_exception, .ev_interrupt
  );

  mem_model u_mem (
    .clk, .ld_en, .ld_idx, .ld_data, .hold,
    .req (mem_req), .we (mem_we), .be (mem_be), .addr (mem_addr), .wdata (mem_wdata),
    .rdata (mem_rdata), .ack (mem_ack)
  );

  int checks = 0, failures = 0;
  logic [31:0] img [4096];
  logic [31:0] at;

  task automatic org(input logic [31:0] a); at = a; endtask
  task automatic emit(input logic [31:0] w);
    img[u_mem.index_of(at)] = w;
    at += 4;
  endtask

  function automatic logic [31:0] rd_mem(input int a);
    return u_mem.mem[u_mem.index_of(32'(a))];
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  function automatic int a_val(int i, int k); return i * 4 + k + 1; endfunction
  function automatic int b_val(int k, int j); return (k - j) * 3 + 2; endfunction

  // statistics
  int cycles = 0, adv = 0, retired = 0, stalls = 0, waits = 0, bypasses = 0, branches = 0;
  int excs = 0, ints = 0, ret_t [2] = '{0, 0};
  int alt_pairs = 0, alt_bad = 0;      // retirements in consecutive advancing cycles
  logic prev_ret = 0, prev_tid = 0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (!ev_stall) adv++;
    if (ev_stall) stalls++;
    if (mem_req && hold) waits++;
    if (ev_retire) begin retired++; ret_t[ev_retire_tid]++; end
    if (!ev_stall) begin
      if (ev_retire && prev_ret) begin
        alt_pairs++;
        if (ev_retire_tid == prev_tid) alt_bad++;
      end
      prev_ret <= ev_retire;
      prev_tid <= ev_retire_tid;
    end
    if (ev_bypass) bypasses++;
    if (ev_branch) branches++;
    if (ev_exception) excs++;
    if (ev_interrupt) begin ints++; irq[1] <= 1'b0; end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lk, lj, li, here;
    for (int i = 0; i < 4096; i++) img[i] = '0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++) begin
        img[u_mem.index_of(32'(A_B + 16 * i + 4 * k))] = 32'(a_val(i, k));
        img[u_mem.index_of(32'(B_B + 16 * i + 4 * k))] = 32'(b_val(i, k));
      end

    // ---------------- shared matrix-multiply routine: rows r4 .. r5-1 ----------------
    org(MM);
    emit(or_r(8, 4, 0));                 // i = first row
    li = 1;                              // Li at MM+4
    emit(or_r(9, 0, 0));                 // Li: j = 0
    emit(or_r(10, 0, 0));                // Lj: k = 0
    emit(or_r(11, 0, 0));                //     acc = 0
    emit(sll(12, 8, 4));                 // Lk (index 4)
    emit(sll(13, 10, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 16));
    emit(lw(14, 0, 12));                 // A[i][k]
    emit(sll(12, 10, 4));
    emit(sll(13, 9, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 17));
    emit(lw(15, 0, 12));                 // B[k][j]
    emit(mult(14, 15));                  // uses the load result right away
    emit(mflo(13));
    emit(addu(11, 11, 13));
    emit(addiu(10, 10, 1));
    emit(bne(10, 7, 4 - 19));            // index 18 -> Lk (4)
    emit(nop());
    emit(sll(12, 8, 4));
    emit(sll(13, 9, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 18));
    emit(sw(11, 0, 12));
    emit(addiu(9, 9, 1));
    emit(bne(9, 7, 2 - 27));             // index 26 -> Lj (2)
    emit(nop());
    emit(addiu(8, 8, 1));
    emit(bne(8, 5, 1 - 30));             // index 29 -> Li (1)
    emit(nop());
    emit(jr(31));
    emit(nop());

    // ---------------- exception handler ----------------
    org(VEC);
    emit(mfc0(26, 14));                  // EPC
    emit(mfc0(27, 13));                  // Cause
    emit(sw(27, 0, 24));
    emit(addiu(24, 24, 4));
    emit(addiu(25, 25, 1));
    emit(andi(27, 27, 'h7c));
    emit(beq(27, 0, 2));                 // interrupt: return to EPC itself
    emit(nop());
    emit(addiu(26, 26, 4));
    emit(jr(26));
    emit(rfe());

    // ---------------- thread 0 ----------------
    org(T0);
    emit(addiu(16, 0, A_B)); emit(addiu(17, 0, B_B)); emit(addiu(18, 0, C_B));
    emit(addiu(7, 0, 4));    emit(addiu(24, 0, LOG0)); emit(or_r(25, 0, 0));
    // delay slot: the instruction after a taken branch executes, the next one is skipped
    emit(or_r(19, 0, 0));
    emit(beq(0, 0, 2));
    emit(addiu(19, 19, 1));
    emit(addiu(19, 19, 16));
    emit(addiu(19, 19, 256));
    emit(sw(19, RES + 'h00, 0));         // 257
    // dependent instructions back to back
    emit(addiu(20, 0, 5));
    emit(addu(21, 20, 20));
    emit(sw(21, RES + 'h04, 0));         // 10
    // bytes and halfwords
    emit(lui(1, 'h8765)); emit(ori(1, 1, 'h4321));
    emit(sw(1, RES + 'h08, 0));
    emit(sb(1, RES + 'h0D, 0));
    emit(sh(1, RES + 'h0E, 0));
    emit(lb(2, RES + 'h0B, 0));
    emit(lbu(3, RES + 'h0B, 0));
    emit(lh(6, RES + 'h0A, 0));
    emit(lhu(22, RES + 'h08, 0));
    emit(sw(2, RES + 'h10, 0)); emit(sw(3, RES + 'h14, 0));
    emit(sw(6, RES + 'h18, 0)); emit(sw(22, RES + 'h1C, 0));
    // multiply / divide
    emit(addiu(1, 0, -7)); emit(addiu(2, 0, 3));
    emit(mult(1, 2)); emit(mfhi(3)); emit(mflo(6));
    emit(div(1, 2));  emit(mfhi(22)); emit(mflo(23));
    emit(sw(3, RES + 'h20, 0)); emit(sw(6, RES + 'h24, 0));
    emit(sw(22, RES + 'h28, 0)); emit(sw(23, RES + 'h2C, 0));
    emit(multu(1, 2)); emit(mfhi(3)); emit(sw(3, RES + 'h30, 0));
    // exceptions
    emit(syscall_i());
    emit(lui(1, 'h7fff)); emit(ori(1, 1, 'hffff));
    emit(addiu(2, 0, 77));
    emit(addi(2, 1, 1));                 // overflow: r2 keeps 77
    emit(sw(2, RES + 'h34, 0));
    emit(lw(3, 'h1001, 0));              // misaligned
    // rows 0 and 1
    emit(or_r(4, 0, 0)); emit(addiu(5, 0, 2));
    emit(jal(MM)); emit(nop());
    emit(sw(25, RES + 'h38, 0));
    emit(addiu(1, 0, 1)); emit(sw(1, DONE0, 0));
    emit(beq(0, 0, -1)); emit(nop());

    // ---------------- thread 1 ----------------
    org(T1);
    emit(addiu(16, 0, A_B)); emit(addiu(17, 0, B_B)); emit(addiu(18, 0, C_B));
    emit(addiu(7, 0, 4));    emit(addiu(24, 0, LOG1)); emit(or_r(25, 0, 0));
    emit(addiu(1, 0, 'h0401)); emit(mtc0(1, 12));      // IM2 | IEc
    emit(syscall_i());
    emit(addiu(4, 0, 2)); emit(addiu(5, 0, 4));
    emit(jal(MM)); emit(nop());
    emit(sw(25, RES + 'h3C, 0));
    emit(mfc0(1, 12)); emit(sw(1, RES + 'h40, 0));
    emit(addiu(1, 0, 1)); emit(sw(1, DONE1, 0));
    emit(beq(0, 0, -1)); emit(nop());

    // preload the memory
    for (int i = 0; i < 4096; i++) begin
      ld_en = 1; ld_idx = 12'(i); ld_data = img[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // interrupt for thread 1 once it is inside the multiply routine
    repeat (300) @(posedge clk);
    irq[1] = 1'b1;
    // random wait states for a while
    repeat (100) begin
      @(posedge clk); #1 hold = ($urandom_range(0, 2) == 0);
    end
    #1 hold = 0;

    here = 0;
    while (!(rd_mem(DONE0) == 1 && rd_mem(DONE1) == 1) && here < 50000) begin
      @(posedge clk);
      here++;
    end
    repeat (10) @(posedge clk);
    #1;
    check("both threads reached the end", 32'(rd_mem(DONE0) == 1 && rd_mem(DONE1) == 1), 1);

    check("delay slot", rd_mem(RES + 'h00), 257);
    check("alu bypass", rd_mem(RES + 'h04), 10);
    check("sw word", rd_mem(RES + 'h08), 32'h8765_4321);
    check("sb + sh", rd_mem(RES + 'h0C), 32'h4321_2100);
    check("lb", rd_mem(RES + 'h10), 32'hFFFF_FF87);
    check("lbu", rd_mem(RES + 'h14), 32'h0000_0087);
    check("lh", rd_mem(RES + 'h18), 32'hFFFF_8765);
    check("lhu", rd_mem(RES + 'h1C), 32'h0000_4321);
    check("mult hi", rd_mem(RES + 'h20), 32'hFFFF_FFFF);
    check("mult lo", rd_mem(RES + 'h24), 32'(-21));
    check("div rem", rd_mem(RES + 'h28), 32'(-1));
    check("div quo", rd_mem(RES + 'h2C), 32'(-2));
    check("multu hi", rd_mem(RES + 'h30), 32'd2);
    check("overflow keeps rd", rd_mem(RES + 'h34), 77);
    check("t0 exception count", rd_mem(RES + 'h38), 3);
    check("t1 exception count", rd_mem(RES + 'h3C), 2);
    check("t1 status after rfe", rd_mem(RES + 'h40), 32'h0000_0401);
    check("t0 log syscall", rd_mem(LOG0 + 0) & 32'h7c, 8 << 2);
    check("t0 log overflow", rd_mem(LOG0 + 4) & 32'h7c, 12 << 2);
    check("t0 log adel", rd_mem(LOG0 + 8) & 32'h7c, 4 << 2);
    check("t1 log syscall", rd_mem(LOG1 + 0) & 32'h7c, 8 << 2);
    check("t1 log interrupt", rd_mem(LOG1 + 4) & 32'h7c, 0);
    for (int i = 0; i < 4; i++)
      for (int jj = 0; jj < 4; jj++) begin
        int s;
        s = 0;
        for (int k = 0; k < 4; k++) s += a_val(i, k) * b_val(k, jj);
        check($sformatf("C[%0d][%0d]", i, jj), rd_mem(C_B + 16 * i + 4 * jj), 32'(s));
      end

    // cycle accounting of the interleaved pipeline
    check("advance = retired + fill + 2 per exception", 32'(adv), 32'(retired + 4 + 2 * excs));
    check("exceptions taken", 32'(excs), 5);
    check("threads alternate A B A B at retirement", 32'(alt_bad), 0);
    check("alternation observed", 32'(alt_pairs > 1000), 1);
    check("interrupts taken", 32'(ints), 1);
    checks++;
    if (stalls == 0 || waits == 0 || bypasses == 0 || branches == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("cycles=%0d advancing=%0d retired=%0d (t0 %0d, t1 %0d) stalls=%0d wait-cycles=%0d bypasses=%0d branches=%0d exceptions=%0d interrupts=%0d",
             cycles, adv, retired, ret_t[0], ret_t[1], stalls, waits, bypasses, branches, excs, ints);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
