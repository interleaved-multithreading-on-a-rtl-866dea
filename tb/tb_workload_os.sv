// Workload: two independent applications under a preemptive clock tick.
// On a single-context core an operating system would time-slice the two programs and pay a
// register save and restore at every tick. Here each program owns a hardware context, so the
// tick handler only has to do its bookkeeping: no context is saved, and nothing the other
// thread does is touched. The testbench models a per-thread timer: irq[t] rises every
// PERIOD[t] cycles and falls when thread t stores to its acknowledge word. One handler at the
// exception vector serves both threads; it uses only k0/k1 ($26/$27), which each thread points
// at its own tick record ({count, ack}) before enabling interrupts, and returns with
// "jr EPC; rfe" in the delay slot.
// Thread 0 sums 2000..1 with an XOR checksum, thread 1 steps a Fibonacci recurrence 2000 times.
// Checks: both results, every tick counted once by the right thread, no tick lost (a tick that
// finds the line still high is an overrun), interrupts landing in branch delay slots (EPC =
// branch address) for both threads, and the per-thread cycle accounting: a thread's share of
// the advancing cycles is 2 x (its retired instructions + 2 per interrupt it took), so one
// thread's ticks cost the other thread nothing.
// The periods, loop sizes and addresses are this testbench's own choices.
module tb_workload_os;
  import mips_asm_pkg::*;
  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800, VEC = 32'h8000_0080;
  localparam int N = 2000, RES = 'h1200, DONE0 = 'h12F0, DONE1 = 'h12F4;
  localparam int TK [2] = '{'h1300, 'h1310};      // per-thread {tick count, acknowledge}
  localparam int PERIOD [2] = '{97, 131};

  logic clk = 0, rst_n = 0;
  logic [1:0] irq = '0;
  logic mem_req, mem_we, mem_ack;
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
    .clk, .ld_en, .ld_idx, .ld_data, .hold (1'b0),
    .req (mem_req), .we (mem_we), .be (mem_be), .addr (mem_addr), .wdata (mem_wdata),
    .rdata (mem_rdata), .ack (mem_ack)
  );

  int checks = 0, failures = 0;
  logic [31:0] img [4096];
  logic [31:0] at;
  task automatic org(input logic [31:0] a); at = a; endtask
  task automatic emit(input logic [31:0] w); img[u_mem.index_of(at)] = w; at += 4; endtask
  function automatic logic [31:0] rd_mem(input int a); return u_mem.mem[u_mem.index_of(32'(a))]; endfunction
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // timer model and event counters
  logic timer_on = 1'b1;
  int cycles = 0, adv = 0, tcnt [2] = '{0, 0}, raised [2] = '{0, 0}, acks [2] = '{0, 0};
  int overrun = 0, ints = 0, excs = 0, ints_t [2] = '{0, 0}, bd_ints [2] = '{0, 0};
  int ret_t [2] = '{0, 0};
  int done_adv [2] = '{0, 0}, done_ret [2] = '{0, 0}, done_int [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (!ev_stall) adv++;
    if (ev_retire) ret_t[ev_retire_tid]++;
    if (ev_exception) excs++;
    if (ev_interrupt) begin
      ints++;
      ints_t[dut.ex_tid]++;
      if (dut.cp_bd) bd_ints[dut.ex_tid]++;
    end
    for (int t = 0; t < 2; t++) begin
      if (mem_req && mem_we && mem_ack && mem_addr == 32'(TK[t] + 4)) begin
        irq[t] <= 1'b0; acks[t]++;
      end else if (timer_on && tcnt[t] == PERIOD[t] - 1) begin
        if (irq[t]) overrun++;
        irq[t] <= 1'b1; raised[t]++;
      end
      tcnt[t] = (tcnt[t] == PERIOD[t] - 1) ? 0 : tcnt[t] + 1;
    end
    if (mem_req && mem_we && mem_ack && mem_addr == DONE0) begin done_adv[0] = adv; done_ret[0] = ret_t[0]; done_int[0] = ints_t[0]; end
    if (mem_req && mem_we && mem_ack && mem_addr == DONE1) begin done_adv[1] = adv; done_ret[1] = ret_t[1]; done_int[1] = ints_t[1]; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s, x, a, b, t;
    for (int i = 0; i < 4096; i++) img[i] = '0;

    // tick handler, shared by both threads
    org(VEC);
    emit(lw(26, 0, 27));                 // count++ in this thread's record
    emit(addiu(26, 26, 1));
    emit(sw(26, 0, 27));
    emit(sw(0, 4, 27));                  // acknowledge this thread's timer
    emit(mfc0(26, 14));                  // EPC
    emit(jr(26));
    emit(rfe());

    org(T0);
    emit(addiu(27, 0, TK[0]));
    emit(addiu(1, 0, 'h0401)); emit(mtc0(1, 12));      // IM2 | IEc
    emit(or_r(1, 0, 0)); emit(addiu(2, 0, N)); emit(or_r(6, 0, 0));
    emit(addu(1, 1, 2));                 // L: sum += i
    emit(addiu(2, 2, -1));
    emit(xor_r(6, 6, 1));
    emit(bne(2, 0, -4));
    emit(nop());
    emit(sw(1, RES + 0, 0)); emit(sw(6, RES + 4, 0));
    emit(addiu(3, 0, 1)); emit(sw(3, DONE0, 0));
    emit(beq(0, 0, -1)); emit(nop());

    org(T1);
    emit(addiu(27, 0, TK[1]));
    emit(addiu(1, 0, 'h0401)); emit(mtc0(1, 12));
    emit(or_r(1, 0, 0)); emit(addiu(4, 0, 1)); emit(addiu(2, 0, N));
    emit(addu(5, 1, 4));                 // L: c = a + b
    emit(or_r(1, 4, 0));                 //    a = b
    emit(addiu(2, 2, -1));
    emit(bne(2, 0, -4));
    emit(or_r(4, 5, 0));                 //    b = c (delay slot)
    emit(sw(1, RES + 8, 0)); emit(sw(4, RES + 12, 0));
    emit(addiu(3, 0, 1)); emit(sw(3, DONE1, 0));
    emit(beq(0, 0, -1)); emit(nop());

    for (int i = 0; i < 4096; i++) begin
      ld_en = 1; ld_idx = 12'(i); ld_data = img[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    @(posedge clk); #1 rst_n = 1;
    while (!(rd_mem(DONE0) == 1 && rd_mem(DONE1) == 1)) @(posedge clk);
    timer_on = 1'b0;
    repeat (100) @(posedge clk);

    s = 0; x = 0;
    for (int i = N; i > 0; i--) begin s += 32'(i); x ^= s; end
    a = 0; b = 1;
    for (int i = 0; i < N; i++) begin t = a + b; a = b; b = t; end
    check("sum", rd_mem(RES + 0), s);
    check("checksum", rd_mem(RES + 4), x);
    check("fib a", rd_mem(RES + 8), a);
    check("fib b", rd_mem(RES + 12), b);
    check("timer overruns", overrun, 0);
    check("every exception an interrupt", excs, ints);
    for (int t0 = 0; t0 < 2; t0++) begin
      check($sformatf("thread %0d ticks counted", t0), rd_mem(TK[t0]), raised[t0]);
      check($sformatf("thread %0d ticks acknowledged", t0), acks[t0], raised[t0]);
      check($sformatf("thread %0d interrupts taken", t0), ints_t[t0], raised[t0]);
      checks++;
      if (bd_ints[t0] == 0) begin failures++; $display("FAIL thread %0d: no tick hit a delay slot", t0); end
      // The k-th retirement of thread t falls in advancing cycle 2k + 4 + t; each interrupt
      // of that thread replaces two of its slots with bubbles.
      check($sformatf("thread %0d cycle accounting", t0), done_adv[t0],
            2 * (done_ret[t0] + 2 * done_int[t0]) + 4 + t0);
    end
    $display("ticks: thread 0 %0d (%0d in delay slots), thread 1 %0d (%0d in delay slots)",
             raised[0], bd_ints[0], raised[1], bd_ints[1]);
    $display("done: thread 0 at advancing cycle %0d, thread 1 at %0d; %0d cycles in all",
             done_adv[0], done_adv[1], cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
