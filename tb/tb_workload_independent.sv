// Workload: two independent applications, one per thread.
// Thread 0 sums 1000..1 and keeps an XOR checksum of the running sum; thread 1 steps a
// Fibonacci recurrence 1000 times (modulo 2^32), using its branch delay slot for useful work.
// Both loops are five instructions long and touch memory only at the end. With interleaving
// each program takes twice as many cycles as it has instructions, and the two finish together:
// the testbench checks both results, that the two "done" stores are at most 2 cycles apart,
// and that each thread's elapsed cycles are 2 x its retired instructions plus the pipeline
// fill and the final stores' bus cycles: together they finish in the time a one-thread core
// at one instruction per cycle would need to run them one after the other.
module tb_workload_independent;
  import mips_asm_pkg::*;
  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800;
  localparam int N = 1000, RES = 'h1200, DONE0 = 'h12F0, DONE1 = 'h12F4;

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
  task automatic org(input logic [31:0] a); at = a; endtask
  task automatic emit(input logic [31:0] w); img[u_mem.index_of(at)] = w; at += 4; endtask
  function automatic logic [31:0] rd_mem(input int a); return u_mem.mem[u_mem.index_of(32'(a))]; endfunction
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int cycles = 0, ret_t [2] = '{0, 0}, done_cyc [2] = '{0, 0}, done_ret [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev_retire) ret_t[ev_retire_tid]++;
    if (mem_req && mem_we && mem_ack && mem_addr == DONE0) begin done_cyc[0] = cycles; done_ret[0] = ret_t[0]; end
    if (mem_req && mem_we && mem_ack && mem_addr == DONE1) begin done_cyc[1] = cycles; done_ret[1] = ret_t[1]; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s, x, a, b, t;
    for (int i = 0; i < 4096; i++) img[i] = '0;
    org(T0);
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
    repeat (5) @(posedge clk);

    s = 0; x = 0;
    for (int i = N; i > 0; i--) begin s += 32'(i); x ^= s; end
    a = 0; b = 1;
    for (int i = 0; i < N; i++) begin t = a + b; a = b; b = t; end
    check("sum", rd_mem(RES + 0), s);
    check("checksum", rd_mem(RES + 4), x);
    check("fib a", rd_mem(RES + 8), a);
    check("fib b", rd_mem(RES + 12), b);
    checks++;
    if (done_cyc[0] - done_cyc[1] > 2 || done_cyc[1] - done_cyc[0] > 2) begin
      failures++; $display("FAIL threads did not finish together: %0d vs %0d", done_cyc[0], done_cyc[1]);
    end
    // Instruction k of thread t reaches MEM in cycle 2k + 5 + t without stalls; the pipeline
    // is shared, so the result stores of both threads (at most 6 bus cycles) delay both.
    for (int t0 = 0; t0 < 2; t0++) begin
      checks++;
      if (done_cyc[t0] < 2 * done_ret[t0] + 5 + t0 || done_cyc[t0] > 2 * done_ret[t0] + 5 + t0 + 6) begin
        failures++; $display("FAIL thread %0d: %0d cycles for %0d instructions", t0, done_cyc[t0], done_ret[t0]);
      end
    end
    $display("thread 0: done at cycle %0d after %0d instructions; thread 1: cycle %0d after %0d",
             done_cyc[0], done_ret[0], done_cyc[1], done_ret[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
