// Workload: one fully parallel application, an 8x8 integer matrix multiply C = A*B split by
// rows over the two threads (rows 0-3 and 4-7), both running the same routine with their own
// registers. Checks every element of C against a product computed here, and the throughput
// claim of the interleaved pipeline: with no exceptions, every advancing cycle after the
// 4 fill cycles retires one instruction, and the only stall cycles are the data accesses
// (each load or store takes the shared bus from the fetch for one cycle). Reports the
// resulting cycles per instruction for the two threads together.
module tb_workload_matmul;
  import mips_asm_pkg::*;
  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800, MM = 32'hBFC0_0400;
  localparam int N = 8, A_B = 'h1000, B_B = 'h1100, C_B = 'h1200, DONE0 = 'h1F00, DONE1 = 'h1F04;

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
  function automatic int a_val(int i, int k); return (i * 7 + k * 3) % 11 - 5; endfunction
  function automatic int b_val(int k, int j); return (k * 5 + j * 2) % 13 - 6; endfunction

  int cycles = 0, adv = 0, retired = 0, stalls = 0, data_acc = 0, excs = 0;
  logic counting = 1;
  always @(posedge clk) if (rst_n && counting) begin
    cycles++;
    if (!ev_stall) adv++; else stalls++;
    if (ev_retire) retired++;
    if (ev_exception) excs++;
    if (mem_req && mem_ack && mem_addr[31:12] == 20'h00001) data_acc++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic thread_code(input logic [31:0] base, input int first, input int last, input int done);
    org(base);
    emit(addiu(16, 0, A_B)); emit(addiu(17, 0, B_B)); emit(addiu(18, 0, C_B));
    emit(addiu(7, 0, N)); emit(addiu(4, 0, first)); emit(addiu(5, 0, last));
    emit(jal(MM)); emit(nop());
    emit(addiu(1, 0, 1)); emit(sw(1, done, 0));
    emit(beq(0, 0, -1)); emit(nop());
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) img[i] = '0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        img[u_mem.index_of(32'(A_B + 4 * (N * i + k)))] = 32'(a_val(i, k));
        img[u_mem.index_of(32'(B_B + 4 * (N * i + k)))] = 32'(b_val(i, k));
      end
    // rows r4 .. r5-1 of C = A*B; row stride 32 bytes
    org(MM);
    emit(or_r(8, 4, 0));
    emit(or_r(9, 0, 0));                 // Li (1)
    emit(or_r(10, 0, 0));                // Lj (2)
    emit(or_r(11, 0, 0));
    emit(sll(12, 8, 5));                 // Lk (4)
    emit(sll(13, 10, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 16));
    emit(lw(14, 0, 12));
    emit(sll(12, 10, 5));
    emit(sll(13, 9, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 17));
    emit(lw(15, 0, 12));
    emit(mult(14, 15));
    emit(mflo(13));
    emit(addu(11, 11, 13));
    emit(addiu(10, 10, 1));
    emit(bne(10, 7, 4 - 19));
    emit(nop());
    emit(sll(12, 8, 5));
    emit(sll(13, 9, 2));
    emit(addu(12, 12, 13));
    emit(addu(12, 12, 18));
    emit(sw(11, 0, 12));
    emit(addiu(9, 9, 1));
    emit(bne(9, 7, 2 - 27));
    emit(nop());
    emit(addiu(8, 8, 1));
    emit(bne(8, 5, 1 - 30));
    emit(nop());
    emit(jr(31));
    emit(nop());
    thread_code(T0, 0, N / 2, DONE0);
    thread_code(T1, N / 2, N, DONE1);

    for (int i = 0; i < 4096; i++) begin
      ld_en = 1; ld_idx = 12'(i); ld_data = img[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    @(posedge clk); #1 rst_n = 1;
    while (!(rd_mem(DONE0) == 1 && rd_mem(DONE1) == 1)) @(posedge clk);
    #1 counting = 0;

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < N; k++) s += a_val(i, k) * b_val(k, j);
        check($sformatf("C[%0d][%0d]", i, j), rd_mem(C_B + 4 * (N * i + j)), 32'(s));
      end
    check("no exceptions", 32'(excs), 0);
    check("advancing cycles = retired + 4 fill", 32'(adv), 32'(retired + 4));
    check("stall cycles = data accesses", 32'(stalls), 32'(data_acc));
    $display("cycles=%0d retired=%0d data-accesses=%0d CPI(both threads)=%0.3f CPI without memory stalls=%0.3f",
             cycles, retired, data_acc, real'(cycles) / retired, real'(cycles - stalls) / retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
