// Test of the system coprocessor: per-thread Status/Cause/EPC/BadVAddr. Checks exception
// entry (EPC, BD, code, Status stack push), RFE (stack pop), MTC0/MFC0, BadVAddr on address
// errors, interrupt masking by IEc and IM, interrupt priority over a synchronous exception,
// isolation of the two threads, and that nothing changes while the pipeline is stalled.
module tb_syscop;
  import mips_imt_pkg::*;
  localparam word_t VEC = 32'h8000_0080;
  logic clk = 0, rst_n = 0, advance = 1;
  logic ex_valid = 0, ex_bd = 0, exc_req = 0, mtc0 = 0, rfe = 0;
  tid_t ex_tid = 0;
  word_t ex_pc = '0, badvaddr = '0, wdata = '0, rdata, vector;
  exc_e exc_code = EXC_SYS;
  regaddr_t cp_reg = '0;
  logic [NTHREADS-1:0] irq = '0;
  logic take_exc, int_taken;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  syscop #(.EXC_VECTOR(VEC)) dut (.*);

  task automatic idle();
    ex_valid = 0; exc_req = 0; mtc0 = 0; rfe = 0; ex_bd = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask
  task automatic expect_c(input string n, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", n); end
  endtask
  task automatic rdchk(input string n, input tid_t t, input regaddr_t r, input word_t e);
    ex_tid = t; cp_reg = r; #1;
    expect_c($sformatf("%s = %h (got %h)", n, e, rdata), rdata == e);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    rdchk("status reset", 0, CP0_STATUS, 32'h0);
    // MTC0 status of thread 0: IM2 | KUc | IEc
    ex_valid = 1; ex_tid = 0; mtc0 = 1; cp_reg = CP0_STATUS; wdata = 32'hFFFF_0403;
    #1 expect_c("mtc0 takes no exception", !take_exc);
    step();
    rdchk("status written (mask)", 0, CP0_STATUS, 32'h0000_0403);
    rdchk("thread 1 untouched", 1, CP0_STATUS, 32'h0);
    // syscall in thread 0, not in a delay slot
    ex_valid = 1; ex_tid = 0; ex_pc = 32'h0000_0200; exc_req = 1; exc_code = EXC_SYS;
    #1 expect_c("take syscall", take_exc && !int_taken && vector == VEC);
    step();
    rdchk("epc", 0, CP0_EPC, 32'h0000_0200);
    rdchk("cause", 0, CP0_CAUSE, {24'h0, 1'b0, 5'd8, 2'b0});
    rdchk("status pushed", 0, CP0_STATUS, 32'h0000_040C);
    // RFE pops
    ex_valid = 1; ex_tid = 0; rfe = 1;
    step();
    rdchk("status popped", 0, CP0_STATUS, 32'h0000_0403);
    // address error in a delay slot in thread 1
    ex_valid = 1; ex_tid = 1; ex_pc = 32'h0000_0304; ex_bd = 1; exc_req = 1; exc_code = EXC_ADES;
    badvaddr = 32'h0000_1235;
    step();
    rdchk("bd epc = branch pc", 1, CP0_EPC, 32'h0000_0300);
    rdchk("bd cause", 1, CP0_CAUSE, {1'b1, 23'h0, 1'b0, 5'd5, 2'b0});
    rdchk("badvaddr", 1, CP0_BADVADDR, 32'h0000_1235);
    rdchk("thread 0 epc kept", 0, CP0_EPC, 32'h0000_0200);
    // interrupts: thread 1 has IEc = 0, so its line is ignored
    irq = 2'b10; ex_valid = 1; ex_tid = 1; #1;
    expect_c("masked by IEc", !take_exc);
    // thread 0 enabled with IM2: its line is taken, and wins over a syscall
    irq = 2'b01; ex_tid = 0; exc_req = 1; exc_code = EXC_SYS; ex_pc = 32'h0000_0400; #1;
    expect_c("interrupt taken", take_exc && int_taken);
    rdchk("IP2 visible", 0, CP0_CAUSE, {16'h0, 8'h04, 1'b0, 5'd8, 2'b0});
    ex_tid = 0; ex_valid = 1; exc_req = 1;
    // stalled: no change
    advance = 0;
    @(posedge clk); #1;
    rdchk("no change while stalled", 0, CP0_EPC, 32'h0000_0200);
    advance = 1; ex_valid = 1; ex_tid = 0; exc_req = 1; ex_pc = 32'h0000_0400;
    step();
    rdchk("int epc", 0, CP0_EPC, 32'h0000_0400);
    rdchk("int code", 0, CP0_CAUSE, {16'h0, 8'h04, 1'b0, 5'd0, 2'b0});
    irq = 2'b00;
    // inside the handler IEc is 0: no new interrupt
    irq = 2'b01; ex_valid = 1; ex_tid = 0; #1;
    expect_c("no nesting", !take_exc);
    irq = 2'b00;
    // software interrupt bit through Cause, IM0 enabled
    ex_valid = 1; ex_tid = 1; mtc0 = 1; cp_reg = CP0_STATUS; wdata = 32'h0000_0101;
    step();
    ex_valid = 1; ex_tid = 1; mtc0 = 1; cp_reg = CP0_CAUSE; wdata = 32'h0000_0100;
    step();
    ex_valid = 1; ex_tid = 1; #1;
    expect_c("software interrupt", take_exc && int_taken);
    ex_valid = 0; #1;
    expect_c("no take without instruction", !take_exc);
    // MTC0 EPC
    ex_valid = 1; ex_tid = 0; mtc0 = 1; cp_reg = CP0_EPC; wdata = 32'h1234_5678;
    step();
    rdchk("mtc0 epc", 0, CP0_EPC, 32'h1234_5678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
