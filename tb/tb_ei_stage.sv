// Test of the fetch stage: it registers the PF slot on advance, requests that address,
// passes the fetched word to DI, drops the instruction when its thread takes an exception,
// and raises a stall while the fetch is not acknowledged.
module tb_ei_stage;
  import mips_imt_pkg::*;
  logic clk = 0, rst_n = 0, advance = 0, kill = 0, i_req, i_ack = 0, stall;
  tid_t kill_tid = 0;
  pf_ei_t pf_in = '0, held;
  word_t i_addr, i_data = '0;
  ei_di_t out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ei_stage dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    checks++; if (out.valid || i_req) failures++;
    held = '0;
    for (int i = 0; i < 1000; i++) begin
      logic live;
      pf_in = '{valid: 1'($urandom), tid: tid_t'($urandom), pc: $urandom};
      advance = $urandom;
      @(posedge clk); #1;
      if (advance) held = pf_in;
      kill = ($urandom_range(0, 3) == 0); kill_tid = tid_t'($urandom);
      i_ack = $urandom; i_data = $urandom;
      #1;
      live = held.valid && !(kill && kill_tid == held.tid);
      checks += 4;
      if (i_req !== live) begin failures++; $display("FAIL req %0d", i); end
      if (live && i_addr !== held.pc) failures++;
      if (out.valid !== live || (live && (out.instr !== i_data || out.tid !== held.tid || out.pc !== held.pc))) failures++;
      if (stall !== (live && !i_ack)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
