// Test of one thread's PC: reset address, +4 per step, redirect to an aligned target with
// priority over step, hold otherwise. Random stimulus against a reference model.
module tb_pc_unit;
  import mips_imt_pkg::*;
  localparam word_t RST = 32'hBFC0_0100;
  logic clk = 0, rst_n = 0, step = 0, redirect = 0;
  word_t target = '0, pc, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pc_unit #(.RESET_PC(RST)) dut (.clk, .rst_n, .step, .redirect, .target, .pc);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    model = RST;
    checks++; if (pc !== RST) failures++;
    for (int i = 0; i < 1000; i++) begin
      step     = $urandom_range(0, 1);
      redirect = ($urandom_range(0, 4) == 0);
      target   = $urandom;
      @(posedge clk); #1;
      if (redirect) model = {target[31:2], 2'b00};
      else if (step) model = model + 4;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL %0d: %h vs %h", i, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
