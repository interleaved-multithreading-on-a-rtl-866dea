// Test of the thread counter: 0 after reset, toggles on every advancing cycle, holds during
// stalls. Random advance pattern, compared with a reference bit kept here.
module tb_thread_sel;
  logic clk = 0, rst_n = 0, advance = 0, sel;
  int checks = 0, failures = 0;
  logic expect_sel;
  always #5 clk = ~clk;
  thread_sel dut (.clk, .rst_n, .advance, .sel);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    expect_sel = 0;
    checks++; if (sel !== 1'b0) failures++;
    for (int i = 0; i < 500; i++) begin
      advance = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (advance) expect_sel = ~expect_sel;
      checks++;
      if (sel !== expect_sel) begin failures++; $display("FAIL cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
