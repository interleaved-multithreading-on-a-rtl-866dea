// Test of one thread's register bank: random writes and reads against a reference array,
// r0 always zero, writes visible on the next cycle, HI/LO written independently.
module tb_reg_bank;
  import mips_imt_pkg::*;
  logic clk = 0, rst_n = 0;
  regaddr_t rs_addr = '0, rt_addr = '0, wr_addr = '0;
  word_t rs_data, rt_data, wr_data = '0, hi_wdata = '0, lo_wdata = '0, hi, lo;
  logic we = 0, hi_we = 0, lo_we = 0;
  word_t model [32];
  word_t mhi, mlo;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  reg_bank dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = '0;
    mhi = '0; mlo = '0;
    for (int i = 0; i < 2000; i++) begin
      we = $urandom_range(0, 1); wr_addr = 5'($urandom); wr_data = $urandom;
      hi_we = $urandom_range(0, 1); hi_wdata = $urandom;
      lo_we = $urandom_range(0, 1); lo_wdata = $urandom;
      rs_addr = 5'($urandom); rt_addr = 5'($urandom);
      #1;
      checks += 4;
      if (rs_data !== model[rs_addr]) begin failures++; $display("FAIL rs r%0d", rs_addr); end
      if (rt_data !== model[rt_addr]) begin failures++; $display("FAIL rt r%0d", rt_addr); end
      if (hi !== mhi) failures++;
      if (lo !== mlo) failures++;
      @(posedge clk); #1;
      if (we && wr_addr != 0) model[wr_addr] = wr_data;
      if (hi_we) mhi = hi_wdata;
      if (lo_we) mlo = lo_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
