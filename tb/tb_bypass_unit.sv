// Test of the bypass: the MEM result replaces a bank value only when valid, of the same
// thread, not r0 and the register numbers match. Directed cases, then random ones.
module tb_bypass_unit;
  import mips_imt_pkg::*;
  tid_t di_tid;
  regaddr_t rs_addr, rt_addr;
  word_t rs_bank, rt_bank, rs_val, rt_val;
  wb_t wb;
  logic fwd_rs, fwd_rt;
  int checks = 0, failures = 0;
  bypass_unit dut (.*);
  task automatic one();
    logic ers, ert;
    #1;
    ers = wb.valid && wb.tid == di_tid && wb.rd != 0 && wb.rd == rs_addr;
    ert = wb.valid && wb.tid == di_tid && wb.rd != 0 && wb.rd == rt_addr;
    checks += 4;
    if (fwd_rs !== ers) failures++;
    if (fwd_rt !== ert) failures++;
    if (rs_val !== (ers ? wb.data : rs_bank)) failures++;
    if (rt_val !== (ert ? wb.data : rt_bank)) failures++;
  endtask
  initial begin
    // directed: forward on rs, then no forward for another thread, then not for r0
    di_tid = 0; rs_addr = 5; rt_addr = 6; rs_bank = 1; rt_bank = 2;
    wb = '{valid: 1, tid: 0, rd: 5, data: 32'hCAFE};
    #1; checks++; if (rs_val !== 32'hCAFE || rt_val !== 2) failures++;
    wb.tid = 1;
    #1; checks++; if (rs_val !== 1) failures++;
    wb = '{valid: 1, tid: 0, rd: 0, data: 32'hCAFE}; rs_addr = 0; rs_bank = 0;
    #1; checks++; if (rs_val !== 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      di_tid = tid_t'($urandom); rs_addr = 5'($urandom_range(0, 3)); rt_addr = 5'($urandom_range(0, 3));
      rs_bank = $urandom; rt_bank = $urandom;
      wb.valid = $urandom; wb.tid = tid_t'($urandom); wb.rd = 5'($urandom_range(0, 3)); wb.data = $urandom;
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
