// Test of the bus controller: data access wins over fetch, the loser gets no acknowledge,
// address/enables/write come from the winner, wait states pass through.
module tb_bus_ctrl;
  import mips_imt_pkg::*;
  logic i_req, i_ack, d_req, d_we, d_ack, mem_req, mem_we, mem_ack;
  logic [3:0] d_be, mem_be;
  word_t i_addr, i_data, d_addr, d_wdata, d_rdata, mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  bus_ctrl dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      i_req = $urandom; d_req = $urandom; d_we = $urandom; d_be = 4'($urandom);
      i_addr = $urandom; d_addr = $urandom; d_wdata = $urandom; mem_rdata = $urandom;
      mem_ack = ($urandom_range(0, 3) != 0);
      #1;
      checks += 7;
      if (mem_req !== (i_req | d_req)) failures++;
      if (mem_addr !== (d_req ? d_addr : i_addr)) failures++;
      if (mem_we !== (d_req & d_we)) failures++;
      if (d_req && mem_be !== d_be) failures++;
      if (d_ack !== (d_req & mem_ack)) failures++;
      if (i_ack !== (i_req & !d_req & mem_ack)) begin failures++; $display("FAIL i_ack"); end
      if (i_data !== mem_rdata || d_rdata !== mem_rdata || mem_wdata !== d_wdata) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
