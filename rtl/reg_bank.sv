// Register bank of one thread (the banc entity, instantiated once per thread).
// Holds general registers r1..r31 (r0 reads as zero and has no storage, 31 x 32 = 992
// flip-flops per bank) plus this thread's HI and LO registers of the multiply/divide unit.
// Two combinational read ports serve the DI stage; one write port, taken at the clock edge,
// serves write-back from MEM. HI/LO are read combinationally by EX and written at the clock
// edge by EX. Keeping HI/LO per thread is this design's choice: each thread needs its own
// copy to stay independent.
//   rs_addr/rs_data, rt_addr/rt_data : read ports
//   we, wr_addr, wr_data             : write port (writes to r0 are dropped)
//   hi_we/hi_wdata, lo_we/lo_wdata   : HI/LO write
//   hi, lo                           : HI/LO contents
module reg_bank
  import mips_imt_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  regaddr_t rs_addr,
  output word_t    rs_data,
  input  regaddr_t rt_addr,
  output word_t    rt_data,
  input  logic     we,
  input  regaddr_t wr_addr,
  input  word_t    wr_data,
  input  logic     hi_we,
  input  word_t    hi_wdata,
  input  logic     lo_we,
  input  word_t    lo_wdata,
  output word_t    hi,
  output word_t    lo
);
  word_t regs [1:31];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wr_addr != 5'd0) begin
      regs[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi <= '0;
      lo <= '0;
    end else begin
      if (hi_we) hi <= hi_wdata;
      if (lo_we) lo <= lo_wdata;
    end
  end

  assign rs_data = (rs_addr == 5'd0) ? '0 : regs[rs_addr];
  assign rt_data = (rt_addr == 5'd0) ? '0 : regs[rt_addr];
endmodule
