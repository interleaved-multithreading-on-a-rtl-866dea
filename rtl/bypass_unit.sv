// Operand bypass (the renvoi entity, reduced for the interleaved pipeline).
// With two threads alternating, the only instruction still in flight ahead of an instruction
// in DI that belongs to the same thread is the one in MEM: the instruction in EX belongs to
// the other thread. The MEM instruction writes its result into the register bank at the end
// of the cycle, so in that cycle its result (ALU value or load data) is forwarded to DI when
// thread and register number match (while the interleaving holds, the MEM instruction is
// always of DI's thread, so the thread comparison is only a guard). No comparison against EX and no load-use stall is needed;
// that is the saving interleaving buys. Keeping a bypass at all follows the organisation
// figure of the interleaved core, which still shows the BYP block; which paths it keeps is
// this design's reading of the pipeline timing.
//   di_tid, rs_addr, rt_addr : operands requested in DI
//   rs_bank, rt_bank         : values read from that thread's register bank
//   wb                       : result leaving MEM this cycle
//   rs_val, rt_val           : operands after forwarding
//   fwd_rs, fwd_rt           : a forward took place (for statistics)
module bypass_unit
  import mips_imt_pkg::*;
(
  input  tid_t     di_tid,
  input  regaddr_t rs_addr,
  input  regaddr_t rt_addr,
  input  word_t    rs_bank,
  input  word_t    rt_bank,
  input  wb_t      wb,
  output word_t    rs_val,
  output word_t    rt_val,
  output logic     fwd_rs,
  output logic     fwd_rt
);
  always_comb begin
    fwd_rs = wb.valid && wb.tid == di_tid && wb.rd != 5'd0 && wb.rd == rs_addr;
    fwd_rt = wb.valid && wb.tid == di_tid && wb.rd != 5'd0 && wb.rd == rt_addr;
    rs_val = fwd_rs ? wb.data : rs_bank;
    rt_val = fwd_rt ? wb.data : rt_bank;
  end
endmodule
