// Instruction fetch stage (the EI entity).
// Holds the PF/EI stage register: the PC and thread of the instruction chosen in PF in the
// previous cycle. It asks the bus controller for that word and, once acknowledged, hands
// instruction, PC and thread to DI. If an exception is being taken in EX by the same thread,
// the instruction here is the thread's next one and must not execute: it is dropped (no
// fetch, no valid output). Without acknowledge it raises a stall for the whole pipeline.
// The stage's job follows the original core's organisation; the kill and stall signalling
// are this design's own.
//   advance       : load the stage register from PF
//   pf_in         : instruction slot selected in PF
//   kill, kill_tid: an exception of thread kill_tid is being taken in EX
//   i_req/i_addr/i_data/i_ack : fetch port of the bus controller
//   out           : instruction for DI; stall : fetch not yet acknowledged
module ei_stage
  import mips_imt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   advance,
  input  pf_ei_t pf_in,
  input  logic   kill,
  input  tid_t   kill_tid,
  output logic   i_req,
  output word_t  i_addr,
  input  word_t  i_data,
  input  logic   i_ack,
  output ei_di_t out,
  output logic   stall
);
  pf_ei_t r;
  logic   live;

  always_ff @(posedge clk) begin
    if (!rst_n)       r <= '0;
    else if (advance) r <= pf_in;
  end

  always_comb begin
    live      = r.valid && !(kill && kill_tid == r.tid);
    i_req     = live;
    i_addr    = r.pc;
    out.valid = live;
    out.tid   = r.tid;
    out.pc    = r.pc;
    out.instr = i_data;
    stall     = i_req && !i_ack;
  end
endmodule
