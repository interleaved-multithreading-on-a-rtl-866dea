// Program counter of one thread (the PF entity, instantiated once per thread).
// The register holds the address of the thread's next instruction to fetch. When the thread
// is in the PF stage and the pipeline advances, the PC moves on by 4. When a branch, jump or
// exception of this thread resolves in EX, the PC is loaded with the target instead. With two
// interleaved threads the two events never fall in the same cycle for one thread (EX is three
// stages behind PF, an odd distance), but the redirect is given priority should they meet.
// Because the thread's next instruction is already fetched when its branch reaches EX, that
// instruction is the branch delay slot and nothing is flushed.
// Doubling this entity follows the design description; the reset address is a parameter.
//   RESET_PC          : address of the first instruction after reset
//   step              : this thread is in PF and the pipeline advances
//   redirect, target  : load target (from EX, only when the pipeline advances)
//   pc                : current fetch address
module pc_unit
  import mips_imt_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  logic  redirect,
  input  word_t target,
  output word_t pc
);
  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= {target[31:2], 2'b00};
    else if (step)     pc <= pc + 32'd4;
  end
endmodule
