// System coprocessor (the syscop entity): coprocessor-0 state, interrupts and exceptions.
// Each thread has its own Status, Cause, EPC and BadVAddr registers, so an exception or
// interrupt in one thread leaves the other untouched. The coprocessor looks at the
// instruction in EX: when that instruction reports a synchronous exception, or its thread has
// an enabled pending interrupt, it takes the exception at that instruction (interrupt first).
// Taking it saves the instruction's PC in EPC (the branch's PC with Cause.BD set when the
// instruction sits in a delay slot), records the cause code, pushes the interrupt-enable /
// kernel-mode stack in Status (bits 5:0) and returns the exception vector; RFE pops the stack.
// MTC0 writes Status (IM 15:8 and bits 5:0) and Cause software-interrupt bits 9:8; MFC0 reads
// the registers combinationally. Thread t's interrupt line appears as Cause.IP2 (bit 10).
// The register layout and exception codes follow MIPS-I; keeping them per thread, the single
// vector and one interrupt line per thread are this design's choices.
//   EXC_VECTOR : address of the exception handler
//   advance    : state changes only when the pipeline advances
//   ex_*       : the instruction in EX (from ex_stage)
//   irq        : one level-sensitive interrupt line per thread
//   rdata      : MFC0 result; take_exc / vector : exception entry for the EX instruction
//                (vector is the constant EXC_VECTOR, brought out so EX need not know it)
module syscop
  import mips_imt_pkg::*;
#(
  parameter word_t EXC_VECTOR = 32'h8000_0080
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    advance,
  input  logic    ex_valid,
  input  tid_t    ex_tid,
  input  word_t   ex_pc,
  input  logic    ex_bd,
  input  logic    exc_req,
  input  exc_e    exc_code,
  input  word_t   badvaddr,
  input  logic    mtc0,
  input  logic    rfe,
  input  regaddr_t cp_reg,
  input  word_t   wdata,
  input  logic [NTHREADS-1:0] irq,
  output word_t   rdata,
  output logic    take_exc,
  output word_t   vector,
  output logic    int_taken
);
  word_t      status   [NTHREADS];
  logic       cause_bd [NTHREADS];
  logic [4:0] exccode  [NTHREADS];
  logic [1:0] sw_ip    [NTHREADS];
  word_t      epc      [NTHREADS];
  word_t      bva      [NTHREADS];

  logic [7:0] ip      [NTHREADS];
  logic       pending [NTHREADS];
  exc_e       code;

  always_comb begin
    for (int t = 0; t < NTHREADS; t++) begin
      ip[t]      = {5'b0, irq[t], sw_ip[t]};
      pending[t] = status[t][0] && |(status[t][15:8] & ip[t]);
    end
    int_taken = ex_valid && pending[ex_tid];
    take_exc  = ex_valid && (pending[ex_tid] || exc_req);
    code      = pending[ex_tid] ? EXC_INT : exc_code;
    vector    = EXC_VECTOR;
    unique case (cp_reg)
      CP0_BADVADDR: rdata = bva[ex_tid];
      CP0_STATUS:   rdata = status[ex_tid];
      CP0_CAUSE:    rdata = {cause_bd[ex_tid], 15'b0, ip[ex_tid], 1'b0, exccode[ex_tid], 2'b00};
      CP0_EPC:      rdata = epc[ex_tid];
      default:      rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) begin
        status[t]   <= '0;
        cause_bd[t] <= 1'b0;
        exccode[t]  <= '0;
        sw_ip[t]    <= '0;
        epc[t]      <= '0;
        bva[t]      <= '0;
      end
    end else if (advance) begin
      if (take_exc) begin
        epc[ex_tid]            <= ex_bd ? ex_pc - 32'd4 : ex_pc;
        cause_bd[ex_tid]       <= ex_bd;
        exccode[ex_tid]        <= code;
        status[ex_tid][5:0]    <= {status[ex_tid][3:0], 2'b00};
        if (code == EXC_ADEL || code == EXC_ADES) bva[ex_tid] <= badvaddr;
      end else if (mtc0) begin
        unique case (cp_reg)
          CP0_STATUS: status[ex_tid] <= wdata & 32'h0000_FF3F;
          CP0_CAUSE:  sw_ip[ex_tid]  <= wdata[9:8];
          CP0_EPC:    epc[ex_tid]    <= wdata;
          default: ;
        endcase
      end else if (rfe) begin
        status[ex_tid][5:0] <= {status[ex_tid][5:4], status[ex_tid][5:2]};
      end
    end
  end
endmodule
