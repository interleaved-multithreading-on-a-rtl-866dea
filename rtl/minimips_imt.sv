// Two-thread interleaved MIPS-I processor (top level).
// The core is a five-stage pipeline, PF (PC selection), EI (fetch), DI (decode and register
// read), EX (execute, branch resolution) and MEM (memory access and write-back), that takes
// its instructions alternately from two threads: A1 B1 A2 B2 ... A one-bit counter selects
// whose PC enters PF each cycle; the PC and the register bank are doubled and multiplexed by
// the thread bit that travels with each instruction (equal to the counter, or its inverse,
// at every stage). Because two instructions of one thread are always two stages apart:
//   * a branch resolved in EX only has the thread's next instruction behind it, which is
//     executed as the branch delay slot; there is no branch predictor and no flush;
//   * an instruction in DI depends at most on its thread's instruction in MEM, whose result
//     is forwarded in the same cycle; there are no dependency stalls.
// The only stalls come from the single memory bus: a load or store in MEM takes the bus from
// the fetch in EI for one cycle, and memory wait states hold the whole pipeline. A stall
// freezes every stage and the thread counter together, so the interleaving is never broken.
// Exceptions and interrupts are taken per thread in EX by the system coprocessor.
// Doubling PC and register bank, the counter, the removal of the predictor and the delay slot
// follow the design description; the instruction-set details follow MIPS-I; reset addresses,
// the exception vector, the memory handshake and per-thread HI/LO and coprocessor state are
// this design's choices.
// Interface: one memory bus (mem_req/we/be/addr/wdata, mem_rdata/mem_ack; the memory may
// acknowledge in the request cycle), one interrupt line per thread, and event outputs that
// report per cycle what the pipeline did (for counters).
module minimips_imt
  import mips_imt_pkg::*;
#(
  parameter word_t RESET_PC0  = 32'hBFC0_0000,
  parameter word_t RESET_PC1  = 32'hBFC0_0800,
  parameter word_t EXC_VECTOR = 32'h8000_0080
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [NTHREADS-1:0] irq,
  output logic       mem_req,
  output logic       mem_we,
  output logic [3:0] mem_be,
  output word_t      mem_addr,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  input  logic       mem_ack,
  // events, one per cycle
  output logic       ev_stall,      // pipeline held this cycle
  output logic       ev_retire,     // an instruction completed (left MEM)
  output tid_t       ev_retire_tid,
  output logic       ev_bypass,     // an operand was forwarded from MEM to DI
  output logic       ev_branch,     // a branch or jump reloaded its thread's PC
  output logic       ev_exception,  // an exception or interrupt was taken
  output logic       ev_interrupt   // ... and it was an interrupt
);
  logic   advance, stall_ei, stall_mem;
  tid_t   sel;
  word_t  pc [NTHREADS];
  pf_ei_t pf_out;
  ei_di_t ei_out;
  di_ex_t di_out;
  ex_mem_t ex_out;
  wb_t    wb;

  // bus
  logic       i_req, i_ack, d_req, d_we, d_ack;
  word_t      i_addr, i_data, d_addr, d_wdata, d_rdata;
  logic [3:0] d_be;

  // register banks
  tid_t     di_tid, ex_tid;
  regaddr_t rs_addr, rt_addr;
  word_t    rs_bank [NTHREADS];
  word_t    rt_bank [NTHREADS];
  word_t    hi_t [NTHREADS];
  word_t    lo_t [NTHREADS];
  word_t    rs_val, rt_val;
  logic     fwd_rs, fwd_rt;
  logic     hi_we, lo_we;
  word_t    hi_wdata, lo_wdata;

  // EX <-> coprocessor
  logic     cp_valid, cp_bd, cp_exc_req, cp_mtc0, cp_rfe, take_exc, int_taken;
  exc_e     cp_exc_code;
  word_t    cp_pc, cp_badvaddr, cp_wdata, cp_rdata, exc_vector;
  regaddr_t cp_reg;
  logic     redirect, branch_taken;
  word_t    redirect_target;
  logic     retire_valid;
  tid_t     retire_tid;

  assign advance = !(stall_ei || stall_mem);

  thread_sel u_sel (.clk, .rst_n, .advance, .sel);

  // PF: one PC per thread, the counter picks which one enters the pipeline
  for (genvar t = 0; t < NTHREADS; t++) begin : g_thread
    pc_unit #(.RESET_PC(t == 0 ? RESET_PC0 : RESET_PC1)) u_pf (
      .clk, .rst_n,
      .step     (advance && sel == tid_t'(t)),
      .redirect (redirect && ex_tid == tid_t'(t)),
      .target   (redirect_target),
      .pc       (pc[t])
    );

    reg_bank u_banc (
      .clk, .rst_n,
      .rs_addr, .rs_data (rs_bank[t]),
      .rt_addr, .rt_data (rt_bank[t]),
      .we       (advance && wb.valid && wb.tid == tid_t'(t)),
      .wr_addr  (wb.rd),
      .wr_data  (wb.data),
      .hi_we    (hi_we && ex_tid == tid_t'(t)),
      .hi_wdata,
      .lo_we    (lo_we && ex_tid == tid_t'(t)),
      .lo_wdata,
      .hi       (hi_t[t]),
      .lo       (lo_t[t])
    );
  end

  always_comb begin
    pf_out.valid = 1'b1;
    pf_out.tid   = sel;
    pf_out.pc    = pc[sel];
  end

  ei_stage u_ei (
    .clk, .rst_n, .advance,
    .pf_in (pf_out),
    .kill (take_exc), .kill_tid (ex_tid),
    .i_req, .i_addr, .i_data, .i_ack,
    .out (ei_out), .stall (stall_ei)
  );

  di_stage u_di (
    .clk, .rst_n, .advance,
    .in (ei_out),
    .tid (di_tid), .rs_addr, .rt_addr,
    .rs_val, .rt_val,
    .out (di_out)
  );

  bypass_unit u_byp (
    .di_tid, .rs_addr, .rt_addr,
    .rs_bank (rs_bank[di_tid]),
    .rt_bank (rt_bank[di_tid]),
    .wb, .rs_val, .rt_val, .fwd_rs, .fwd_rt
  );

  ex_stage u_ex (
    .clk, .rst_n, .advance,
    .in (di_out), .tid (ex_tid),
    .hi (hi_t[ex_tid]), .lo (lo_t[ex_tid]),
    .hi_we, .hi_wdata, .lo_we, .lo_wdata,
    .cp_valid, .cp_pc, .cp_bd, .cp_exc_req, .cp_exc_code, .cp_badvaddr,
    .cp_mtc0, .cp_rfe, .cp_reg, .cp_wdata, .cp_rdata,
    .take_exc, .exc_vector,
    .redirect, .redirect_target, .branch_taken,
    .out (ex_out)
  );

  syscop #(.EXC_VECTOR(EXC_VECTOR)) u_syscop (
    .clk, .rst_n, .advance,
    .ex_valid (cp_valid), .ex_tid, .ex_pc (cp_pc), .ex_bd (cp_bd),
    .exc_req (cp_exc_req), .exc_code (cp_exc_code), .badvaddr (cp_badvaddr),
    .mtc0 (cp_mtc0), .rfe (cp_rfe), .cp_reg, .wdata (cp_wdata),
    .irq,
    .rdata (cp_rdata), .take_exc, .vector (exc_vector), .int_taken
  );

  mem_stage u_mem (
    .clk, .rst_n, .advance,
    .in (ex_out),
    .d_req, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata, .d_ack,
    .wb, .retire_valid, .retire_tid, .stall (stall_mem)
  );

  bus_ctrl u_bus (
    .i_req, .i_addr, .i_data, .i_ack,
    .d_req, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata, .d_ack,
    .mem_req, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack
  );

  assign ev_stall      = !advance;
  assign ev_retire     = advance && retire_valid;
  assign ev_retire_tid = retire_tid;
  assign ev_bypass     = advance && di_out.valid && (fwd_rs || fwd_rt);
  assign ev_branch     = advance && branch_taken;
  assign ev_exception  = advance && take_exc;
  assign ev_interrupt  = advance && int_taken;

  // The thread bit carried by each instruction must match the counter: stages PF, DI and MEM
  // hold thread sel, stages EI and EX the other one.
  a_interleave_di: assert property (@(posedge clk) disable iff (!rst_n)
    di_out.valid |-> di_tid == sel);
  a_interleave_ex: assert property (@(posedge clk) disable iff (!rst_n)
    cp_valid |-> ex_tid != sel);
  a_interleave_ei: assert property (@(posedge clk) disable iff (!rst_n)
    ei_out.valid |-> ei_out.tid != sel);
  // Memory bus rule: a request that is not acknowledged stays unchanged until it is.
  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_we) && $stable(mem_be)
                            && (!mem_we || $stable(mem_wdata)));
  // The bus controller never acknowledges fetch and data in one cycle.
  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) !(i_ack && d_ack));
endmodule
