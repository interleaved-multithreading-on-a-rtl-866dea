// Execute stage (the EX entity), the fourth pipeline stage.
// Holds the DI/EX stage register and does the instruction's work: the ALU (add, subtract,
// logic, set-less-than, shifts, LUI), the multiply/divide unit writing HI/LO, the effective
// address of loads and stores, and the resolution of branches and jumps. A taken branch or a
// jump reloads the PC of the instruction's own thread; since that thread's next instruction
// was fetched two cycles earlier, it becomes the single branch delay slot and nothing is
// flushed (no prediction). Synchronous exceptions (reserved instruction, SYSCALL, BREAK,
// signed overflow, misaligned load/store address) are reported to the system coprocessor,
// which decides, together with pending interrupts, whether the instruction is replaced by an
// exception entry: the instruction then has no effect, its thread's PC is loaded with the
// exception vector, and the thread's next instruction (in EI) is dropped by the fetch stage.
// A per-thread flag remembers whether the thread's last instruction was a branch or jump, so
// the coprocessor can tell a delay-slot instruction.
// Resolving branches here and the one delay slot follow the design description; the
// multiply/divide unit is a single-cycle combinational one, this design's simplification.
// All state changes (PC reload, HI/LO, coprocessor writes) happen only when the pipeline
// advances.
module ex_stage
  import mips_imt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    advance,
  input  di_ex_t  in,
  output tid_t    tid,
  // HI/LO of this instruction's thread
  input  word_t   hi,
  input  word_t   lo,
  output logic    hi_we,
  output word_t   hi_wdata,
  output logic    lo_we,
  output word_t   lo_wdata,
  // system coprocessor
  output logic    cp_valid,
  output word_t   cp_pc,
  output logic    cp_bd,
  output logic    cp_exc_req,
  output exc_e    cp_exc_code,
  output word_t   cp_badvaddr,
  output logic    cp_mtc0,
  output logic    cp_rfe,
  output regaddr_t cp_reg,
  output word_t   cp_wdata,
  input  word_t   cp_rdata,
  input  logic    take_exc,
  input  word_t   exc_vector,
  // PC reload of this instruction's thread
  output logic    redirect,
  output word_t   redirect_target,
  output logic    branch_taken,
  // to MEM
  output ex_mem_t out
);
  di_ex_t r;
  logic   last_ctrl [NTHREADS];

  ctrl_t  c;
  word_t  a, b, sum, diff, alu, pcp4, br_target, addr;
  logic   ov, cond, misaligned;
  logic [4:0]  amt;
  logic [63:0] prod;
  word_t  q, rem;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0;
      for (int t = 0; t < NTHREADS; t++) last_ctrl[t] <= 1'b0;
    end else if (advance) begin
      r <= in;
      if (r.valid)
        last_ctrl[r.tid] <= !take_exc && (c.br != BR_NONE || c.jmp != JMP_NONE);
    end
  end

  always_comb begin
    c    = r.ctrl;
    tid  = r.tid;
    a    = r.rs_val;
    b    = c.b_imm ? c.imm : r.rt_val;
    sum  = a + b;
    diff = a - b;
    amt  = c.shamt_var ? r.rs_val[4:0] : r.shamt;
    ov   = 1'b0;
    unique case (c.alu_op)
      ALU_ADD:  begin alu = sum;  ov = (a[31] == b[31]) && (sum[31] != a[31]); end
      ALU_SUB:  begin alu = diff; ov = (a[31] != b[31]) && (diff[31] != a[31]); end
      ALU_AND:  alu = a & b;
      ALU_OR:   alu = a | b;
      ALU_XOR:  alu = a ^ b;
      ALU_NOR:  alu = ~(a | b);
      ALU_SLT:  alu = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: alu = {31'b0, a < b};
      ALU_SLL:  alu = r.rt_val << amt;
      ALU_SRL:  alu = r.rt_val >> amt;
      ALU_SRA:  alu = word_t'($signed(r.rt_val) >>> amt);
      default:  alu = b;   // ALU_LUI
    endcase

    // branches and jumps
    pcp4      = r.pc + 32'd4;
    br_target = pcp4 + {c.imm[29:0], 2'b00};
    unique case (c.br)
      BR_EQ:   cond = r.rs_val == r.rt_val;
      BR_NE:   cond = r.rs_val != r.rt_val;
      BR_LEZ:  cond = r.rs_val[31] || r.rs_val == '0;
      BR_GTZ:  cond = !r.rs_val[31] && r.rs_val != '0;
      BR_LTZ:  cond = r.rs_val[31];
      BR_GEZ:  cond = !r.rs_val[31];
      default: cond = 1'b0;
    endcase

    // multiply / divide
    unique case (c.md)
      MD_MULT:  prod = {{32{a[31]}}, a} * {{32{r.rt_val[31]}}, r.rt_val};
      default:  prod = {32'b0, a} * {32'b0, r.rt_val};
    endcase
    if (r.rt_val == '0) begin
      q   = '1;
      rem = a;
    end else if (c.md == MD_DIV) begin
      if (a == 32'h8000_0000 && r.rt_val == '1) begin
        q   = 32'h8000_0000;
        rem = '0;
      end else begin
        q   = word_t'($signed(a) / $signed(r.rt_val));
        rem = word_t'($signed(a) % $signed(r.rt_val));
      end
    end else begin
      q   = a / r.rt_val;
      rem = a % r.rt_val;
    end

    // loads and stores
    addr = r.rs_val + c.imm;
    unique case (c.size)
      SZ_HALF: misaligned = addr[0];
      SZ_WORD: misaligned = addr[1:0] != 2'b00;
      default: misaligned = 1'b0;
    endcase

    // exceptions reported to the coprocessor
    cp_exc_req  = 1'b1;
    cp_exc_code = EXC_RI;
    if (c.illegal)                         cp_exc_code = EXC_RI;
    else if (c.syscall)                    cp_exc_code = EXC_SYS;
    else if (c.brk)                        cp_exc_code = EXC_BP;
    else if (c.trap_ov && ov)              cp_exc_code = EXC_OV;
    else if (c.load && misaligned)         cp_exc_code = EXC_ADEL;
    else if (c.store && misaligned)        cp_exc_code = EXC_ADES;
    else                                   cp_exc_req  = 1'b0;
    cp_valid    = r.valid;
    cp_pc       = r.pc;
    cp_bd       = last_ctrl[r.tid];
    cp_badvaddr = addr;
    cp_mtc0     = r.valid && c.mtc0;
    cp_rfe      = r.valid && c.rfe;
    cp_reg      = r.cp0_reg;
    cp_wdata    = r.rt_val;

    // thread PC reload
    branch_taken = r.valid && !take_exc && (cond || c.jmp != JMP_NONE);
    redirect     = advance && r.valid && (take_exc || cond || c.jmp != JMP_NONE);
    if (take_exc)             redirect_target = exc_vector;
    else if (c.jmp == JMP_IMM) redirect_target = {pcp4[31:28], r.jidx, 2'b00};
    else if (c.jmp == JMP_REG) redirect_target = r.rs_val;
    else                       redirect_target = br_target;

    // HI / LO
    hi_we    = 1'b0;
    lo_we    = 1'b0;
    hi_wdata = a;
    lo_wdata = a;
    if (advance && r.valid && !take_exc) begin
      unique case (c.md)
        MD_MULT, MD_MULTU: begin
          hi_we = 1'b1; lo_we = 1'b1; hi_wdata = prod[63:32]; lo_wdata = prod[31:0];
        end
        MD_DIV, MD_DIVU: begin
          hi_we = 1'b1; lo_we = 1'b1; hi_wdata = rem; lo_wdata = q;
        end
        MD_MTHI: hi_we = 1'b1;
        MD_MTLO: lo_we = 1'b1;
        default: ;
      endcase
    end

    // to MEM
    out.valid         = r.valid && !take_exc;
    out.tid           = r.tid;
    out.reg_write     = c.reg_write;
    out.rd            = c.rd;
    out.load          = c.load;
    out.store         = c.store;
    out.size          = c.size;
    out.load_unsigned = c.load_unsigned;
    out.store_data    = r.rt_val;
    unique case (c.res_sel)
      RES_LINK: out.result = r.pc + 32'd8;
      RES_HILO: out.result = c.hilo_hi ? hi : lo;
      RES_COP0: out.result = cp_rdata;
      default:  out.result = (c.load || c.store) ? addr : alu;
    endcase
  end
endmodule
