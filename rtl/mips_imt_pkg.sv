// Shared types and constants of the two-thread interleaved MIPS-I pipeline.
// The pipeline has five stages (PF, EI, DI, EX, MEM) and carries each instruction's thread
// number along with it. The decoded-control struct, the stage-register structs, the ALU
// operation codes and the coprocessor-0 exception codes live here so that every stage
// module agrees on them. Opcode and exception-code values are those of the MIPS-I
// instruction set; the struct layout is this design's own.
package mips_imt_pkg;

  localparam int unsigned NTHREADS = 2;   // two interleaved threads, as in Table 3
  localparam int unsigned XLEN     = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      regaddr_t;
  typedef logic            tid_t;         // one thread bit, the "bit counter"

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } br_e;

  typedef enum logic [1:0] { JMP_NONE, JMP_IMM, JMP_REG } jmp_e;

  typedef enum logic [2:0] {
    MD_NONE, MD_MULT, MD_MULTU, MD_DIV, MD_DIVU, MD_MTHI, MD_MTLO
  } md_e;

  typedef enum logic [1:0] { RES_ALU, RES_LINK, RES_HILO, RES_COP0 } res_e;

  typedef enum logic [1:0] { SZ_BYTE, SZ_HALF, SZ_WORD } size_e;

  // Coprocessor-0 exception codes (MIPS-I Cause.ExcCode)
  typedef enum logic [4:0] {
    EXC_INT  = 5'd0,
    EXC_ADEL = 5'd4,
    EXC_ADES = 5'd5,
    EXC_SYS  = 5'd8,
    EXC_BP   = 5'd9,
    EXC_RI   = 5'd10,
    EXC_OV   = 5'd12
  } exc_e;

  // Coprocessor-0 register numbers
  localparam regaddr_t CP0_BADVADDR = 5'd8;
  localparam regaddr_t CP0_STATUS   = 5'd12;
  localparam regaddr_t CP0_CAUSE    = 5'd13;
  localparam regaddr_t CP0_EPC      = 5'd14;

  // Control produced by the decoder
  typedef struct packed {
    alu_op_e  alu_op;
    logic     b_imm;       // second ALU operand is the immediate
    logic     shamt_var;   // shift amount from rs instead of the shamt field
    logic     trap_ov;     // signed overflow raises an exception (ADD, ADDI, SUB)
    word_t    imm;         // extended immediate
    logic     reg_write;
    regaddr_t rd;          // destination register
    res_e     res_sel;
    logic     hilo_hi;     // MFHI (1) or MFLO (0)
    br_e      br;
    logic     br_link;     // BLTZAL / BGEZAL
    jmp_e     jmp;
    md_e      md;
    logic     load;
    logic     store;
    size_e    size;
    logic     load_unsigned;
    logic     mfc0;
    logic     mtc0;
    logic     rfe;
    logic     syscall;
    logic     brk;
    logic     illegal;
  } ctrl_t;

  // PF -> EI
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    word_t pc;
  } pf_ei_t;

  // EI -> DI
  typedef struct packed {
    logic  valid;
    tid_t  tid;
    word_t pc;
    word_t instr;
  } ei_di_t;

  // DI -> EX
  typedef struct packed {
    logic     valid;
    tid_t     tid;
    word_t    pc;
    ctrl_t    ctrl;
    word_t    rs_val;
    word_t    rt_val;
    logic [4:0] shamt;
    logic [25:0] jidx;
    regaddr_t cp0_reg;
  } di_ex_t;

  // EX -> MEM
  typedef struct packed {
    logic     valid;
    tid_t     tid;
    logic     reg_write;
    regaddr_t rd;
    word_t    result;      // ALU result, or the effective address of a load/store
    logic     load;
    logic     store;
    size_e    size;
    logic     load_unsigned;
    word_t    store_data;
  } ex_mem_t;

  // Write-back from MEM to the register bank and to the bypass
  typedef struct packed {
    logic     valid;
    tid_t     tid;
    regaddr_t rd;
    word_t    data;
  } wb_t;

endpackage
