// Random-program test of the interleaved core against an instruction-level reference model.
// Each round generates a different random program for each thread: ALU, shift and immediate
// operations, multiply/divide with HI/LO moves, aligned byte/halfword/word loads and stores
// into the thread's own data area (base r20), and forward branches of every kind with random
// delay-slot instructions. Registers r1-r15 are the random targets; sources include r0.
// The program ends by storing r1-r15, HI and LO. The same words are executed by a
// straightforward sequential MIPS-I interpreter written here (one thread at a time, with the
// branch delay slot); the core runs both threads interleaved, with random memory wait
// states. Compared: every stored register and every word of both data areas.
module tb_minimips_random;
  import mips_asm_pkg::*;
  localparam logic [31:0] T0 = 32'hBFC0_0000, T1 = 32'hBFC0_0800;
  localparam int ROUNDS = 6, LEN = 300;
  localparam int DATA [2] = '{'h1000, 'h1400};    // per-thread data area, 256 bytes
  localparam int RES  [2] = '{'h1800, 'h1900};    // per-thread register dump
  localparam int DONE [2] = '{'h1F00, 'h1F04};

  logic clk = 0, rst_n = 0, hold = 0;
  logic mem_req, mem_we, mem_ack;
  logic [3:0] mem_be;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic ev_stall, ev_retire, ev_retire_tid, ev_bypass, ev_branch, ev_exception, ev_interrupt;
  logic ld_en = 0;
  logic [11:0] ld_idx = '0;
  logic [31:0] ld_data = '0;
  always #5 clk = ~clk;

  minimips_imt dut (
    .clk, .rst_n, .irq (2'b00),
    .mem_req, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .ev_stall, .ev_retire, .ev_retire_tid, .ev_bypass, .ev_branch, .ev_exception, .ev_interrupt
  );
  mem_model u_mem (
    .clk, .ld_en, .ld_idx, .ld_data, .hold,
    .req (mem_req), .we (mem_we), .be (mem_be), .addr (mem_addr), .wdata (mem_wdata),
    .rdata (mem_rdata), .ack (mem_ack)
  );

  int checks = 0, failures = 0, excs = 0, bypasses = 0, branches = 0;
  logic [31:0] img [4096];
  logic [31:0] refm [4096];
  logic [31:0] at;
  task automatic org(input logic [31:0] a); at = a; endtask
  task automatic emit(input logic [31:0] w); img[u_mem.index_of(at)] = w; at += 4; endtask
  function automatic logic [31:0] rd_mem(input int a); return u_mem.mem[u_mem.index_of(32'(a))]; endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_exception) excs++;
    if (ev_bypass) bypasses++;
    if (ev_branch) branches++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rreg(); return $urandom_range(0, 15); endfunction
  function automatic int wreg(); return $urandom_range(1, 15); endfunction

  // one random non-branch instruction
  function automatic logic [31:0] rand_simple(input int t);
    int k;
    k = $urandom_range(0, 29);
    case (k)
      0:  return addu(wreg(), rreg(), rreg());
      1:  return subu(wreg(), rreg(), rreg());
      2:  return and_r(wreg(), rreg(), rreg());
      3:  return or_r(wreg(), rreg(), rreg());
      4:  return xor_r(wreg(), rreg(), rreg());
      5:  return nor_r(wreg(), rreg(), rreg());
      6:  return slt(wreg(), rreg(), rreg());
      7:  return sltu(wreg(), rreg(), rreg());
      8:  return sll(wreg(), rreg(), $urandom_range(0, 31));
      9:  return srl(wreg(), rreg(), $urandom_range(0, 31));
      10: return sra(wreg(), rreg(), $urandom_range(0, 31));
      11: return sllv(wreg(), rreg(), rreg());
      12: return srav(wreg(), rreg(), rreg());
      13: return addiu(wreg(), rreg(), $urandom_range(0, 65535));
      14: return slti(wreg(), rreg(), $urandom_range(0, 65535));
      15: return sltiu(wreg(), rreg(), $urandom_range(0, 65535));
      16: return andi(wreg(), rreg(), $urandom_range(0, 65535));
      17: return ori(wreg(), rreg(), $urandom_range(0, 65535));
      18: return xori(wreg(), rreg(), $urandom_range(0, 65535));
      19: return lui(wreg(), $urandom_range(0, 65535));
      20: return mult(rreg(), rreg());
      21: return multu(rreg(), rreg());
      22: return ($urandom_range(0, 1) == 0) ? div(rreg(), rreg()) : divu(rreg(), rreg());
      23: return ($urandom_range(0, 1) == 0) ? mfhi(wreg()) : mflo(wreg());
      24: return ($urandom_range(0, 1) == 0) ? mthi(rreg()) : mtlo(rreg());
      25: return sw(rreg(), 4 * $urandom_range(0, 63), 20);
      26: return ($urandom_range(0, 1) == 0) ? sh(rreg(), 2 * $urandom_range(0, 127), 20)
                                             : sb(rreg(), $urandom_range(0, 255), 20);
      27: return lw(wreg(), 4 * $urandom_range(0, 63), 20);
      28: case ($urandom_range(0, 3))
            0: return lh(wreg(), 2 * $urandom_range(0, 127), 20);
            1: return lhu(wreg(), 2 * $urandom_range(0, 127), 20);
            2: return lb(wreg(), $urandom_range(0, 255), 20);
            default: return lbu(wreg(), $urandom_range(0, 255), 20);
          endcase
      default: return rtype('h06, rreg(), rreg(), wreg());   // SRLV
    endcase
  endfunction

  function automatic logic [31:0] rand_branch(input int off);
    case ($urandom_range(0, 7))
      0: return beq(rreg(), rreg(), off);
      1: return bne(rreg(), rreg(), off);
      2: return blez(rreg(), off);
      3: return bgtz(rreg(), off);
      4: return bltz(rreg(), off);
      5: return bgez(rreg(), off);
      6: return beq(0, 0, off);
      default: return bne(rreg(), 0, off);
    endcase
  endfunction

  task automatic gen(input int t, input logic [31:0] base);
    int n;
    org(base);
    emit(addiu(20, 0, DATA[t]));
    for (int r = 1; r < 16; r++) emit(addiu(r, 0, $urandom_range(0, 65535)));
    n = 0;
    while (n < LEN) begin
      if (n < LEN - 6 && $urandom_range(0, 5) == 0) begin
        emit(rand_branch($urandom_range(1, 4)));
        emit(rand_simple(t));                    // delay slot
        n += 2;
      end else begin
        emit(rand_simple(t));
        n++;
      end
    end
    for (int k = 0; k < 6; k++) emit(nop());      // landing room for the last branches
    for (int r = 1; r < 16; r++) emit(sw(r, RES[t] + 4 * r, 0));
    emit(mfhi(1)); emit(sw(1, RES[t] + 64, 0));
    emit(mflo(1)); emit(sw(1, RES[t] + 68, 0));
    emit(addiu(1, 0, 1)); emit(sw(1, DONE[t], 0));
    emit(beq(0, 0, -1)); emit(nop());
  endtask

  // ---------------- sequential reference interpreter ----------------
  function automatic logic [31:0] ld_ref(input logic [31:0] a);
    return refm[u_mem.index_of(a)];
  endfunction
  task automatic st_ref(input logic [31:0] a, input logic [31:0] v, input logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) refm[u_mem.index_of(a)][8*b +: 8] = v[8*b +: 8];
  endtask

  task automatic iss(input logic [31:0] start);
    logic [31:0] r [32];
    logic [31:0] pc, npc, hi, lo, ir, rs, rt, imm, zimm, ea, w, tgt;
    logic [63:0] p;
    logic br_pending, take;
    int steps;
    for (int i = 0; i < 32; i++) r[i] = 0;
    hi = 0; lo = 0; pc = start; br_pending = 0; tgt = 0; steps = 0;
    forever begin
      ir = refm[u_mem.index_of(pc)];
      if (ir == beq(0, 0, -1)) break;              // reached the final spin loop
      rs = r[ir[25:21]]; rt = r[ir[20:16]];
      imm = {{16{ir[15]}}, ir[15:0]}; zimm = {16'b0, ir[15:0]};
      ea = rs + imm;
      take = 0;
      npc = br_pending ? tgt : pc + 4;
      br_pending = 0;
      case (ir[31:26])
        6'h00: case (ir[5:0])
          6'h00: r[ir[15:11]] = rt << ir[10:6];
          6'h02: r[ir[15:11]] = rt >> ir[10:6];
          6'h03: r[ir[15:11]] = 32'($signed(rt) >>> ir[10:6]);
          6'h04: r[ir[15:11]] = rt << rs[4:0];
          6'h06: r[ir[15:11]] = rt >> rs[4:0];
          6'h07: r[ir[15:11]] = 32'($signed(rt) >>> rs[4:0]);
          6'h10: r[ir[15:11]] = hi;
          6'h11: hi = rs;
          6'h12: r[ir[15:11]] = lo;
          6'h13: lo = rs;
          6'h18: begin p = 64'($signed(rs)) * 64'($signed(rt)); hi = p[63:32]; lo = p[31:0]; end
          6'h19: begin p = {32'b0, rs} * {32'b0, rt}; hi = p[63:32]; lo = p[31:0]; end
          6'h1A: if (rt == 0) begin hi = rs; lo = '1; end
                 else if (rs == 32'h8000_0000 && rt == '1) begin hi = 0; lo = rs; end
                 else begin hi = 32'($signed(rs) % $signed(rt)); lo = 32'($signed(rs) / $signed(rt)); end
          6'h1B: if (rt == 0) begin hi = rs; lo = '1; end else begin hi = rs % rt; lo = rs / rt; end
          6'h21: r[ir[15:11]] = rs + rt;
          6'h23: r[ir[15:11]] = rs - rt;
          6'h24: r[ir[15:11]] = rs & rt;
          6'h25: r[ir[15:11]] = rs | rt;
          6'h26: r[ir[15:11]] = rs ^ rt;
          6'h27: r[ir[15:11]] = ~(rs | rt);
          6'h2A: r[ir[15:11]] = ($signed(rs) < $signed(rt)) ? 1 : 0;
          6'h2B: r[ir[15:11]] = (rs < rt) ? 1 : 0;
          default: $display("reference model: unexpected function %h", ir[5:0]);
        endcase
        6'h01: take = (ir[16] == 0) ? rs[31] : !rs[31];
        6'h04: take = rs == rt;
        6'h05: take = rs != rt;
        6'h06: take = rs[31] || rs == 0;
        6'h07: take = !rs[31] && rs != 0;
        6'h09: r[ir[20:16]] = rs + imm;
        6'h0A: r[ir[20:16]] = ($signed(rs) < $signed(imm)) ? 1 : 0;
        6'h0B: r[ir[20:16]] = (rs < imm) ? 1 : 0;
        6'h0C: r[ir[20:16]] = rs & zimm;
        6'h0D: r[ir[20:16]] = rs | zimm;
        6'h0E: r[ir[20:16]] = rs ^ zimm;
        6'h0F: r[ir[20:16]] = {ir[15:0], 16'b0};
        6'h20: begin w = ld_ref(ea); r[ir[20:16]] = {{24{w[8*ea[1:0]+7]}}, w[8*ea[1:0] +: 8]}; end
        6'h24: begin w = ld_ref(ea); r[ir[20:16]] = {24'b0, w[8*ea[1:0] +: 8]}; end
        6'h21: begin w = ld_ref(ea); r[ir[20:16]] = {{16{w[16*ea[1]+15]}}, w[16*ea[1] +: 16]}; end
        6'h25: begin w = ld_ref(ea); r[ir[20:16]] = {16'b0, w[16*ea[1] +: 16]}; end
        6'h23: r[ir[20:16]] = ld_ref(ea);
        6'h28: st_ref(ea, {4{rt[7:0]}}, 4'b0001 << ea[1:0]);
        6'h29: st_ref(ea, {2{rt[15:0]}}, ea[1] ? 4'b1100 : 4'b0011);
        6'h2B: st_ref(ea, rt, 4'hF);
        default: $display("reference model: unexpected opcode %h", ir[31:26]);
      endcase
      r[0] = 0;
      if (take) begin br_pending = 1; tgt = pc + 4 + {imm[29:0], 2'b00}; end
      pc = npc;
      steps++;
      if (steps > 100000) break;
    end
  endtask

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      int wait_cycles;
      for (int i = 0; i < 4096; i++) img[i] = '0;
      for (int t = 0; t < 2; t++)
        for (int k = 0; k < 64; k++) img[u_mem.index_of(32'(DATA[t] + 4 * k))] = $urandom;
      gen(0, T0);
      gen(1, T1);
      for (int i = 0; i < 4096; i++) refm[i] = img[i];
      iss(T0);
      iss(T1);

      rst_n = 0;
      for (int i = 0; i < 4096; i++) begin
        ld_en = 1; ld_idx = 12'(i); ld_data = img[i];
        @(posedge clk); #1;
      end
      ld_en = 0;
      @(posedge clk); #1 rst_n = 1;
      wait_cycles = 0;
      while (!(rd_mem(DONE[0]) == 1 && rd_mem(DONE[1]) == 1)) begin
        @(posedge clk); #1;
        hold = (round % 2 == 1) && ($urandom_range(0, 3) == 0);
      end
      hold = 0;
      repeat (5) @(posedge clk);
      #1;
      for (int t = 0; t < 2; t++) begin
        for (int k = 1; k < 18; k++) begin
          checks++;
          if (rd_mem(RES[t] + 4 * k) !== ld_ref(32'(RES[t] + 4 * k))) begin
            failures++;
            $display("FAIL round %0d thread %0d dump word %0d: core %08h, reference %08h", round, t, k,
                     rd_mem(RES[t] + 4 * k), ld_ref(32'(RES[t] + 4 * k)));
          end
        end
        for (int k = 0; k < 64; k++) begin
          checks++;
          if (rd_mem(DATA[t] + 4 * k) !== ld_ref(32'(DATA[t] + 4 * k))) begin
            failures++;
            $display("FAIL round %0d thread %0d data word %0d", round, t, k);
          end
        end
      end
    end
    checks++;
    if (excs != 0 || bypasses == 0 || branches == 0) begin
      failures++;
      $display("FAIL exceptions=%0d bypasses=%0d branches=%0d", excs, bypasses, branches);
    end
    $display("bypasses=%0d taken branches=%0d", bypasses, branches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
