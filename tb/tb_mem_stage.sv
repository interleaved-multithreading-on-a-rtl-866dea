// Test of the memory stage: byte/halfword/word stores give the right byte enables and lane
// data, loads are extended correctly for every offset, a stalled access acknowledged once is
// kept and not repeated, and non-memory results pass to write-back.
module tb_mem_stage;
  import mips_imt_pkg::*;
  logic clk = 0, rst_n = 0, advance = 0, d_req, d_we, d_ack = 0, stall;
  logic [3:0] d_be;
  word_t d_addr, d_wdata, d_rdata = '0;
  ex_mem_t in = '0;
  wb_t wb;
  logic retire_valid;
  tid_t retire_tid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem_stage dut (.*);

  task automatic load_instr(input ex_mem_t x);
    in = x; advance = 1;
    @(posedge clk); #1 advance = 0;
  endtask
  function automatic word_t ext(input word_t w, input size_e s, input logic [1:0] o, input logic u);
    logic [7:0] b; logic [15:0] h;
    b = w[8*o +: 8]; h = o[1] ? w[31:16] : w[15:0];
    case (s)
      SZ_BYTE: return u ? {24'b0, b} : {{24{b[7]}}, b};
      SZ_HALF: return u ? {16'b0, h} : {{16{h[15]}}, h};
      default: return w;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ex_mem_t x;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      size_e s;
      logic [1:0] o;
      word_t mdata;
      s = size_e'($urandom_range(0, 2));
      o = (s == SZ_WORD) ? 2'b00 : (s == SZ_HALF) ? {1'($urandom), 1'b0} : 2'($urandom);
      x = '0;
      x.valid = 1; x.tid = tid_t'($urandom); x.rd = 5'($urandom); x.size = s;
      x.result = {$urandom_range(0, 32'h3FFF_FFFF), o}; x.store_data = $urandom;
      x.load_unsigned = $urandom;
      case (i % 3)
        0: begin x.load = 1; x.reg_write = 1; end
        1: x.store = 1;
        default: x.reg_write = 1;
      endcase
      load_instr(x);
      mdata = $urandom; d_rdata = mdata;
      if (x.load || x.store) begin
        // one wait cycle, then acknowledge while the pipeline still stalls, then advance
        d_ack = 0; #1;
        checks += 3;
        if (!d_req || !stall) failures++;
        if (d_addr !== {x.result[31:2], 2'b00} || d_we !== x.store) failures++;
        if (x.store) begin
          logic [3:0] ebe; word_t ew;
          ebe = (s == SZ_BYTE) ? 4'b0001 << o : (s == SZ_HALF) ? (o[1] ? 4'b1100 : 4'b0011) : 4'hF;
          ew  = (s == SZ_BYTE) ? {4{x.store_data[7:0]}} : (s == SZ_HALF) ? {2{x.store_data[15:0]}} : x.store_data;
          if (d_be !== ebe || (d_wdata & {{8{ebe[3]}}, {8{ebe[2]}}, {8{ebe[1]}}, {8{ebe[0]}}}) !== (ew & {{8{ebe[3]}}, {8{ebe[2]}}, {8{ebe[1]}}, {8{ebe[0]}}}))
            begin failures++; $display("FAIL store lanes %0d", i); end
        end
        @(posedge clk); #1 d_ack = 1; #1;
        checks++; if (stall) failures++;
        @(posedge clk); #1 d_ack = 0; d_rdata = ~mdata; #1;
        checks++; if (d_req) begin failures++; $display("FAIL access repeated"); end
      end
      #1;
      checks += 2;
      if (wb.valid !== x.reg_write || wb.rd !== x.rd || wb.tid !== x.tid) failures++;
      if (x.load) begin
        if (wb.data !== ext(mdata, s, o, x.load_unsigned)) begin failures++; $display("FAIL load %0d", i); end
      end else if (wb.data !== x.result) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
