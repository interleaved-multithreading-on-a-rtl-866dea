// Memory access stage (the MEM entity) with write-back.
// Holds the EX/MEM stage register. A load or store issues one access on the data port of the
// bus controller; bytes and halfwords are placed in the word by the low address bits
// (little-endian byte lanes, byte enables for stores) and loads are sign- or zero-extended.
// If the access is acknowledged while the pipeline is stalled for another reason (a fetch
// that lost the bus), the read data is kept and the access is not repeated. The result
// leaves as the write-back bundle; the register bank writes it when the pipeline advances,
// and the bypass forwards it to DI in the same cycle.
// The stage's role follows the original core; byte order, lane placement and the
// held-access handling are this design's choices.
//   advance : load the stage register from EX
//   in      : instruction from EX
//   d_*     : data port of the bus controller
//   wb      : result to write back; retire_* : an instruction is in MEM (completes when
//             the pipeline advances); stall : access not yet acknowledged
module mem_stage
  import mips_imt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       advance,
  input  ex_mem_t    in,
  output logic       d_req,
  output logic       d_we,
  output logic [3:0] d_be,
  output word_t      d_addr,
  output word_t      d_wdata,
  input  word_t      d_rdata,
  input  logic       d_ack,
  output wb_t        wb,
  output logic       retire_valid,
  output tid_t       retire_tid,
  output logic       stall
);
  ex_mem_t r;
  logic    done;
  word_t   held;
  word_t   raw, lval;
  logic [7:0]  lb;
  logic [15:0] lh;
  logic [1:0] ofs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r    <= '0;
      done <= 1'b0;
      held <= '0;
    end else if (advance) begin
      r    <= in;
      done <= 1'b0;
    end else if (d_req && d_ack) begin
      done <= 1'b1;
      held <= d_rdata;
    end
  end

  always_comb begin
    ofs     = r.result[1:0];
    d_req   = r.valid && (r.load || r.store) && !done;
    d_we    = r.store;
    d_addr  = {r.result[31:2], 2'b00};
    unique case (r.size)
      SZ_BYTE: begin d_be = 4'b0001 << ofs;           d_wdata = {4{r.store_data[7:0]}};  end
      SZ_HALF: begin d_be = ofs[1] ? 4'b1100 : 4'b0011; d_wdata = {2{r.store_data[15:0]}}; end
      default: begin d_be = 4'b1111;                  d_wdata = r.store_data;            end
    endcase
    stall = d_req && !d_ack;

    raw  = done ? held : d_rdata;
    lb   = raw[8*ofs +: 8];
    lh   = ofs[1] ? raw[31:16] : raw[15:0];
    unique case (r.size)
      SZ_BYTE: lval = r.load_unsigned ? {24'b0, lb} : {{24{lb[7]}}, lb};
      SZ_HALF: lval = r.load_unsigned ? {16'b0, lh} : {{16{lh[15]}}, lh};
      default: lval = raw;
    endcase

    retire_valid = r.valid;
    retire_tid   = r.tid;
    wb.valid = r.valid && r.reg_write;
    wb.tid   = r.tid;
    wb.rd    = r.rd;
    wb.data  = r.load ? lval : r.result;
  end
endmodule
