// Memory interface controller (the bus_ctrl entity).
// The core has one memory bus shared by instruction fetch (EI stage) and data access (MEM
// stage). A data access has priority, since the MEM instruction is the oldest; a fetch that
// loses the bus sees no acknowledge and the pipeline stalls for that cycle. The bus itself
// is a simple request/acknowledge port: the memory may acknowledge in the same cycle
// (combinational read data) or later, inserting wait states. A single shared bus follows the
// original core's organisation; the handshake and the priority are this design's choices.
//   i_req, i_addr -> i_data, i_ack       : fetch port
//   d_req, d_we, d_be, d_addr, d_wdata -> d_rdata, d_ack : data port
//   mem_*                                : external bus
module bus_ctrl
  import mips_imt_pkg::*;
(
  input  logic       i_req,
  input  word_t      i_addr,
  output word_t      i_data,
  output logic       i_ack,
  input  logic       d_req,
  input  logic       d_we,
  input  logic [3:0] d_be,
  input  word_t      d_addr,
  input  word_t      d_wdata,
  output word_t      d_rdata,
  output logic       d_ack,
  output logic       mem_req,
  output logic       mem_we,
  output logic [3:0] mem_be,
  output word_t      mem_addr,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  input  logic       mem_ack
);
  always_comb begin
    mem_req   = d_req | i_req;
    mem_we    = d_req & d_we;
    mem_be    = d_req ? d_be : 4'hF;
    mem_addr  = d_req ? d_addr : i_addr;
    mem_wdata = d_wdata;
    d_ack     = d_req & mem_ack;
    i_ack     = ~d_req & i_req & mem_ack;
    d_rdata   = mem_rdata;
    i_data    = mem_rdata;
  end
endmodule
