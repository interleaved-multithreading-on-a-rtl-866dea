// Behavioural model of the external memory used by the testbenches.
// 16 KiB of words. The word index is address bit 29 followed by bits 12:2, so the reset
// region (0xBFC0_0000..), the exception vector (0x8000_0080) and the data region
// (0x0000_1000..0x0000_1FFF) land in distinct words while the array stays small. Reads are
// combinational and acknowledged in the request cycle unless hold is high (a wait state).
// Writes use the byte enables and happen at the clock edge of an acknowledged request.
// The ld_* port lets a testbench fill the array one word per clock before the run.
module mem_model (
  input  logic        clk,
  input  logic        ld_en,     // testbench preload port
  input  logic [11:0] ld_idx,
  input  logic [31:0] ld_data,
  input  logic        hold,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        ack
);
  logic [31:0] mem [4096];
  logic [11:0] idx;

  assign idx   = {addr[29], addr[12:2]};
  assign ack   = req && !hold;
  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (ld_en)
      mem[ld_idx] <= ld_data;
    else if (req && we && !hold)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[idx][8*b +: 8] <= wdata[8*b +: 8];
  end

  function automatic logic [11:0] index_of(input logic [31:0] a);
    return {a[29], a[12:2]};
  endfunction
endmodule
