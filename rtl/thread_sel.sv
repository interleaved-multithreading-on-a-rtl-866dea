// Thread selector: the one-bit counter that interleaves the two threads.
// Every cycle in which the pipeline advances, the counter toggles, so the PF stage takes an
// instruction from thread 0, then thread 1, then thread 0 again (the A1 B1 A2 B2 order of the
// interleaved pipeline). While the pipeline is stalled it holds, so the strict alternation
// survives memory wait cycles. The counter and its job of selecting the doubled PC and
// register bank follow the design description; holding it during stalls and starting at
// thread 0 after reset are this design's choices.
//   clk, rst_n : clock, active-low synchronous reset (sel = 0 after reset)
//   advance    : the pipeline moves one stage this cycle
//   sel        : thread whose PC is in the PF stage this cycle
module thread_sel (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  output logic sel
);
  always_ff @(posedge clk) begin
    if (!rst_n)       sel <= 1'b0;
    else if (advance) sel <= ~sel;
  end
endmodule
