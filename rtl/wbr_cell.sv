// wbr_cell: one wrapper boundary cell (IEEE 1500 style standard cell).
//
// A shift/capture flip-flop (Reg) and an update flip-flop (PO). The three
// modes follow the architecture's standard cell:
//   shift   = 1 : Reg <= SI, and SO always shows Reg
//   capture = 1 : Reg <= PI
//   update  = 1 : PO  <= Reg
// If shift and capture are both high, shift wins (this design's choice).
// Update acts on the separate PO flip-flop, so the value seen by the core
// only changes on an update, never while data is being shifted.
// Both flip-flops clear asynchronously when rst_n (WRSTN) is low.
// Timing: every action takes effect at the rising edge of clk (WRCK).
module wbr_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic capture,
  input  logic update,
  input  logic si,
  input  logic pi,
  output logic so,
  output logic po
);

  logic reg_q;
  logic po_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       reg_q <= 1'b0;
    else if (shift)   reg_q <= si;
    else if (capture) reg_q <= pi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      po_q <= 1'b0;
    else if (update) po_q <= reg_q;
  end

  assign so = reg_q;
  assign po = po_q;

endmodule
