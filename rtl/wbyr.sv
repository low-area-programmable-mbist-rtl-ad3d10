// wbyr: wrapper bypass register.
//
// A single flip-flop between WSI and WSO, giving the shortest serial path
// through the wrapper under the BYPASS instruction: with shift high, so shows
// si one clock later. It clears asynchronously on rst_n (WRSTN). The
// architecture names this register; its one-flip-flop form is the usual
// IEEE 1500 one.
module wbyr (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic si,
  output logic so
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (shift) q <= si;
  end

  assign so = q;

endmodule
