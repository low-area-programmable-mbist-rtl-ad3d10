// wbr: wrapper boundary register, a chain of N wbr_cell instances.
//
// It carries the instruction word serially from WSI into the core and lets
// the core's instruction/status word be captured and shifted out on WSO.
// Cell N-1 takes si; cell i feeds cell i-1; cell 0 drives so. After N shift
// cycles the first bit shifted in sits in cell 0, so words are shifted in and
// out least significant bit first. shift, capture and update act on all cells
// together; po changes only on update.
// Default N = 24, the instruction register width of the architecture.
module wbr #(
  parameter int unsigned N = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         capture,
  input  logic         update,
  input  logic         si,
  input  logic [N-1:0] pi,
  output logic         so,
  output logic [N-1:0] po
);

  logic [N:0] chain;  // chain[i+1] feeds cell i; chain[0] is the serial out

  assign chain[N] = si;

  for (genvar i = 0; i < N; i++) begin : g_cell
    wbr_cell u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .shift  (shift),
      .capture(capture),
      .update (update),
      .si     (chain[i+1]),
      .pi     (pi[i]),
      .so     (chain[i]),
      .po     (po[i])
    );
  end

  assign so = chain[0];

endmodule
