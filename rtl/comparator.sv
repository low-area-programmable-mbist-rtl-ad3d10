// comparator: checks the word read back from the FIFO.
//
// When compare is 1, error is loaded with (actual_data != expected_data) at
// the rising edge, so error reports the compare of the previous cycle and
// keeps that value until the next compare. rst (synchronous, active high)
// clears it. actual_data is the FIFO output and expected_data the word the
// BIST controller wrote; the registered output is this design's choice.
module comparator #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              compare,
  input  logic [DATA_W-1:0] actual_data,
  input  logic [DATA_W-1:0] expected_data,
  output logic              error
);

  always_ff @(posedge clk) begin
    if (rst)          error <= 1'b0;
    else if (compare) error <= (actual_data != expected_data);
  end

endmodule
