// mbist_fifo: synchronous FIFO, the buffer under test.
//
// A DEPTH x DATA_W memory with a write pointer, a read pointer and an
// occupancy counter, all on one clock. wr stores data_in at the write pointer
// unless the FIFO is full; rd loads the oldest word into the data_out register
// unless the FIFO is empty, so data_out is valid the cycle after rd. A read and
// a write may happen in the same cycle. fifo_full and fifo_empty come straight
// from the counter. rst (synchronous, active high) empties the FIFO; the
// memory itself is not cleared.
// The port list (DATA_IN, WR, RD, DATA_OUT, FIFO_EMPTY, FIFO_FULL) and the
// 16-bit width follow the architecture; the depth of 16 words and the
// registered output are this design's choices.
module mbist_fifo #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr,
  input  logic              rd,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              fifo_empty,
  output logic              fifo_full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wptr, rptr;
  logic [AW:0]       count;
  logic              do_wr, do_rd;

  assign fifo_full  = (count == (AW+1)'(DEPTH));
  assign fifo_empty = (count == '0);
  assign do_wr      = wr && !fifo_full;
  assign do_rd      = rd && !fifo_empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) begin
        data_out <= mem[rptr];
        rptr     <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
