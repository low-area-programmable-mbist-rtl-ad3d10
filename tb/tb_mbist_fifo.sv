// tb_mbist_fifo: self-checking test of the synchronous FIFO.
// A queue is the reference. Phases: fill to full (checking the full flag and
// that a write when full is dropped), drain to empty (checking order, the
// one-cycle read latency and that a read when empty is ignored), then 2000
// cycles of random simultaneous reads and writes.
module tb_mbist_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [W-1:0] data_in = 0, data_out;
  logic fifo_empty, fifo_full;
  logic [W-1:0] q[$];
  logic [W-1:0] exp_out;
  logic exp_valid;
  int checks = 0, failures = 0;

  mbist_fifo #(.DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // one clock with the given requests, reference updated alongside
  task automatic step(logic w, logic r, logic [W-1:0] d);
    logic do_w, do_r;
    @(negedge clk);
    wr = w; rd = r; data_in = d;
    chk(W'(fifo_full), W'(q.size() == D), "full flag");
    chk(W'(fifo_empty), W'(q.size() == 0), "empty flag");
    do_w = w && q.size() < D;
    do_r = r && q.size() > 0;
    exp_valid = do_r;
    if (do_r) exp_out = q.pop_front();
    if (do_w) q.push_back(d);
    @(posedge clk); #1;
    if (exp_valid) chk(data_out, exp_out, "data_out");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < D + 2; i++) step(1, 0, W'($urandom));
    for (int i = 0; i < D + 2; i++) step(0, 1, '0);
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom), W'($urandom));
    @(negedge clk); wr = 0; rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
