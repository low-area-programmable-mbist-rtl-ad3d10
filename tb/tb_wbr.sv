// tb_wbr: self-checking test of the 24-bit wrapper boundary register.
// Shifts random words in LSB first, checks that po only changes on update and
// then equals the word, captures a random parallel word and checks it comes
// out on so LSB first, and checks the N-cycle serial latency.
module tb_wbr;
  localparam int N = 24;
  logic clk = 0, rst_n = 0;
  logic shift = 0, capture = 0, update = 0, si = 0;
  logic [N-1:0] pi = '0, po;
  logic so;
  int checks = 0, failures = 0;

  wbr #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] w, prev_po, out;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(po, '0, "po after reset");
    for (int t = 0; t < 20; t++) begin
      w = N'($urandom);
      if (t == 0) w = 24'h37ffff;
      prev_po = po;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); shift = 1; si = w[i];
      end
      @(negedge clk); shift = 0;
      chk(po, prev_po, "po stable while shifting");
      update = 1;
      @(negedge clk); update = 0;
      chk(po, w, "po after update");
      // capture and shift out
      pi = N'($urandom);
      capture = 1;
      @(negedge clk); capture = 0;
      out = '0;
      for (int i = 0; i < N; i++) begin
        out[i] = so;
        shift = 1; si = 0;
        @(negedge clk);
      end
      shift = 0;
      chk(out, pi, "captured word shifted out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
