// tb_wbyr: self-checking test of the one-bit bypass register.
// Random si and shift for 300 cycles; so must equal the last si that was
// shifted in. Also checks the asynchronous reset.
module tb_wbyr;
  logic clk = 0, rst_n = 0, shift = 0, si = 0, so;
  logic m;
  int checks = 0, failures = 0;

  wbyr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      shift = 1'($urandom); si = 1'($urandom);
      @(posedge clk);
      if (shift) m = si;
      #1;
      checks++;
      if (so !== m) begin failures++; $display("FAIL so=%0b exp=%0b", so, m); end
    end
    @(negedge clk); shift = 1; si = 1;
    @(negedge clk); rst_n = 0; #1;
    checks++;
    if (so !== 1'b0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
