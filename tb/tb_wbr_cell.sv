// tb_wbr_cell: self-checking test of one wrapper boundary cell.
// Drives random shift/capture/update/si/pi for 400 cycles against a
// reference model of the two flip-flops and checks so and po every cycle,
// plus the asynchronous reset.
module tb_wbr_cell;
  logic clk = 0, rst_n = 0;
  logic shift = 0, capture = 0, update = 0, si = 0, pi = 0;
  logic so, po;
  int checks = 0, failures = 0;
  logic m_reg, m_po;

  wbr_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    m_reg = 0; m_po = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      shift = 1'($urandom); capture = 1'($urandom); update = 1'($urandom);
      si = 1'($urandom); pi = 1'($urandom);
      @(posedge clk);
      // reference: update sees the old Reg
      if (update) m_po = m_reg;
      if (shift) m_reg = si; else if (capture) m_reg = pi;
      #1;
      chk(so, m_reg, "so");
      chk(po, m_po, "po");
    end
    // asynchronous reset
    @(negedge clk); shift = 1; si = 1; update = 1;
    @(posedge clk); #1;
    @(negedge clk); rst_n = 0; #1;
    chk(so, 1'b0, "so after reset");
    chk(po, 1'b0, "po after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
