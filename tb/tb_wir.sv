// tb_wir: self-checking test of the wrapper instruction register.
// Checks the BYPASS reset value, loading EXTEST (001) and BYPASS (000),
// that shifting without select_wir or without update changes nothing, that
// other codes act as BYPASS, and the serial output of the shift stage.
module tb_wir;
  import mbist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic select_wir = 0, shift = 0, update = 0, si = 0;
  logic so, extest;
  logic [WIR_W-1:0] instr;
  int checks = 0, failures = 0;

  wir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic shift_code(logic [2:0] c, logic sel, logic upd);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); select_wir = sel; shift = 1; si = c[i];
    end
    @(negedge clk); shift = 0;
    if (upd) begin update = 1; @(negedge clk); update = 0; end
    select_wir = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk({1'b0, instr}, 4'(WIR_BYPASS), "reset instr");
    chk({3'b0, extest}, 4'd0, "reset extest");
    shift_code(3'b001, 1, 1);
    chk({1'b0, instr}, 4'(WIR_EXTEST), "EXTEST loaded");
    chk({3'b0, extest}, 4'd1, "extest flag");
    shift_code(3'b000, 0, 1);
    chk({3'b0, extest}, 4'd1, "no shift without select_wir");
    shift_code(3'b000, 1, 0);
    chk({3'b0, extest}, 4'd1, "no change without update");
    chk({3'b0, so}, 4'd0, "so shows shift stage bit 0");
    @(negedge clk); select_wir = 1; update = 1;
    @(negedge clk); update = 0; select_wir = 0;
    chk({3'b0, extest}, 4'd0, "BYPASS loaded");
    for (int c = 0; c < 8; c++) begin
      shift_code(3'(c), 1, 1);
      chk({1'b0, instr}, 4'(c), "code stored");
      chk({3'b0, extest}, 4'(c == 1), "only 001 is EXTEST");
    end
    // serial out: shift 101 then three more bits, read them back
    shift_code(3'b101, 1, 0);
    for (int i = 0; i < 3; i++) begin
      chk({3'b0, so}, 4'(((3'b101) >> i) & 1), "so bit");
      @(negedge clk); select_wir = 1; shift = 1; si = 0;
      @(negedge clk); shift = 0; select_wir = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
