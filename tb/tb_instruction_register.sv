// tb_instruction_register: self-checking test of the 24-bit instruction register.
// Checks the field layout of the loaded word (using 37ffff as one example),
// clearing of the status bits on test_started, setting of test_done and
// test_result on test_done_in, priority of a load, and reset.
module tb_instruction_register;
  import mbist_pkg::*;
  logic clk = 0, rst = 1, load_instruction = 0;
  instr_t instruction_in = '0, instruction_out;
  logic test_started = 0, test_done_in = 0, test_result_in = 0;
  logic test_done, test_result;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [23:0] got, logic [23:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic tick(); @(negedge clk); endtask

  initial begin
    logic [23:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(instruction_out, 24'h0, "reset value");
    // load 37ffff and check each field against the bit positions
    instruction_in = instr_t'(24'h37ffff); load_instruction = 1;
    tick(); load_instruction = 0;
    chk(instruction_out, 24'h37ffff, "loaded word");
    chk(24'(instruction_out.op1),  24'(1'b0), "op1 = bit23");
    chk(24'(instruction_out.pri1), 24'(1'b0), "pri1 = bit22");
    chk(24'(instruction_out.op0),  24'(1'b1), "op0 = bit21");
    chk(24'(instruction_out.pri0), 24'(1'b1), "pri0 = bit20");
    chk(24'(instruction_out.num_ops), 24'(1'b0), "num_ops = bit19");
    chk(24'(instruction_out.data), 24'hffff, "data = bits 18:3");
    chk(24'(instruction_out.test_enable), 24'(1'b1), "enable = bit2");
    chk({22'b0, test_done, test_result}, 24'd3, "done/result outputs");
    // random words: each field lands where the table says
    for (int i = 0; i < 50; i++) begin
      w = 24'($urandom);
      instruction_in = instr_t'(w); load_instruction = 1;
      tick(); load_instruction = 0;
      chk(24'(instruction_out.data), 24'(w[18:3]), "random data field");
      chk(24'({instruction_out.op1, instruction_out.pri1, instruction_out.op0,
               instruction_out.pri0, instruction_out.num_ops}), 24'(w[23:19]), "random op fields");
      // test_started clears bits 2..0, keeps the rest
      test_started = 1; tick(); test_started = 0;
      chk(instruction_out, {w[23:3], 3'b000}, "after test_started");
      tick();
      chk(instruction_out, {w[23:3], 3'b000}, "stable");
      // done with a random result
      test_done_in = 1; test_result_in = w[0]; tick(); test_done_in = 0;
      chk(instruction_out, {w[23:3], 1'b0, 1'b1, w[0]}, "after test_done_in");
      chk({22'b0, test_done, test_result}, {22'b0, 1'b1, w[0]}, "status outputs");
    end
    // load wins over a simultaneous test_done_in
    instruction_in = instr_t'(24'h000004); load_instruction = 1; test_done_in = 1; test_result_in = 1;
    tick(); load_instruction = 0; test_done_in = 0;
    chk(instruction_out, 24'h000004, "load priority");
    @(negedge clk) rst = 1; tick(); rst = 0;
    chk(instruction_out, 24'h0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
