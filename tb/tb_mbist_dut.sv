// tb_mbist_dut: self-checking test of the MBIST core (instruction register,
// BIST controller, FIFO and comparator together).
// Checks: the FIFO works from the functional port in normal mode; a test
// loaded through load_instruction runs, takes the expected number of cycles
// (2*DEPTH+5 plus flush reads, plus 2*DEPTH+3 for a second operation) and
// leaves test_done = 1 / test_result = 1 with test_enable cleared; words left
// in the FIFO are flushed first; the functional port is locked out while the
// BIST runs; changing the data background between fill and read-back makes
// the run fail; hold lengthens the run by its length.
module tb_mbist_dut;
  import mbist_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst = 1, tm = 0, hold = 0, load_instruction = 0;
  instr_t instruction_in = '0, instruction_out;
  logic test_done, test_result, bist_busy;
  logic f_wr = 0, f_rd = 0;
  logic [15:0] f_data_in = '0, f_data_out;
  logic f_empty, f_full;
  int checks = 0, failures = 0;

  mbist_dut #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);  // operands zero-extended
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d (%h) exp=%0d (%h) at %0t", what, got, got, exp, exp, $time);
    end
  endtask

  // load an instruction and count cycles until test_done is set in the IR
  task automatic run_test(instr_t ins, int hold_len, output int cycles);
    int c = 0;
    @(negedge clk);
    instruction_in = ins; load_instruction = 1; tm = 1;
    @(negedge clk); load_instruction = 0;
    // test_started is this cycle (it clears test_done); count cycles until
    // the IR shows test_done again
    while (!(test_done && c > 0)) begin
      hold = (c >= 5) && (c < 5 + hold_len);
      if (bist_busy) begin
        chk(f_empty, 1, "functional side sees empty while busy");
        chk(f_full, 1, "functional side sees full while busy");
      end
      // functional requests inside the run must be ignored
      if (c > 0 && c < 2*D) begin
        f_wr = 1'($urandom); f_rd = 1'($urandom); f_data_in = 16'($urandom);
      end else begin
        f_wr = 0; f_rd = 0;
      end
      @(negedge clk);
      c++;
    end
    hold = 0; f_wr = 0; f_rd = 0;
    cycles = c;
  endtask

  initial begin
    int cycles;
    instr_t ins;
    logic [15:0] words[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // normal mode: functional write/read
    for (int i = 0; i < 5; i++) begin
      words.push_back(16'($urandom));
      f_wr = 1; f_data_in = words[i]; @(negedge clk);
    end
    f_wr = 0;
    chk(f_empty, 0, "not empty after functional writes");
    for (int i = 0; i < 3; i++) begin
      f_rd = 1; @(negedge clk); f_rd = 0;
      chk(f_data_out, words[i], "functional read data");
    end
    // 2 words stay in the FIFO: they must be flushed by the BIST

    // the document's example word 37ffff: one operation, Data = ffff
    run_test(instr_t'(24'h37ffff), 0, cycles);
    // test_done appears in the IR one cycle after the controller's pulse
    chk(cycles, 2*D + 5 + 2 + 1, "cycles 37ffff with 2 leftover words");
    chk(test_done, 1, "test_done");
    chk(test_result, 1, "test_result pass");
    chk(instruction_out.test_enable, 0, "test_enable cleared");
    chk(instruction_out.data, 16'hffff, "data kept");
    @(negedge clk);
    chk(bist_busy, 0, "idle after test");
    chk(f_empty, 1, "FIFO empty after test");

    // two operations, random data
    for (int k = 0; k < 4; k++) begin
      ins = '0; ins.num_ops = 1; ins.op0 = 1'(k); ins.op1 = 1'(k >> 1); ins.pri1 = 1;
      ins.data = 16'($urandom); ins.test_enable = 1;
      run_test(ins, 0, cycles);
      chk(cycles, 2*D + 5 + 2*D + 3 + 1, "cycles two operations");
      chk(test_result, 1, "two operations pass");
    end

    // hold lengthens the run
    ins = '0; ins.data = 16'h5a5a; ins.test_enable = 1;
    run_test(ins, 7, cycles);
    chk(cycles, 2*D + 5 + 7 + 1, "cycles with hold");
    chk(test_result, 1, "pass with hold");

    // reprogramming the data background in the middle of a run (after the
    // fill) makes the read-back mismatch: the run must report FAIL
    for (int k = 0; k < 2; k++) begin
      int c;
      c = 0;
      ins = '0; ins.data = 16'($urandom); ins.op0 = 1'(k); ins.test_enable = 1;
      @(negedge clk);
      instruction_in = ins; load_instruction = 1; tm = 1;
      @(negedge clk); load_instruction = 0;
      repeat (D + 2) begin @(negedge clk); c++; end
      ins.data = ins.data ^ 16'h0100; ins.test_enable = 0;
      instruction_in = ins; load_instruction = 1;
      @(negedge clk); load_instruction = 0; c++;
      while (!test_done) begin @(negedge clk); c++; end
      chk(c, 2*D + 6, "cycles of the reprogrammed run");
      chk(test_result, 0, "mismatch reported as FAIL");
    end

    // normal mode again: FIFO back with the functional port
    @(negedge clk); tm = 0;
    f_wr = 1; f_data_in = 16'hbeef; @(negedge clk); f_wr = 0;
    f_rd = 1; @(negedge clk); f_rd = 0;
    chk(f_data_out, 16'hbeef, "functional traffic after test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
