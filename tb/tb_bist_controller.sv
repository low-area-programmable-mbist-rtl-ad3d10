// tb_bist_controller: self-checking test of the BIST controller.
// The FIFO and the comparator are modelled here (a queue with a registered
// output that can corrupt one bit of every read word, and a registered
// compare). For every combination of op/pri/num_ops and random data the test
// checks: the words written in each pass (background and its order), that
// every written word is read back and compared, the cycle count from
// test_started to test_done (2D+5, plus 2D+3 for a second pass), the result
// (pass on a good FIFO, fail with an injected fault), the flush of leftover
// words, that hold stretches the run by exactly its length, and that tm = 0
// aborts a run.
module tb_bist_controller;
  import mbist_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst = 1, tm = 0, hold = 0;
  instr_t instruction = '0;
  logic fifo_empty, fifo_full, error;
  logic write, read, compare, busy, test_started, test_done, test_result;
  logic [15:0] write_data, expected_data;
  int checks = 0, failures = 0;

  bist_controller #(.DATA_W(16)) dut (.*);

  always #5 clk = ~clk;

  // ---- FIFO and comparator models ----
  logic [15:0] mem [D];
  int wp = 0, rp = 0, cnt = 0;
  logic [15:0] fdout;
  logic [15:0] fault_mask = '0;
  int writes_seen, reads_seen, compares_seen;  // counted by run(), sampled mid-cycle
  logic [15:0] written[$];
  assign fifo_empty = (cnt == 0);
  assign fifo_full  = (cnt == D);
  always @(posedge clk) begin
    automatic int n = cnt;
    if (rst) error <= 1'b0;
    else if (compare) error <= (fdout != expected_data);
    if (read && cnt > 0) begin
      fdout <= mem[rp] ^ fault_mask; rp = (rp + 1) % D; n--;
    end
    if (write && cnt < D) begin
      mem[wp] = write_data; wp = (wp + 1) % D; n++;
    end
    cnt <= n;
  end

  // preload words into the FIFO model (leftover functional data)
  task automatic preload(int n, logic [15:0] v);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin mem[wp] = v; wp = (wp + 1) % D; end
    cnt = cnt + n;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d (%h) exp=%0d (%h) at %0t", what, got, got, exp, exp, $time);
    end
  endtask

  // Runs one test; returns the cycles from test_started to test_done.
  task automatic run(instr_t ins, int hold_at, int hold_len, output int cycles, output logic res);
    int c;
    @(negedge clk);
    instruction = ins; tm = 1;
    writes_seen = 0; reads_seen = 0; compares_seen = 0; written.delete();
    #1;
    while (!test_started) begin
      @(negedge clk); #1;
    end
    // the instruction register clears test_enable at this edge
    @(posedge clk); #1;
    instruction.test_enable = 0;
    c = 0;
    forever begin
      @(negedge clk);
      c++;
      hold = (hold_len > 0) && (c >= hold_at) && (c < hold_at + hold_len);
      #1;
      if (write) begin writes_seen++; written.push_back(write_data); end
      if (read) reads_seen++;
      if (compare) compares_seen++;
      if (test_done) break;
    end
    hold = 0;
    res = test_result;
    cycles = c;
  endtask

  initial begin
    instr_t ins;
    int cycles, exp_cycles, npass;
    logic res;
    logic [15:0] bg [2];
    logic s0;
    fdout = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(busy, 0, "idle after reset");
    // tm = 0: no start even with test_enable
    instruction = '0; instruction.test_enable = 1;
    repeat (5) begin @(negedge clk); chk(busy, 0, "no start in normal mode"); end

    for (int k = 0; k < 32; k++) begin
      ins = '0;
      {ins.op1, ins.pri1, ins.op0, ins.pri0, ins.num_ops} = 5'(k);
      ins.data = 16'($urandom);
      ins.test_enable = 1;
      // expected order of backgrounds
      s0 = ins.num_ops && ins.pri1 && !ins.pri0;
      npass = ins.num_ops ? 2 : 1;
      bg[0] = (s0 ? ins.op1 : ins.op0) ? ~ins.data : ins.data;
      bg[1] = (s0 ? ins.op0 : ins.op1) ? ~ins.data : ins.data;
      for (int f = 0; f < 2; f++) begin
        fault_mask = f ? (16'd1 << ($urandom % 16)) : '0;
        run(ins, 0, 0, cycles, res);
        exp_cycles = (2*D + 5) + (npass - 1) * (2*D + 3);
        chk(cycles, exp_cycles, "cycles started->done");
        chk(res, f ? 0 : 1, "test_result");
        chk(writes_seen , npass * D, "words written");
        for (int i = 0; i < npass * D; i++)
          chk(written[i], bg[i / D], "background of written word");
        chk(reads_seen , npass * D, "words read");
        chk(compares_seen , npass * D, "compares");
        chk(cnt, 0, "FIFO left empty");
        @(negedge clk); chk(busy, 0, "idle after done");
      end
    end

    // leftover words are flushed, not compared
    fault_mask = '0;
    preload(5, 16'hdead);
    ins = '0; ins.data = 16'h1234; ins.test_enable = 1;
    run(ins, 0, 0, cycles, res);
    chk(res, 1, "pass after flush");
    chk(reads_seen , D + 5, "flush reads");
    chk(compares_seen , D, "flush reads not compared");
    chk(cycles, 2*D + 5 + 5, "cycles with flush");

    // hold stretches the run by its length
    for (int h = 0; h < 6; h++) begin
      int at, len;
      at = 1 + $urandom % (2*D);
      len = 1 + $urandom % 7;
      run(ins, at, len, cycles, res);
      chk(cycles, 2*D + 5 + len, "cycles with hold");
      chk(res, 1, "pass with hold");
    end

    // tm = 0 aborts a run
    ins.test_enable = 1;
    @(negedge clk); instruction = ins; tm = 1;
    repeat (6) @(negedge clk);
    chk(busy, 1, "busy during run");
    tm = 0;
    @(negedge clk);
    chk(busy, 0, "aborted by tm = 0");
    repeat (3) begin @(negedge clk); chk(test_done, 0, "no done after abort"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
