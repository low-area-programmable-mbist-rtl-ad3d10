// tb_mbist_top: end-to-end test of the wrapped MBIST through its serial
// wrapper pins only (plus the functional FIFO port and hold), with the top's
// default parameters.
// Sequence: reset; functional traffic under BYPASS (normal mode) and the
// one-bit bypass path; EXTEST into the WIR; the example instruction 37ffff
// shifted into the WBR, updated and transferred; the run's duration; the
// captured instruction register shifted out with test_done / test_result;
// a two-operation program; a run with hold; a run with a stuck FIFO output
// bit that must report FAIL; a run aborted by switching back to BYPASS;
// functional traffic again. Each mechanism is counted and one that never
// happened counts as a failure.
module tb_mbist_top;
  import mbist_pkg::*;
  localparam int D = 16;  // the top's default FIFO depth
  logic wrck = 0, wrstn = 0;
  logic select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0, transfer_dr = 0;
  logic wsi = 0, wso, hold = 0;
  logic test_done, test_result, bist_busy;
  logic f_wr = 0, f_rd = 0;
  logic [15:0] f_data_in = '0, f_data_out;
  logic f_empty, f_full;
  int checks = 0, failures = 0;

  typedef enum int {
    M_FUNCTIONAL, M_BYPASS_PATH, M_WIR_EXTEST, M_WIR_BYPASS, M_WBR_SHIFT, M_TRANSFER,
    M_CAPTURE, M_FLUSH, M_PASS, M_FAIL, M_TWO_OPS, M_HOLD, M_ABORT, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"functional traffic", "bypass path", "WIR EXTEST", "WIR BYPASS",
    "WBR shift-in", "transfer to IR", "capture/shift-out", "flush", "test pass", "test fail",
    "two operations", "hold", "abort by mode switch"};

  mbist_top dut (.*);

  always #5 wrck = ~wrck;

  initial begin
    repeat (100000) @(posedge wrck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic tick(); @(negedge wrck); endtask

  task automatic wir_load(logic [2:0] code);
    select_wir = 1;
    for (int i = 0; i < 3; i++) begin shift_wr = 1; wsi = code[i]; tick(); end
    shift_wr = 0; update_wr = 1; tick();
    update_wr = 0; select_wir = 0;
    mech[code == 3'b001 ? M_WIR_EXTEST : M_WIR_BYPASS]++;
  endtask

  task automatic wbr_load(logic [23:0] w);
    for (int i = 0; i < 24; i++) begin shift_wr = 1; wsi = w[i]; tick(); end
    shift_wr = 0; update_wr = 1; tick();
    update_wr = 0; transfer_dr = 1; tick();
    transfer_dr = 0;
    mech[M_WBR_SHIFT]++; mech[M_TRANSFER]++;
  endtask

  task automatic wbr_read(output logic [23:0] w);
    capture_wr = 1; tick(); capture_wr = 0;
    for (int i = 0; i < 24; i++) begin w[i] = wso; shift_wr = 1; wsi = 0; tick(); end
    shift_wr = 0;
    mech[M_CAPTURE]++;
  endtask

  // wait for the end of a run; returns cycles since the transfer
  task automatic wait_done(int hold_at, int hold_len, output int c);
    c = 0;
    while (!(test_done && c > 1)) begin
      hold = (c >= hold_at) && (c < hold_at + hold_len);
      tick(); c++;
      if (c > 20 * D + 200) break;
    end
    hold = 0;
  endtask

  initial begin
    logic [23:0] rb;
    logic [15:0] words[$];
    int c;
    logic b, prev;
    instr_t ins;
    repeat (3) @(posedge wrck);
    tick(); wrstn = 1;
    chk(bist_busy, 0, "idle after reset");

    // normal mode (BYPASS after reset): functional FIFO traffic
    for (int i = 0; i < 4; i++) begin
      words.push_back(16'($urandom)); f_wr = 1; f_data_in = words[i]; tick();
    end
    f_wr = 0;
    f_rd = 1; tick(); f_rd = 0;
    chk(f_data_out, words[0], "functional read");
    mech[M_FUNCTIONAL]++;
    // 3 words stay in the FIFO

    // bypass path: WSO is WSI delayed by one shift
    prev = 0;
    for (int i = 0; i < 10; i++) begin
      b = 1'($urandom); shift_wr = 1; wsi = b; tick();
      chk(wso, b, "bypass register");
    end
    shift_wr = 0;
    mech[M_BYPASS_PATH]++;

    // EXTEST and the example instruction
    wir_load(3'b001);
    wbr_load(24'h37ffff);
    wait_done(0, 0, c);
    // from the start cycle: flush of 3 words, 2D+5, then one cycle for the IR
    chk(c, 2*D + 5 + 3 + 1, "cycles for 37ffff with 3 leftover words");
    mech[M_FLUSH]++;
    chk(test_done, 1, "done after 37ffff");
    chk(test_result, 1, "pass after 37ffff");
    if (test_result) mech[M_PASS]++;
    wbr_read(rb);
    chk(rb, 24'h37fffb, "IR read back: enable cleared, done=1, result=1");

    // two operations, slot 1 first
    ins = '0; ins.num_ops = 1; ins.pri1 = 1; ins.op1 = 1; ins.data = 16'ha5c3; ins.test_enable = 1;
    wbr_load(24'(ins));
    wait_done(0, 0, c);
    chk(c, 2*D + 5 + 2*D + 3 + 1, "cycles two operations");
    chk(test_result, 1, "two operations pass");
    mech[M_TWO_OPS]++;

    // hold for 9 cycles
    ins = '0; ins.data = 16'h0f0f; ins.test_enable = 1;
    wbr_load(24'(ins));
    wait_done(6, 9, c);
    chk(c, 2*D + 5 + 9 + 1, "cycles with hold");
    chk(test_result, 1, "pass with hold");
    mech[M_HOLD]++;

    // a mismatch: the data background is reprogrammed while the run is
    // reading back (the second transfer lands 26 cycles after the start)
    ins = '0; ins.data = 16'hffff; ins.test_enable = 1;
    wbr_load(24'(ins));
    ins.data = 16'hfffe; ins.test_enable = 0;
    wbr_load(24'(ins));
    wait_done(0, 0, c);
    chk(test_done, 1, "done after mismatch");
    chk(test_result, 0, "mismatch reported");
    if (!test_result) mech[M_FAIL]++;
    wbr_read(rb);
    chk(rb[1:0], 2'b10, "read back: done=1, result=FAIL");

    // a run aborted by switching to BYPASS
    ins = '0; ins.data = 16'h1234; ins.test_enable = 1;
    wbr_load(24'(ins));
    repeat (5) tick();
    chk(bist_busy, 1, "busy during run");
    wir_load(3'b000);
    tick();
    chk(bist_busy, 0, "abort on BYPASS");
    if (!bist_busy) mech[M_ABORT]++;

    // normal mode again: clear leftovers and pass traffic
    while (!f_empty) begin f_rd = 1; tick(); end
    f_rd = 0;
    f_wr = 1; f_data_in = 16'hc0de; tick(); f_wr = 0;
    f_rd = 1; tick(); f_rd = 0;
    chk(f_data_out, 16'hc0de, "functional traffic after test");
    mech[M_FUNCTIONAL]++;

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-22s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
