// tb_mbist_stuck_faults: fault-coverage run of the wrapped MBIST at its
// default size. The instruction programs two operations, data and ~data, so
// every bit of every FIFO word is written and read back as both 0 and 1.
// For each of the 16 data bits and both stuck values, the FIFO output bit is
// forced to the stuck value, the instruction is shifted in through WSI and
// transferred, and the test must end with test_done = 1 and FAIL; without a
// fault it must PASS. All programming goes through the wrapper pins.
module tb_mbist_stuck_faults;
  import mbist_pkg::*;
  logic wrck = 0, wrstn = 0;
  logic select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0, transfer_dr = 0;
  logic wsi = 0, wso, hold = 0;
  logic test_done, test_result, bist_busy;
  logic f_wr = 0, f_rd = 0;
  logic [15:0] f_data_in = '0, f_data_out;
  logic f_empty, f_full;
  int checks = 0, failures = 0;
  int detected = 0;
  logic [15:0] mask = '0, stuck = '0;  // bits forced, and their values

  mbist_top dut (.*);

  always #5 wrck = ~wrck;

  initial begin
    repeat (200000) @(posedge wrck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(negedge wrck); endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic run_serial(logic [23:0] w);
    int c;
    for (int i = 0; i < 24; i++) begin shift_wr = 1; wsi = w[i]; tick(); end
    shift_wr = 0; update_wr = 1; tick();
    update_wr = 0; transfer_dr = 1; tick();
    transfer_dr = 0;
    c = 0;
    while (!(test_done && c > 1) && c < 1000) begin tick(); c++; end
  endtask

  initial begin
    instr_t ins;
    repeat (3) @(posedge wrck);
    tick(); wrstn = 1;
    // WIR <= EXTEST
    select_wir = 1;
    for (int i = 0; i < 3; i++) begin shift_wr = 1; wsi = (i == 0); tick(); end
    shift_wr = 0; update_wr = 1; tick(); update_wr = 0; select_wir = 0;

    ins = '0; ins.num_ops = 1; ins.op0 = 0; ins.op1 = 1; ins.test_enable = 1;
    ins.data = 16'($urandom);
    run_serial(24'(ins));
    chk({test_done, test_result}, 2'b11, "fault-free run passes");

    for (int b = 0; b < 16; b++) begin
      for (int v = 0; v < 2; v++) begin
        mask = 16'd1 << b; stuck = v ? mask : '0;
        force dut.u_dut.fifo_dout = (dut.u_dut.u_fifo.data_out & ~mask) | stuck;
        ins.data = 16'($urandom);
        run_serial(24'(ins));
        release dut.u_dut.fifo_dout;
        chk({test_done, test_result}, 2'b10, $sformatf("stuck-at-%0d on bit %0d detected", v, b));
        if (test_done && !test_result) detected++;
      end
    end
    $display("stuck-at faults detected: %0d of 32", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
