// mbist_top: IEEE 1500 style wrapper around the programmable FIFO MBIST core.
//
// Serial test access uses the wrapper pins WRCK, WRSTN, SELECT_WIR, SHIFT_WR,
// CAPTURE_WR, UPDATE_WR, TRANSFER_DR, WSI and WSO:
//  * select_wir = 1 addresses the 3-bit wrapper instruction register (WIR):
//    shift a code in (LSB first) and update it. 001 = EXTEST, 000 = BYPASS.
//  * Under EXTEST, select_wir = 0 addresses the 24-bit wrapper boundary
//    register (WBR): shift the instruction word in LSB first, update it onto
//    the WBR parallel outputs, then pulse transfer_dr to load it into the
//    core's instruction register. capture_wr loads the instruction register's
//    contents (with test_done / test_result) into the WBR for shifting out.
//  * Under BYPASS, WSI reaches WSO through the one-bit bypass register.
// The core is in test mode (tm) exactly while EXTEST is the active wrapper
// instruction; under BYPASS the FIFO serves the functional port (f_*), the
// router side. WSO shows the WIR while select_wir is 1, else the WBR under
// EXTEST and the bypass register under BYPASS.
// Everything runs on WRCK; the core's synchronous reset is ~WRSTN. The use of
// TRANSFER_DR as the load strobe and the tm derivation are this design's
// choices; the register set and the pin list follow the architecture.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                 wrck,
  input  logic                 wrstn,
  input  logic                 select_wir,
  input  logic                 shift_wr,
  input  logic                 capture_wr,
  input  logic                 update_wr,
  input  logic                 transfer_dr,
  input  logic                 wsi,
  output logic                 wso,
  input  logic                 hold,
  output logic                 test_done,
  output logic                 test_result,
  output logic                 bist_busy,
  // functional FIFO port (router side)
  input  logic                 f_wr,
  input  logic                 f_rd,
  input  logic [IR_DATA_W-1:0] f_data_in,
  output logic [IR_DATA_W-1:0] f_data_out,
  output logic                 f_empty,
  output logic                 f_full
);

  logic               wir_so, wbr_so, wbyr_so;
  logic [WIR_W-1:0]   wir_instr;
  logic               extest;
  logic               dr_sel;
  logic [INSTR_W-1:0] wbr_po;
  instr_t             ir_out;
  logic               core_rst;

  assign core_rst = !wrstn;
  assign dr_sel   = !select_wir;

  wir u_wir (
    .clk       (wrck),
    .rst_n     (wrstn),
    .select_wir(select_wir),
    .shift     (shift_wr),
    .update    (update_wr),
    .si        (wsi),
    .so        (wir_so),
    .instr     (wir_instr),
    .extest    (extest)
  );

  wbr #(.N(INSTR_W)) u_wbr (
    .clk    (wrck),
    .rst_n  (wrstn),
    .shift  (dr_sel && extest && shift_wr),
    .capture(dr_sel && extest && capture_wr),
    .update (dr_sel && extest && update_wr),
    .si     (wsi),
    .pi     (ir_out),
    .so     (wbr_so),
    .po     (wbr_po)
  );

  wbyr u_wbyr (
    .clk  (wrck),
    .rst_n(wrstn),
    .shift(dr_sel && !extest && shift_wr),
    .si   (wsi),
    .so   (wbyr_so)
  );

  mbist_dut #(.DEPTH(DEPTH)) u_dut (
    .clk             (wrck),
    .rst             (core_rst),
    .tm              (extest),
    .hold            (hold),
    .load_instruction(dr_sel && extest && transfer_dr),
    .instruction_in  (instr_t'(wbr_po)),
    .instruction_out (ir_out),
    .test_done       (test_done),
    .test_result     (test_result),
    .bist_busy       (bist_busy),
    .f_wr            (f_wr),
    .f_rd            (f_rd),
    .f_data_in       (f_data_in),
    .f_data_out      (f_data_out),
    .f_empty         (f_empty),
    .f_full          (f_full)
  );

  always_comb begin
    if (select_wir) wso = wir_so;
    else if (extest) wso = wbr_so;
    else wso = wbyr_so;
  end

  // Only the EXTEST decode is used; the raw WIR code stays visible in
  // simulation as wir_instr.
  logic unused_wir_bits;
  assign unused_wir_bits = ^wir_instr;

endmodule
