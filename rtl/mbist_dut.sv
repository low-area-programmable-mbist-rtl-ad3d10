// mbist_dut: the programmable MBIST core around one FIFO.
//
// Instruction register, BIST controller, FIFO and comparator wired as in the
// architecture: the instruction register feeds the controller, the controller
// writes and reads the FIFO, the comparator checks the FIFO output against
// the controller's expected data, and the controller returns test_started,
// test_done and test_result to the instruction register.
// The FIFO is also the functional buffer of a NoC router (f_* ports). While
// the controller is busy it owns the FIFO: functional requests are ignored
// and the functional side sees the FIFO as both full and empty, so it neither
// writes nor reads. In normal mode (tm = 0) the functional side has the FIFO.
// The functional port, tm and hold are additions of this design to the
// architecture's DUT pin list (INSTRUCTION_IN, CLK, LOAD_INSTRUCTION, RST,
// TEST_DONE, TEST_RESULT). rst is synchronous and active high.
module mbist_dut
  import mbist_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tm,
  input  logic                 hold,
  input  logic                 load_instruction,
  input  instr_t               instruction_in,
  output instr_t               instruction_out,
  output logic                 test_done,
  output logic                 test_result,
  output logic                 bist_busy,
  // functional FIFO port
  input  logic                 f_wr,
  input  logic                 f_rd,
  input  logic [IR_DATA_W-1:0] f_data_in,
  output logic [IR_DATA_W-1:0] f_data_out,
  output logic                 f_empty,
  output logic                 f_full
);

  instr_t                 instr;
  logic                   started, done_pulse, result_pulse;
  logic                   b_write, b_read, b_compare;
  logic [IR_DATA_W-1:0]   b_wdata, b_expected;
  logic                   fifo_wr, fifo_rd, fifo_empty, fifo_full;
  logic [IR_DATA_W-1:0]   fifo_din, fifo_dout;
  logic                   cmp_error;

  instruction_register u_ir (
    .clk             (clk),
    .rst             (rst),
    .load_instruction(load_instruction),
    .instruction_in  (instruction_in),
    .test_started    (started),
    .test_done_in    (done_pulse),
    .test_result_in  (result_pulse),
    .instruction_out (instr),
    .test_done       (test_done),
    .test_result     (test_result)
  );

  bist_controller #(.DATA_W(IR_DATA_W)) u_bist (
    .clk          (clk),
    .rst          (rst),
    .tm           (tm),
    .hold         (hold),
    .instruction  (instr),
    .fifo_empty   (fifo_empty),
    .fifo_full    (fifo_full),
    .error        (cmp_error),
    .write        (b_write),
    .write_data   (b_wdata),
    .read         (b_read),
    .compare      (b_compare),
    .expected_data(b_expected),
    .busy         (bist_busy),
    .test_started (started),
    .test_done    (done_pulse),
    .test_result  (result_pulse)
  );

  // FIFO ownership: the BIST while busy, the functional port otherwise.
  always_comb begin
    if (bist_busy) begin
      fifo_wr  = b_write;
      fifo_rd  = b_read;
      fifo_din = b_wdata;
    end else begin
      fifo_wr  = f_wr;
      fifo_rd  = f_rd;
      fifo_din = f_data_in;
    end
  end

  mbist_fifo #(.DATA_W(IR_DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk       (clk),
    .rst       (rst),
    .wr        (fifo_wr),
    .rd        (fifo_rd),
    .data_in   (fifo_din),
    .data_out  (fifo_dout),
    .fifo_empty(fifo_empty),
    .fifo_full (fifo_full)
  );

  comparator #(.DATA_W(IR_DATA_W)) u_cmp (
    .clk          (clk),
    .rst          (rst),
    .compare      (b_compare),
    .actual_data  (fifo_dout),
    .expected_data(b_expected),
    .error        (cmp_error)
  );

  assign instruction_out = instr;
  assign f_data_out      = fifo_dout;
  assign f_empty         = bist_busy || fifo_empty;
  assign f_full          = bist_busy || fifo_full;

endmodule
