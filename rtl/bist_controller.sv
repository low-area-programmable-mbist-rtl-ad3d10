// bist_controller: runs the programmed FIFO test.
//
// A test starts when tm (test mode) and the instruction's test_enable are
// both 1; test_started pulses for that cycle and the instruction register
// clears test_enable. The controller then
//   FLUSH : reads the FIFO until it is empty, without comparing, so words
//           left by normal operation do not disturb the test;
//   WRITE : writes the pass's data background until fifo_full;
//   READ  : reads until fifo_empty; each read is followed one cycle later by
//           a compare strobe with the background as expected_data, and the
//           comparator's error is sampled the cycle after that;
//   DRAIN : one cycle for the last compare result to arrive;
// repeating WRITE/READ/DRAIN for each programmed operation, then
//   DONE  : test_done pulses for one cycle with test_result = 1 (pass) if no
//           compare of any pass reported an error.
// Programming (the architecture gives the fields, their meaning here is this
// design's choice): operation slot k is one fill/read-back pass whose
// background is data when op_k = 0 and ~data when op_k = 1. num_ops = 0 runs
// slot 0 only, num_ops = 1 runs both; the slot whose priority bit is 1 runs
// first, and on equal priorities slot 0 runs first.
// hold = 1 suspends the test: no FIFO access is issued and the state is kept
// (compares already in flight still complete). tm = 0 aborts a test in
// progress and returns to IDLE without test_done; busy tells the core that
// the controller owns the FIFO.
// Timing, for a FIFO of D words that is empty at the start and no hold:
// test_done comes 2D+5 cycles after test_started for one operation, plus
// 2D+3 cycles for the second.
// The instruction's test_done and test_result bits are written back by the
// instruction register and are not read here, so lint reports them unused.
module bist_controller
  import mbist_pkg::*;
#(
  parameter int unsigned DATA_W = IR_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tm,
  input  logic              hold,
  input  instr_t            instruction,
  input  logic              fifo_empty,
  input  logic              fifo_full,
  input  logic              error,
  output logic              write,
  output logic [DATA_W-1:0] write_data,
  output logic              read,
  output logic              compare,
  output logic [DATA_W-1:0] expected_data,
  output logic              busy,
  output logic              test_started,
  output logic              test_done,
  output logic              test_result
);

  typedef enum logic [2:0] {
    S_IDLE, S_FLUSH, S_WRITE, S_READ, S_DRAIN, S_DONE
  } state_e;

  state_e      state_q;
  logic        pass_q;     // 0: first operation, 1: second
  logic        fail_q;     // some compare of this run failed
  logic        compare_q;  // a compared read was issued last cycle
  logic        check_q;    // the comparator output is valid this cycle

  logic        first_slot;
  logic        slot;
  logic        last_pass;
  logic        slot_op;
  logic [DATA_W-1:0] pattern;

  // Order of the two operation slots.
  assign first_slot = instruction.num_ops && instruction.pri1 && !instruction.pri0;
  assign slot       = pass_q ? !first_slot : first_slot;
  assign last_pass  = !instruction.num_ops || pass_q;
  assign slot_op    = slot ? instruction.op1 : instruction.op0;
  assign pattern    = slot_op ? ~DATA_W'(instruction.data) : DATA_W'(instruction.data);

  assign busy          = (state_q != S_IDLE);
  assign write         = (state_q == S_WRITE) && !hold && !fifo_full;
  assign read          = ((state_q == S_FLUSH) || (state_q == S_READ)) && !hold && !fifo_empty;
  assign write_data    = pattern;
  assign expected_data = pattern;
  assign compare       = compare_q;
  assign test_started  = (state_q == S_IDLE) && tm && instruction.test_enable && !hold;
  assign test_done     = (state_q == S_DONE);
  assign test_result   = !fail_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= S_IDLE;
      pass_q    <= 1'b0;
      fail_q    <= 1'b0;
      compare_q <= 1'b0;
      check_q   <= 1'b0;
    end else begin
      compare_q <= read && (state_q == S_READ);
      check_q   <= compare_q;
      if (check_q && error) fail_q <= 1'b1;

      if (!tm) begin
        state_q <= S_IDLE;
      end else if (!hold) begin
        unique case (state_q)
          S_IDLE: if (test_started) begin
            state_q <= S_FLUSH;
            pass_q  <= 1'b0;
            fail_q  <= 1'b0;
          end
          S_FLUSH: if (fifo_empty) state_q <= S_WRITE;
          S_WRITE: if (fifo_full)  state_q <= S_READ;
          S_READ:  if (fifo_empty) state_q <= S_DRAIN;
          S_DRAIN: begin
            if (last_pass) state_q <= S_DONE;
            else begin
              pass_q  <= 1'b1;
              state_q <= S_WRITE;
            end
          end
          S_DONE:  state_q <= S_IDLE;
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

  // A read or a write is only issued when the FIFO can take it.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) write |-> !fifo_full);
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (rst) read |-> !fifo_empty);
  a_done_one_cycle:     assert property (@(posedge clk) disable iff (rst) test_done |=> !test_done);

endmodule
