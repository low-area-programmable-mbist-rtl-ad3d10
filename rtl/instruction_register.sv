// instruction_register: the 24-bit programmable MBIST instruction register.
//
// Holds an instr_t (see mbist_pkg): two operation slots with a priority bit
// each, the number of operations, a 16-bit data background, and the
// test_enable / test_done / test_result bits. load_instruction copies
// instruction_in (from the wrapper boundary register) in one clock. The BIST
// controller then updates the status bits: test_started clears test_enable,
// test_done and test_result, so a finished test is not started again;
// test_done_in sets test_done and stores test_result_in (1 = pass).
// A load in the same cycle wins over the BIST updates. rst (synchronous,
// active high) clears the register.
// The layout and the fact that the BIST writes the status bits follow the
// architecture; the clearing on test_started is this design's choice.
module instruction_register
  import mbist_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load_instruction,
  input  instr_t instruction_in,
  input  logic   test_started,
  input  logic   test_done_in,
  input  logic   test_result_in,
  output instr_t instruction_out,
  output logic   test_done,
  output logic   test_result
);

  instr_t ir_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_q <= '0;
    end else if (load_instruction) begin
      ir_q <= instruction_in;
    end else begin
      if (test_started) begin
        ir_q.test_enable <= 1'b0;
        ir_q.test_done   <= 1'b0;
        ir_q.test_result <= 1'b0;
      end
      if (test_done_in) begin
        ir_q.test_done   <= 1'b1;
        ir_q.test_result <= test_result_in;
      end
    end
  end

  assign instruction_out = ir_q;
  assign test_done       = ir_q.test_done;
  assign test_result     = ir_q.test_result;

endmodule
