// mbist_pkg: types and constants shared by the programmable FIFO MBIST.
//
// The 24-bit instruction word is the central data structure of the design:
// the wrapper boundary register carries it in serially, the instruction
// register holds it, the BIST controller executes it and writes the status
// bits back. Its field layout follows the instruction register table of the
// architecture (bit 23 first):
//   [23] op1  [22] pri1  [21] op0  [20] pri0  [19] num_ops
//   [18:3] data (16-bit data background)
//   [2] test_enable  [1] test_done  [0] test_result
// The meaning given to the op/pri/num_ops bits is this design's choice and is
// described in bist_controller.sv. The wrapper instruction codes 000 (BYPASS)
// and 001 (EXTEST) follow the architecture; other codes act as BYPASS.
package mbist_pkg;

  localparam int unsigned INSTR_W   = 24;  // instruction register width
  localparam int unsigned IR_DATA_W = 16;  // data background field width
  localparam int unsigned WIR_W     = 3;   // wrapper instruction register width

  typedef struct packed {
    logic                 op1;          // operation of slot 1: 0 = data, 1 = ~data
    logic                 pri1;         // priority of slot 1
    logic                 op0;          // operation of slot 0
    logic                 pri0;         // priority of slot 0
    logic                 num_ops;      // 0: one operation (slot 0), 1: two
    logic [IR_DATA_W-1:0] data;         // data background
    logic                 test_enable;  // request a test run
    logic                 test_done;    // set by the BIST when a run ends
    logic                 test_result;  // 1 = pass, valid with test_done
  } instr_t;

  typedef enum logic [WIR_W-1:0] {
    WIR_BYPASS = 3'b000,
    WIR_EXTEST = 3'b001
  } wir_instr_e;

endpackage
