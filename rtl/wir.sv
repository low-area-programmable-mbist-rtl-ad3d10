// wir: wrapper instruction register.
//
// A 3-bit shift stage and a 3-bit update stage. While select_wir is 1 the
// WIR is the register addressed from WSI/WSO: shift moves WSI into bit 2 and
// bit 0 out on so (codes are shifted least significant bit first); update
// copies the shift stage into the active instruction. The architecture
// defines two codes, 000 = BYPASS and 001 = EXTEST; extest is 1 only for 001,
// every other code behaves as BYPASS. WRSTN (rst_n, asynchronous) selects
// BYPASS. The shift/update split follows IEEE 1500 practice.
module wir
  import mbist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             select_wir,
  input  logic             shift,
  input  logic             update,
  input  logic             si,
  output logic             so,
  output logic [WIR_W-1:0] instr,
  output logic             extest
);

  logic [WIR_W-1:0] shift_q;
  logic [WIR_W-1:0] instr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   shift_q <= '0;
    else if (select_wir && shift) shift_q <= {si, shift_q[WIR_W-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    instr_q <= WIR_BYPASS;
    else if (select_wir && update) instr_q <= shift_q;
  end

  assign so     = shift_q[0];
  assign instr  = instr_q;
  assign extest = (instr_q == WIR_EXTEST);

endmodule
