// tb_comparator: self-checking test of the read-back comparator.
// Random compare strobes with equal and unequal words; error must show the
// result of the last compare one cycle later and hold it otherwise.
module tb_comparator;
  logic clk = 0, rst = 1, compare = 0, error;
  logic [15:0] actual_data = 0, expected_data = 0;
  logic m;
  int checks = 0, failures = 0;

  comparator #(.DATA_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      compare = 1'($urandom);
      expected_data = 16'($urandom);
      case ($urandom % 3)
        0: actual_data = expected_data;
        1: actual_data = expected_data ^ (16'd1 << ($urandom % 16));
        default: actual_data = 16'($urandom);
      endcase
      @(posedge clk);
      if (compare) m = (actual_data != expected_data);
      #1;
      checks++;
      if (error !== m) begin failures++; $display("FAIL error=%0b exp=%0b a=%h e=%h", error, m, actual_data, expected_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
