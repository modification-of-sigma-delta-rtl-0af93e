// Testbench for thermometer_decoder: all eight codes, in order and in random
// order, checking the number of lines on equals the code and that the lines
// on are the lowest ones (a contiguous run from line A); also checks that
// the register holds its value while en is low.
module tb_thermometer_decoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [2:0] code = '0;
  logic [6:0] therm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  thermometer_decoder dut (.clk(clk), .rst_n(rst_n), .en(en), .code(code), .therm(therm));

  task automatic apply_and_check(input int c);
    int ones;
    bit contiguous;
    @(negedge clk);
    code = 3'(c);
    en   = 1'b1;
    @(negedge clk);
    en = 1'b0;
    ones = 0;
    contiguous = 1'b1;
    for (int i = 0; i < 7; i++) begin
      if (therm[i]) ones++;
      if (i > 0 && therm[i] && !therm[i-1]) contiguous = 1'b0;
    end
    checks++;
    if (ones != c || !contiguous) begin
      failures++;
      $display("FAIL code %0d -> therm %b", c, therm);
    end
  endtask

  initial begin
    logic [6:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (therm != 0) failures++;
    for (int c = 0; c < 8; c++) apply_and_check(c);
    for (int n = 0; n < 50; n++) apply_and_check(int'($urandom_range(0, 7)));
    held = therm;
    @(negedge clk) code = ~code;
    repeat (3) @(negedge clk);
    checks++;
    if (therm != held) begin
      failures++;
      $display("FAIL therm changed while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
