// tb_pwm_sdm: holds several input codes and checks that the density of ones
// in the output equals code / 256 over 256 clocks (exact for a first-order
// accumulator), and that a disabled modulator gives half density.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_pwm_sdm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1'b1, pwm_out;
  logic [7:0] in_data = '0;
  pwm_sdm #(.W(8)) dut (.*);

  task automatic measure(input int code, input bit enable, input int expect_ones);
    int ones = 0;
    @(negedge clk); in_data = 8'(code); en = enable;
    repeat (300) @(posedge clk);         // settle
    for (int i = 0; i < 256; i++) begin @(posedge clk); #1 ones += pwm_out; end
    checks++;
    if (ones != expect_ones) begin failures++; $display("code %0d en %0d: %0d ones, exp %0d", code, enable, ones, expect_ones); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    measure(0, 1, 0);
    measure(1, 1, 1);
    measure(37, 1, 37);
    measure(128, 1, 128);
    measure(200, 1, 200);
    measure(255, 1, 255);
    measure(17, 0, 128);
    for (int k = 0; k < 10; k++) begin
      int c = $urandom_range(0, 255);
      measure(c, 1, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
