// tb_adc_interface: checks encode-clock shape and sample capture.
// A converter model presents a new word two system clocks after every
// rising ENC edge (longer than the 10.5 ns output delay at 100 MHz). The
// testbench checks that every word is captured once, in order, that samples
// come exactly ENC_DIV clocks apart and that ENC is high ENC_DIV/2 clocks.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_adc_interface;
  localparam int unsigned DIV = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0]        adc_data;
  logic               adc_enc, sample_valid;
  logic signed [11:0] sample;
  adc_interface #(.ADC_W(12), .ENC_DIV(DIV)) dut (.*);

  // converter model
  int   conv_n = 0;
  logic enc_d = 1'b0;
  logic [11:0] pipe1 = '0;
  function automatic logic [11:0] word(input int n); return 12'((n * 1237 + 5) ^ (n << 3)); endfunction
  always @(posedge clk) begin
    enc_d <= adc_enc;
    if (adc_enc && !enc_d) begin pipe1 <= word(conv_n); conv_n <= conv_n + 1; end
    adc_data <= pipe1;
  end

  int got = 0, last_t = -1, t = 0, hi_run = 0;
  always @(posedge clk) begin
    t++;
    if (rst_n) begin
      if (adc_enc) hi_run++;
      else if (hi_run != 0) begin
        checks++; if (hi_run != DIV/2) begin failures++; $display("ENC high %0d", hi_run); end
        hi_run = 0;
      end
    end
    if (sample_valid && rst_n) begin
      checks++;
      if (sample !== $signed(word(got))) begin failures++; $display("sample %0d got %h exp %h", got, sample, word(got)); end
      if (last_t >= 0) begin
        checks++; if (t - last_t != DIV) begin failures++; $display("interval %0d", t - last_t); end
      end
      last_t = t; got++;
    end
  end

  initial begin
    adc_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (DIV * 200) @(posedge clk);
    checks++; if (got < 190) begin failures++; $display("only %0d samples", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
