// tb_channel_filter_bank: loads a different windowed-sinc band-pass (200 kHz
// wide at fs = 10 MSPS) into each of four channels through the coefficient
// port, then drives a tone. The channel whose pass band holds the tone must
// pass it (amplitude close to the expected gain) and the others must block
// it; a second run moves the tone to another channel. Every output sample
// of every channel is also compared with a direct convolution using the
// loaded coefficients.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_channel_filter_bank;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  localparam int CH = 4, NT = 201;
  localparam real FS = 10.0e6;

  logic coef_we = 0, iv = 0, ov;
  logic [1:0] coef_ch = '0;
  logic [7:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic signed [11:0] x = '0;
  logic signed [15:0] y [CH];
  channel_filter_bank #(.CHANNELS(CH), .NTAPS(NT), .DW(12), .CW(16), .OW(16), .SHIFT(13)) dut (
    .clk, .rst_n, .coef_we, .coef_ch, .coef_addr, .coef_data, .in_valid(iv), .in_data(x),
    .out_valid(ov), .out_data(y));

  int h [CH][NT];
  real fc [CH] = '{1.0e6, 2.5e6, 4.0e6, 3.2e6};
  int hist [$];
  int peak [CH];
  int tone_ch;
  longint acc, e;
  real m, lp, w;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // design and load: h[n] = w[n] * 2*B/fs*sinc(B*(n-M)/fs*2/2) * 2cos(2 pi fc (n-M)/fs)
    for (int c = 0; c < CH; c++)
      for (int n = 0; n < NT; n++) begin
        m  = real'(n - (NT - 1) / 2);
        w  = 0.54 - 0.46 * $cos(2.0 * PI * n / (NT - 1));
        lp = (m == 0.0) ? (200.0e3 / FS) : $sin(PI * 200.0e3 / FS * m) / (PI * m);
        h[c][n] = $rtoi($floor(32768.0 * 2.0 * lp * w * $cos(2.0 * PI * fc[c] * m / FS) + 0.5));
        @(negedge clk);
        coef_we = 1; coef_ch = 2'(c); coef_addr = 8'(n); coef_data = 16'(h[c][n]);
      end
    @(negedge clk) coef_we = 0;
    for (int run = 0; run < 2; run++) begin
      tone_ch = (run != 0) ? 3 : 1;
      for (int c = 0; c < CH; c++) peak[c] = 0;
      // the history is kept: the filters still hold the previous run's samples
      for (int i = 0; i < 1200; i++) begin
        @(negedge clk);
        iv = 1; x = 12'($rtoi(1500.0 * $sin(2.0 * PI * fc[tone_ch] * i / FS)));
        hist.push_back(int'(x));
        @(negedge clk);
        iv = 0;
        for (int c = 0; c < CH; c++) begin
          acc = 0;
          for (int k = 0; k < NT; k++) if (k < hist.size()) acc += longint'(h[c][k]) * hist[hist.size() - 1 - k];
          e = (acc + 4096) >>> 13;
          if (e > 32767) e = 32767; if (e < -32768) e = -32768;
          checks++;
          if (!ov || longint'(y[c]) != e) begin failures++; if (failures < 8) $display("ch %0d got %0d exp %0d", c, y[c], e); end
          if (i > 400 && (y[c] < 0 ? -y[c] : y[c]) > peak[c]) peak[c] = (y[c] < 0 ? -y[c] : y[c]);
        end
        repeat (2) @(negedge clk);
      end
      // pass-band gain: 1500 * 4 (shift 13 vs Q15) = 6000
      for (int c = 0; c < CH; c++) begin
        checks++;
        if (c == tone_ch ? (peak[c] < 5000 || peak[c] > 7000) : (peak[c] > 150)) begin
          failures++; $display("run %0d ch %0d peak %0d", run, c, peak[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
