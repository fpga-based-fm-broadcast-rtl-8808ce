// tb_mono_filter_bank: three channels share one random 23-tap coefficient
// set and take independent random inputs on independent strobes. Every
// output is compared with a direct convolution model (same rounding,
// shift and saturation) and must appear one clock after its input.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_mono_filter_bank;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int CH = 3, NT = 23;

  logic we = 0;
  logic [$clog2(NT)-1:0] addr = '0;
  logic signed [15:0] cdat = '0;
  logic [CH-1:0] iv = '0, ov;
  logic signed [15:0] x [CH], y [CH];
  mono_filter_bank #(.CHANNELS(CH), .NTAPS(NT), .DW(16), .SHIFT(15)) dut (
    .clk, .rst_n, .coef_we(we), .coef_addr(addr), .coef_data(cdat),
    .in_valid(iv), .in_data(x), .out_valid(ov), .out_data(y));

  int h [NT];
  int hist [CH][NT];
  longint acc;
  longint expv [CH], expn [CH];
  logic [CH-1:0] exp_v;

  always @(posedge clk) if (rst_n) for (int c = 0; c < CH; c++) begin
    if (exp_v[c]) begin
      checks++;
      if (!ov[c] || longint'(y[c]) != expv[c]) begin
        failures++; if (failures < 10) $display("ch%0d got %0d/%b exp %0d", c, y[c], ov[c], expv[c]);
      end
    end else if (ov[c]) begin failures++; $display("ch%0d unexpected output", c); end
  end

  initial begin
    exp_v = '0;
    foreach (x[c]) x[c] = '0;
    foreach (hist[c, k]) hist[c][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NT; k++) begin
      h[k] = $urandom_range(0, 40000) - 20000;
      @(negedge clk); we = 1; addr = k[$clog2(NT)-1:0]; cdat = 16'(h[k]);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int c = 0; c < CH; c++) begin
        iv[c] = ($urandom_range(0, 2) != 0);
        if (iv[c]) begin
          x[c] = 16'($urandom_range(0, 65535));
          for (int k = NT - 1; k > 0; k--) hist[c][k] = hist[c][k-1];
          hist[c][0] = x[c];
          acc = 0;
          for (int k = 0; k < NT; k++) acc += longint'(hist[c][k]) * h[k];
          acc = (acc + (1 << 14)) >>> 15;
          expn[c] = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : acc;
        end
      end
      @(posedge clk); #1 exp_v = iv; expv = expn;
    end
    @(negedge clk); iv = '0;
    @(posedge clk); #1 exp_v = '0;
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
