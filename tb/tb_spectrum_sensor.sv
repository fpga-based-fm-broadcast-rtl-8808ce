// tb_spectrum_sensor: full-size sensing path (2048-point FFT, 1024 bins,
// 10 MSPS samples every 10 clocks). Run 1: three bin-centred carriers of
// different strength plus small noise; exactly three peaks must be
// reported, strongest first, each with freq = bin * 5 (Q6.10 MHz). Run 2:
// nine equal carriers; the list is capped at eight, all from the carrier
// set and distinct. The time from start to done must equal the capture
// window plus the FFT, magnitude and peak-search time (within a small
// margin), and busy must cover it.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_spectrum_sensor;
  import fm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 2048;
  localparam real PI = 3.14159265358979323846;

  logic start = 0, sv = 0, busy, done;
  logic signed [11:0] smp = '0;
  peak_t peaks [8];
  logic [3:0] nf;
  spectrum_sensor #(.N(N)) dut (.clk, .rst_n, .start, .sample_valid(sv), .sample(smp), .busy, .done, .peaks, .num_found(nf));

  int  tb_bins [$];
  real tb_amp [$];
  longint n = 0;
  real v;
  // ADC sample stream: one sample per 10 clocks
  initial forever begin
    repeat (9) @(negedge clk);
    begin
      v = real'($urandom_range(0, 6)) - 3.0;
      foreach (tb_bins[i]) v += tb_amp[i] * $cos(2.0 * PI * tb_bins[i] * n / N);
      smp = 12'($rtoi(v));
    end
    sv = 1; n++;
    @(negedge clk); sv = 0;
  end

  int t0, t_done, cyc = 0;
  bit busy_gap;
  always @(posedge clk) cyc++;

  task automatic run();
    busy_gap = 0;
    @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (!busy && !done) busy_gap = 1;
      if (cyc - t0 > 100000) break;
    end
    t_done = cyc - t0;
    // capture N samples (10 clocks each), FFT N/2*log2(N), unload N/2,
    // CORDIC ~20, peak search N/2 + (MAX_CAND-1)^2 at most
    checks++;
    if (t_done < 10 * N + 1024 * 11 + 1024 || t_done > 10 * N + 10 + 1024 * 11 + 1024 + 40 + 1024 + 400) begin
      failures++; $display("start to done %0d clocks", t_done);
    end
    checks++; if (busy_gap) begin failures++; $display("busy dropped before done"); end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    tb_bins = '{205, 614, 820}; tb_amp = '{450.0, 700.0, 600.0};
    repeat (50) @(negedge clk);
    run();
    $display("run 1: %0d clocks, found %0d: bins %0d %0d %0d", t_done, nf, peaks[0].bin, peaks[1].bin, peaks[2].bin);
    checks++; if (nf != 3) begin failures++; $display("found %0d", nf); end
    begin
      int expb [3] = '{614, 820, 205};
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (peaks[i].bin != expb[i] || peaks[i].freq != 16'(expb[i] * 5)) begin
          failures++; $display("peak %0d bin %0d freq %0d", i, peaks[i].bin, peaks[i].freq);
        end
      end
      checks++; if (!(peaks[0].pwr > peaks[1].pwr && peaks[1].pwr > peaks[2].pwr)) begin failures++; $display("not sorted"); end
    end
    tb_bins = '{40, 100, 150, 300, 410, 520, 700, 880, 990}; tb_amp = '{190.0, 190.0, 190.0, 190.0, 190.0, 190.0, 190.0, 190.0, 190.0};
    run();
    checks++; if (nf != 8) begin failures++; $display("found %0d, exp 8", nf); end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!(peaks[i].bin inside {40, 100, 150, 300, 410, 520, 700, 880, 990})) begin failures++; $display("peak %0d bin %0d", i, peaks[i].bin); end
      for (int j = 0; j < i; j++) begin checks++; if (peaks[j].bin == peaks[i].bin) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
