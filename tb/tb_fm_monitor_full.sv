// tb_fm_monitor_full: one complete monitoring cycle of the monitor at its
// default size (8 channels, 2048-point FFT, 1000-tap channel filters,
// 100-tap mono filter, CIC decimation 40), with no parameter overrides.
//
// Eight carriers of different strength sit on 4.88 kHz bin centres. The
// SPI master starts sensing, polls the status until done, and reads the
// frequency list, which must give the eight bins strongest first as
// bin * 5 (Q6.10 MHz). It then loads a band-pass filter per reported
// station, turns on FM with a different deviation per carrier, streams
// channel 0 and checks every channel's demodulated amplitude
// (deviation * R / fs * 2^16) and the PWM duty. The sensing time must be
// the capture window plus the FFT and peak search.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_fm_monitor_full;
  import fm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  localparam int CH = 8, NFFT = 2048, STEP = 5, CIC_R = 40, DEPTH = 4096, DECIM = 5, TAPS = 1000, MTAPS = 100;
  localparam real FS = 10.0e6;

  logic [11:0] adc_data = '0;
  logic adc_enc, sck = 0, ss_n = 1, mosi = 0, miso, pwm_out, sbusy;
  logic ch_we = 0, mono_we = 0;
  logic [2:0] ch_ch = '0;
  logic [$clog2(TAPS)-1:0] ch_addr = '0;
  logic [$clog2(MTAPS)-1:0] mono_addr = '0;
  logic signed [15:0] ch_dat = '0, mono_dat = '0;
  logic [7:0] led;
  logic [CH-1:0] recording, rec_full;

  fm_monitor_top dut (
    .clk, .rst_n, .adc_data, .adc_enc, .spi_sck(sck), .spi_ss_n(ss_n), .spi_mosi(mosi), .spi_miso(miso),
    .ch_coef_we(ch_we), .ch_coef_ch(ch_ch), .ch_coef_addr(ch_addr), .ch_coef_data(ch_dat),
    .mono_coef_we(mono_we), .mono_coef_addr(mono_addr), .mono_coef_data(mono_dat),
    .pwm_out, .led, .sense_busy(sbusy), .recording, .rec_full);

  // ---------------- ADC model: four carriers ----------------
  int  car_bin [CH] = '{150, 260, 370, 480, 590, 700, 810, 920};
  real amp  [CH] = '{220.0, 250.0, 190.0, 240.0, 180.0, 230.0, 200.0, 210.0};
  real dev  [CH] = '{25.0e3, 40.0e3, 15.0e3, 30.0e3, 20.0e3, 35.0e3, 10.0e3, 45.0e3};
  real ph   [CH] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
  bit  modulate = 0;
  real v, t_audio = 0.0;
  always @(posedge adc_enc) begin
    v = 0.0;
    for (int c = 0; c < CH; c++) begin
      v += amp[c] * $cos(ph[c]);
      ph[c] += 2.0 * PI * (car_bin[c] * FS / NFFT + (modulate ? dev[c] * $sin(2.0 * PI * 2.0e3 * t_audio) : 0.0)) / FS;
      if (ph[c] > 2.0 * PI) ph[c] -= 2.0 * PI;
    end
    t_audio += 1.0 / FS;
    adc_data <= 12'($rtoi(v));
  end

  // ---------------- SPI master ----------------
  task automatic xfer(input logic [7:0] mo, output logic [7:0] mi);
    ss_n = 0; repeat (10) @(negedge clk);
    for (int b = 7; b >= 0; b--) begin
      mosi = mo[b]; repeat (10) @(negedge clk);
      sck = 1; mi[b] = miso; repeat (10) @(negedge clk);
      sck = 0;
    end
    repeat (8) @(negedge clk);
    ss_n = 1; repeat (10) @(negedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int m_sense_done = 0, m_busy_reply = 0, m_list_read = 0, m_stream = 0, m_rec_start = 0,
      m_overflow = 0, m_stop_all = 0, m_play = 0, m_play_done = 0, m_mode_switch = 0,
      m_pwm_window = 0, m_sense_reject = 0;
  int n_sense_start = 0;
  logic [CH-1:0] full_d = '0;
  logic stream_d = 0;
  always @(posedge clk) if (rst_n) begin
    m_sense_done  += dut.sense_done;
    n_sense_start += dut.sense_start;
    m_play_done   += dut.play_done;
    m_stop_all    += dut.rec_stop_all;
    m_rec_start   += $countones(dut.rec_start);
    m_play        += dut.play_start;
    if (dut.play_start && stream_d) m_mode_switch++;
    stream_d <= dut.stream_en;
    for (int c = 0; c < CH; c++) if (rec_full[c] && !full_d[c]) m_overflow++;
    full_d <= rec_full;
  end

  // PWM check: while audio is on, average pwm_out over 256 clocks of a
  // constant audio byte and compare with the byte
  int pw_cnt = 0, pw_hi = 0;
  logic [7:0] pw_val;
  always @(posedge clk) if (rst_n) begin
    if (!(dut.stream_en || dut.playing) || (dut.audio_q[15:8] ^ 8'h80) != pw_val) begin
      pw_val = dut.audio_q[15:8] ^ 8'h80; pw_cnt = -4; pw_hi = 0;
    end else begin
      if (pw_cnt >= 0) pw_hi += pwm_out;
      pw_cnt++;
      if (pw_cnt == 256) begin
        checks++;
        if (pw_hi < int'(pw_val) - 2 || pw_hi > int'(pw_val) + 2) begin
          failures++; $display("pwm duty %0d/256 for byte %0d", pw_hi, pw_val);
        end
        m_pwm_window++; pw_cnt = -100000;
      end
    end
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // band-pass coefficient k of channel c: Hamming-windowed low-pass (150 kHz)
  // (cutoff 100 kHz here) shifted to the carrier, passband gain 16, scaled by 2^13
  function automatic int bp_coef(input int k, input real fc);
    real m, w, lp;
    m  = k - (TAPS - 1) / 2.0;
    w  = 0.54 - 0.46 * $cos(2.0 * PI * k / (TAPS - 1));
    lp = (m == 0.0) ? 2.0 * 100.0e3 / FS : $sin(2.0 * PI * 100.0e3 / FS * m) / (PI * m);
    return $rtoi(16.0 * 8192.0 * 2.0 * lp * w * $cos(2.0 * PI * fc / FS * m));
  endfunction

  logic [7:0] r;
  int order [CH] = '{1, 3, 5, 0, 7, 6, 2, 4};   // carriers by falling strength
  int t0, t_sense;
  real pk [CH];

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    // link check: the first reply is the link-OK status
    xfer(8'hFF, r); chk(r == ST_LINK_OK, "link OK status");
    // sense, a second sense while busy is ignored
    t0 = $time / 10;
    xfer(CMD_SENSE, r);
    xfer(CMD_SENSE, r); if (r == ST_BUSY) m_busy_reply++;
    xfer(8'hFF, r); if (r == ST_BUSY) m_busy_reply++;
    chk(sbusy, "sense busy");
    while (r != ST_DONE) begin xfer(8'hFF, r); if ($time / 10 - t0 > 200000) break; end
    t_sense = $time / 10 - t0;
    if (n_sense_start == 1) m_sense_reject++;
    chk(m_sense_done == 1, "one sensing run");
    // read the list: count, then 2 bytes per channel
    xfer(CMD_SEND_FREQS, r);
    xfer(CMD_SEND_FREQS, r); chk(r == CH, "number of stations");
    for (int i = 0; i < 2 * CH; i++) begin
      logic [15:0] f;
      f = 16'(car_bin[order[i/2]] * STEP);
      xfer(CMD_SEND_FREQS, r);
      checks++;
      if (r != ((i % 2 == 0) ? f[7:0] : f[15:8])) begin failures++; $display("list byte %0d = %0d", i, r); end
    end
    m_list_read++;
    xfer(8'hFF, r);
    // the reported stations tune the demodulators
    for (int c = 0; c < CH; c++) chk(dut.peaks[c].bin == 11'(car_bin[order[c]]), "peak car_bin");
    // load filters for the stations found (channel c gets station order[c])
    for (int c = 0; c < CH; c++)
      for (int k = 0; k < TAPS; k++) begin
        @(negedge clk); ch_we = 1; ch_ch = 3'(c); ch_addr = k[$clog2(TAPS)-1:0];
        ch_dat = 16'(bp_coef(k, car_bin[order[c]] * FS / NFFT));
      end
    // mono filter: Hamming-windowed 15 kHz low-pass at the 250 kS/s audio
    // rate, normalised to a DC gain of 1 (2^15)
    begin
      real lp [MTAPS];
      real sum, m;
      sum = 0.0;
      for (int k = 0; k < MTAPS; k++) begin
        m = k - (MTAPS - 1) / 2.0;
        lp[k] = (0.54 - 0.46 * $cos(2.0 * PI * k / (MTAPS - 1))) *
                ((m == 0.0) ? 2.0 * 15.0e3 / 250.0e3 : $sin(2.0 * PI * 15.0e3 / 250.0e3 * m) / (PI * m));
        sum += lp[k];
      end
      for (int k = 0; k < MTAPS; k++) begin
        @(negedge clk); ch_we = 0; mono_we = 1; mono_addr = k[$clog2(MTAPS)-1:0];
        mono_dat = 16'($rtoi(32768.0 * lp[k] / sum));
      end
    end
    @(negedge clk); ch_we = 0; mono_we = 0;
    modulate = 1;
    // stream channel 0 while channels 1 and 2 record
    xfer(CMD_STREAM, r); xfer(8'd0, r); m_stream += dut.stream_en;
    // settle, then measure the demodulated amplitude over one audio period
    repeat (60000) @(negedge clk);
    foreach (pk[c]) pk[c] = 0.0;
    for (int i = 0; i < 50000; i++) begin
      @(negedge clk);
      for (int c = 0; c < CH; c++) if (dut.au_valid[c]) begin
        real a;
        a = real'(dut.au_data[c]); a = (a < 0.0) ? -a : a;
        if (a > pk[c]) pk[c] = a;
      end
    end
    for (int c = 0; c < CH; c++) begin
      real e;
      e = dev[order[c]] * CIC_R / FS * 65536.0;
      checks++;
      if (pk[c] < 0.9 * e || pk[c] > 1.1 * e) begin failures++; $display("channel %0d audio peak %f exp %f", c, pk[c], e); end
    end
    // sensing time: N samples at 10 clocks, FFT N/2*log2 N, unload, peak search
    $display("sensing took %0d clocks (status polling included)", t_sense);
    chk(t_sense > 10 * NFFT + NFFT / 2 * 11 && t_sense < 10 * NFFT + NFFT / 2 * 11 + 1024 + 1024 + 400 + 40 + 2 * 400, "sensing time");

    $display("mechanisms: sense_done=%0d busy_reply=%0d list_read=%0d stream=%0d pwm_windows=%0d",
             m_sense_done, m_busy_reply, m_list_read, m_stream, m_pwm_window);
    chk(m_sense_done > 0, "mechanism: sensing run");
    chk(m_busy_reply > 0, "mechanism: busy status");
    chk(m_list_read > 0, "mechanism: frequency list");
    chk(m_stream > 0, "mechanism: streaming");
    chk(m_pwm_window > 0, "mechanism: PWM output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
