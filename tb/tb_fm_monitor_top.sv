// tb_fm_monitor_top: end-to-end run of the monitor at reduced size
// (4 channels, 256-point FFT, 48-tap channel filters, 15-tap mono filter,
// 64-word record banks), driven only through its pins.
//
// An ADC model puts four carriers on adc_data, one new sample per ENC
// rising edge; they are unmodulated while the spectrum is sensed and are
// then frequency modulated by a 2 kHz tone with a different deviation per
// carrier. A mode-0 SPI master plays the user-interface controller: it
// starts sensing, polls the status byte, reads the frequency list, then
// streams a channel, records two channels (one until its bank overflows,
// one stopped by "stop all"), switches to playback, and returns to idle.
//
// Checked here: status bytes (link OK, busy, done); frequency list =
// carrier car_bin * FREQ_STEP, strongest first; sensing time; demodulated
// amplitude per channel = deviation * R / fs * 2^16; PWM duty over 256
// clocks = audio byte / 256; playback returns exactly the words recorded;
// full/recording flags. Each mechanism is counted and must occur.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_fm_monitor_top;
  import fm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  localparam int CH = 4, NFFT = 256, STEP = 40, CIC_R = 40, DEPTH = 64, DECIM = 5, TAPS = 48, MTAPS = 15;
  localparam real FS = 10.0e6;

  logic [11:0] adc_data = '0;
  logic adc_enc, sck = 0, ss_n = 1, mosi = 0, miso, pwm_out, sbusy;
  logic ch_we = 0, mono_we = 0;
  logic [1:0] ch_ch = '0;
  logic [$clog2(TAPS)-1:0] ch_addr = '0;
  logic [$clog2(MTAPS)-1:0] mono_addr = '0;
  logic signed [15:0] ch_dat = '0, mono_dat = '0;
  logic [7:0] led;
  logic [CH-1:0] recording, rec_full;

  fm_monitor_top #(.CHANNELS(CH), .FFT_N(NFFT), .ENC_DIV(10), .FREQ_STEP(STEP), .CH_TAPS(TAPS),
                   .MONO_TAPS(MTAPS), .CIC_R(CIC_R), .REC_DEPTH(DEPTH), .REC_DECIM(DECIM)) dut (
    .clk, .rst_n, .adc_data, .adc_enc, .spi_sck(sck), .spi_ss_n(ss_n), .spi_mosi(mosi), .spi_miso(miso),
    .ch_coef_we(ch_we), .ch_coef_ch(ch_ch), .ch_coef_addr(ch_addr), .ch_coef_data(ch_dat),
    .mono_coef_we(mono_we), .mono_coef_addr(mono_addr), .mono_coef_data(mono_dat),
    .pwm_out, .led, .sense_busy(sbusy), .recording, .rec_full);

  // ---------------- ADC model: four carriers ----------------
  int  car_bin [CH] = '{26, 51, 77, 102};
  real amp  [CH] = '{420.0, 500.0, 300.0, 360.0};   // strength order: 51, 26, 102, 77
  real dev  [CH] = '{25.0e3, 40.0e3, 15.0e3, 30.0e3};
  real ph   [CH] = '{0.0, 0.0, 0.0, 0.0};
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

  // record log of channel 1, taken where the bank stores a word
  int rec_log [$], play_log [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.au_valid[0] && dut.u_rec.dcnt == 0 && recording[1]) rec_log.push_back(int'(dut.au_data[1]));
    if (dut.play_valid) play_log.push_back(int'(dut.play_data));
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
  // shifted to the carrier, passband gain 16, scaled by 2^13
  function automatic int bp_coef(input int k, input real fc);
    real m, w, lp;
    m  = k - (TAPS - 1) / 2.0;
    w  = 0.54 - 0.46 * $cos(2.0 * PI * k / (TAPS - 1));
    lp = (m == 0.0) ? 2.0 * 150.0e3 / FS : $sin(2.0 * PI * 150.0e3 / FS * m) / (PI * m);
    return $rtoi(16.0 * 8192.0 * 2.0 * lp * w * $cos(2.0 * PI * fc / FS * m));
  endfunction

  logic [7:0] r;
  int order [CH] = '{1, 0, 3, 2};   // carriers by falling strength
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
        @(negedge clk); ch_we = 1; ch_ch = 2'(c); ch_addr = k[$clog2(TAPS)-1:0];
        ch_dat = 16'(bp_coef(k, car_bin[order[c]] * FS / NFFT));
      end
    for (int k = 0; k < MTAPS; k++) begin
      @(negedge clk); ch_we = 0; mono_we = 1; mono_addr = k[$clog2(MTAPS)-1:0];
      mono_dat = 16'(32768 / MTAPS + ((k < 32768 % MTAPS) ? 1 : 0));   // boxcar, DC gain 1
    end
    @(negedge clk); ch_we = 0; mono_we = 0;
    modulate = 1;
    // stream channel 0 while channels 1 and 2 record
    xfer(CMD_STREAM, r); xfer(8'd0, r); m_stream += dut.stream_en;
    xfer(CMD_RECORD, r); xfer(8'd1, r);
    xfer(CMD_RECORD, r); xfer(8'd2, r);
    chk(recording == 4'b0110, "recording ch1, ch2");
    // settle, then measure the demodulated amplitude over one audio period
    repeat (60000) @(negedge clk);
    pk = '{0.0, 0.0, 0.0, 0.0};
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
    // stop all recording; channel 1 is re-armed and runs until it overflows
    xfer(CMD_REC_STOP, r);
    chk(recording == 4'b0000 && dut.rec_len[2] > 0 && !rec_full[2], "stop all");
    rec_log.delete();
    xfer(CMD_RECORD, r); xfer(8'd1, r);
    while (!rec_full[1] && $time / 10 - t0 < 900000) @(negedge clk);
    chk(rec_full[1] && !recording[1] && dut.rec_len[1] == DEPTH, "channel 1 overflow");
    chk(rec_log.size() == DEPTH, "record log size");
    // switch from streaming to playback of channel 1
    play_log.delete();
    xfer(CMD_PLAYBACK, r); xfer(8'd1, r);
    chk(dut.playing && !dut.stream_en, "playback mode");
    while (dut.playing && $time / 10 - t0 < 1500000) @(negedge clk);
    chk(play_log.size() == DEPTH, "playback length");
    for (int i = 0; i < play_log.size() && i < rec_log.size(); i++) begin
      checks++; if (play_log[i] != rec_log[i]) begin failures++; if (failures < 20) $display("play %0d: %0d exp %0d", i, play_log[i], rec_log[i]); end
    end
    xfer(CMD_IDLE, r);
    chk(!dut.playing && !dut.stream_en && led == CMD_IDLE, "idle");
    // sensing time: N samples at 10 clocks, FFT N/2*log2 N, unload, peak search
    $display("sensing took %0d clocks (status polling included)", t_sense);
    chk(t_sense > 10 * NFFT + NFFT / 2 * 8 && t_sense < 10 * NFFT + NFFT / 2 * 8 + 128 + 400 + 40 + 2 * 400, "sensing time");

    $display("mechanisms: sense_done=%0d busy_reply=%0d sense_reject=%0d list_read=%0d stream=%0d rec_start=%0d overflow=%0d stop_all=%0d play=%0d play_done=%0d mode_switch=%0d pwm_windows=%0d",
             m_sense_done, m_busy_reply, m_sense_reject, m_list_read, m_stream, m_rec_start, m_overflow,
             m_stop_all, m_play, m_play_done, m_mode_switch, m_pwm_window);
    chk(m_sense_done > 0, "mechanism: sensing run");
    chk(m_busy_reply > 0, "mechanism: busy status");
    chk(m_sense_reject > 0, "mechanism: sense ignored while busy");
    chk(m_list_read > 0, "mechanism: frequency list");
    chk(m_stream > 0, "mechanism: streaming");
    chk(m_rec_start > 0, "mechanism: record start");
    chk(m_overflow > 0, "mechanism: record overflow");
    chk(m_stop_all > 0, "mechanism: stop all recording");
    chk(m_play > 0, "mechanism: playback");
    chk(m_play_done > 0, "mechanism: playback end");
    chk(m_mode_switch > 0, "mechanism: stream to playback switch");
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
