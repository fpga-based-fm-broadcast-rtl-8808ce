// fm_monitor_top: FPGA FM broadcast monitor - detect, stream, record, replay.
//
// The down-converted FM band (2-22 MHz after the analog front end) is
// sampled by a 12-bit ADC whose encode clock this design drives. Two paths
// use the samples:
//  * Sensing: on a SENSE command, spectrum_sensor takes a 2048-point FFT,
//    turns it into a magnitude spectrum, thresholds it at the midrange of
//    its maximum and minimum and keeps the CHANNELS strongest bins. The list
//    goes back to the user interface over SPI and tunes the demodulators.
//  * Channel processing, for every channel k at once: band-pass filter k of
//    the channel filter bank isolates the 200 kHz channel, fm_demodulator k
//    (its oscillator set to bin k of the list, ftw = bin * 2^32 / FFT_N)
//    recovers the frequency deviation, and low-pass filter k of the mono
//    filter bank keeps the mono audio. All channels can be recorded at the
//    same time into record_memory; one channel at a time is streamed, or one
//    recording replayed, through the sigma-delta PWM output.
// Band-pass coefficients (one set per channel) and the shared low-pass set
// are written through the ch_coef_* and mono_coef_* ports, for example by a
// soft processor or a configuration ROM: they depend on the carrier found.
//
// Clocking: one system clock (100 MHz on the reference board); the ADC runs
// at clk / ENC_DIV (10 MSPS); the demodulated audio at 10 MSPS / CIC_R
// (250 kSPS); recordings are kept at a fifth of that. The PWM bit stream
// toggles at the system clock and needs the board's RC reconstruction filter.
module fm_monitor_top
  import fm_pkg::*;
#(
  parameter int unsigned CHANNELS  = 8,
  parameter int unsigned FFT_N     = 2048,
  parameter int unsigned ENC_DIV   = 10,
  parameter int unsigned FREQ_STEP = 5,
  parameter int unsigned CH_TAPS   = 1000,
  parameter int unsigned MONO_TAPS = 100,
  parameter int unsigned CIC_R     = 40,
  parameter int unsigned REC_DEPTH = 4096,
  parameter int unsigned REC_DECIM = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ADC
  input  logic [ADC_W-1:0]              adc_data,
  output logic                          adc_enc,
  // SPI link to the user interface
  input  logic                          spi_sck,
  input  logic                          spi_ss_n,
  input  logic                          spi_mosi,
  output logic                          spi_miso,
  // filter coefficient loading
  input  logic                          ch_coef_we,
  input  logic [$clog2(CHANNELS)-1:0]   ch_coef_ch,
  input  logic [$clog2(CH_TAPS)-1:0]    ch_coef_addr,
  input  logic signed [15:0]            ch_coef_data,
  input  logic                          mono_coef_we,
  input  logic [$clog2(MONO_TAPS)-1:0]  mono_coef_addr,
  input  logic signed [15:0]            mono_coef_data,
  // audio and status
  output logic                          pwm_out,
  output logic [7:0]                    led,
  output logic                          sense_busy,
  output logic [CHANNELS-1:0]           recording,
  output logic [CHANNELS-1:0]           rec_full
);
  localparam int unsigned LOG = $clog2(FFT_N);
  localparam int unsigned CHW = $clog2(CHANNELS);

  // ---------------- ADC capture ----------------
  logic signed [ADC_W-1:0] sample;
  logic                    sample_valid;
  adc_interface #(.ADC_W(ADC_W), .ENC_DIV(ENC_DIV)) u_adc (
    .clk, .rst_n, .adc_data, .adc_enc, .sample, .sample_valid
  );

  // ---------------- user interface link ----------------
  logic [7:0] tx_byte, rx_byte;
  logic       rx_valid;
  spi_slave u_spi (
    .clk, .rst_n, .sck(spi_sck), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso),
    .tx_byte, .rx_valid, .rx_byte
  );

  logic                       sense_start, sense_done;
  peak_t                      peaks [CHANNELS];
  logic [$clog2(CHANNELS+1)-1:0] num_found;
  logic                       stream_en, play_start, play_stop, rec_stop_all;
  logic [CHW-1:0]             stream_ch, play_ch;
  logic [CHANNELS-1:0]        rec_start;
  command_controller #(.CHANNELS(CHANNELS)) u_ctrl (
    .clk, .rst_n, .rx_valid, .rx_byte, .tx_byte,
    .sense_start, .sense_busy, .sense_done, .peaks, .num_found,
    .stream_en, .stream_ch, .play_start, .play_stop, .play_ch,
    .rec_start, .rec_stop_all, .last_cmd(led)
  );

  // ---------------- spectrum sensing ----------------
  spectrum_sensor #(.N(FFT_N), .MAX_CAND(20), .NPEAKS(CHANNELS), .FREQ_STEP(FREQ_STEP)) u_sense (
    .clk, .rst_n, .start(sense_start), .sample_valid, .sample,
    .busy(sense_busy), .done(sense_done), .peaks, .num_found
  );

  // ---------------- channel filter bank ----------------
  logic               ch_valid;
  logic signed [15:0] ch_data [CHANNELS];
  channel_filter_bank #(.CHANNELS(CHANNELS), .NTAPS(CH_TAPS), .DW(ADC_W), .CW(16), .OW(16), .SHIFT(13)) u_bank1 (
    .clk, .rst_n, .coef_we(ch_coef_we), .coef_ch(ch_coef_ch), .coef_addr(ch_coef_addr),
    .coef_data(ch_coef_data), .in_valid(sample_valid), .in_data(sample),
    .out_valid(ch_valid), .out_data(ch_data)
  );

  // ---------------- demodulators ----------------
  logic [CHANNELS-1:0] dm_valid;
  logic signed [15:0]  dm_data [CHANNELS];
  for (genvar c = 0; c < CHANNELS; c++) begin : g_demod
    logic [31:0] ftw;
    assign ftw = 32'(peaks[c].bin) << (32 - LOG);
    fm_demodulator #(.IW(16), .R(CIC_R), .CIC_N(3)) u_demod (
      .clk, .rst_n, .ftw, .in_valid(ch_valid), .in_data(ch_data[c]),
      .out_valid(dm_valid[c]), .freq_out(dm_data[c])
    );
  end

  // ---------------- mono filter bank ----------------
  logic [CHANNELS-1:0] au_valid;
  logic signed [15:0]  au_data [CHANNELS];
  mono_filter_bank #(.CHANNELS(CHANNELS), .NTAPS(MONO_TAPS), .DW(16), .CW(16), .OW(16), .SHIFT(15)) u_bank2 (
    .clk, .rst_n, .coef_we(mono_coef_we), .coef_addr(mono_coef_addr), .coef_data(mono_coef_data),
    .in_valid(dm_valid), .in_data(dm_data), .out_valid(au_valid), .out_data(au_data)
  );

  // ---------------- recording / playback ----------------
  logic                       playing, play_valid, play_done;
  logic signed [15:0]         play_data;
  logic [$clog2(REC_DEPTH+1)-1:0] rec_len [CHANNELS];
  record_memory #(.CHANNELS(CHANNELS), .DEPTH(REC_DEPTH), .DW(16), .DECIM(REC_DECIM)) u_rec (
    .clk, .rst_n, .tick(au_valid[0]), .in_data(au_data),
    .rec_start, .rec_stop_all, .recording, .full(rec_full), .len(rec_len),
    .play_start, .play_ch, .play_stop, .playing, .play_valid, .play_data, .play_done
  );

  // ---------------- audio output ----------------
  logic signed [15:0] audio_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         audio_q <= '0;
    else if (playing && play_valid)     audio_q <= play_data;
    else if (!playing && au_valid[stream_ch]) audio_q <= au_data[stream_ch];
  end

  pwm_sdm #(.W(8)) u_pwm (
    .clk, .rst_n, .en(stream_en || playing),
    .in_data(audio_q[15:8] ^ 8'h80),   // signed to offset binary
    .pwm_out
  );
endmodule
