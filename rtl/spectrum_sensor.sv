// spectrum_sensor: one run of automatic channel detection.
//
// A start pulse opens a capture window of N consecutive ADC samples that feed
// the radix-2 FFT. The FFT returns the positive-frequency half of the
// spectrum (bins 0..N/2-1); each complex bin goes through the CORDIC to get
// its magnitude, and the magnitudes stream into the peak detector, which
// stores them, derives the midrange threshold, keeps the bins above it and
// sorts them. done pulses when the list of the NPEAKS strongest bins is
// valid; busy covers the whole run.
//
// Timing at the defaults (N = 2048, 10 MSPS from a 100 MHz clock): capture
// 20480 cycles, FFT 11264 + 1024 cycles, CORDIC latency 20 cycles, peak
// detection about 1024 + 361 cycles: roughly 34,200 cycles, 342 us.
// The chain FFT -> magnitude -> stored spectrum -> peak detection and the
// 2048-point size follow the original description; the capture window
// control, the use of the lower half only and ignoring start while busy are
// this design's own choices.
module spectrum_sensor
  import fm_pkg::*;
#(
  parameter int unsigned N         = 2048,
  parameter int unsigned MAX_CAND  = 20,
  parameter int unsigned NPEAKS    = 8,
  parameter int unsigned FREQ_STEP = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         sample_valid,
  input  logic signed [ADC_W-1:0]      sample,
  output logic                         busy,
  output logic                         done,
  output peak_t                        peaks [NPEAKS],
  output logic [$clog2(NPEAKS+1)-1:0]  num_found
);
  localparam int unsigned LOG = $clog2(N);
  localparam int unsigned DW  = ADC_W + LOG + 1;

  logic [LOG:0] cap_cnt;
  logic         capturing, running;
  logic         pk_busy, pk_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_cnt <= '0; capturing <= 1'b0; running <= 1'b0;
    end else begin
      if (start && !running) begin
        capturing <= 1'b1; running <= 1'b1; cap_cnt <= '0;
      end else begin
        if (capturing && sample_valid) begin
          cap_cnt <= cap_cnt + 1'b1;
          if (cap_cnt == (LOG+1)'(N - 1)) capturing <= 1'b0;
        end
        if (pk_done) running <= 1'b0;
      end
    end
  end

  logic                 fft_in_ready, fft_busy, fft_ov, fft_last;
  logic signed [DW-1:0] fft_re, fft_im;
  logic [LOG-1:0]       fft_idx;
  fft_r2 #(.N(N), .IW(ADC_W), .DW(DW), .TW(16), .OUT_N(N/2)) u_fft (
    .clk, .rst_n,
    .in_valid(capturing && sample_valid), .in_data(sample), .in_ready(fft_in_ready),
    .busy(fft_busy), .out_valid(fft_ov), .out_re(fft_re), .out_im(fft_im),
    .out_idx(fft_idx), .out_last(fft_last)
  );

  logic              mag_valid;
  logic [DW-1:0]     mag_full;
  logic signed [15:0] unused_phase;
  cordic_vec #(.W(DW), .PW(16), .ITER(18)) u_mag (
    .clk, .rst_n, .in_valid(fft_ov), .x(fft_re), .y(fft_im),
    .out_valid(mag_valid), .mag(mag_full), .phase(unused_phase)
  );

  logic [MAG_W-1:0] mag_w;
  assign mag_w = MAG_W'(mag_full);

  logic [MAG_W-1:0] pk_max, pk_min, pk_mid;
  peak_detector #(.NBINS(N/2), .MAX_CAND(MAX_CAND), .NPEAKS(NPEAKS), .FREQ_STEP(FREQ_STEP)) u_pk (
    .clk, .rst_n, .start(start && !running), .mag_valid(mag_valid), .mag(mag_w),
    .busy(pk_busy), .done(pk_done), .peaks(peaks), .num_found(num_found),
    .max_mag(pk_max), .min_mag(pk_min), .midrange(pk_mid)
  );

  assign busy = running;
  assign done = pk_done;
endmodule
