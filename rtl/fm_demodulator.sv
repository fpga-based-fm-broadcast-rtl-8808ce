// fm_demodulator: all-digital I/Q (quadrature) FM demodulator.
//
// The band-passed channel samples are multiplied by the cosine and the
// negated sine of a local oscillator (the dds block) tuned to the channel's
// carrier by ftw = f_carrier / f_sample * 2^32, which moves the channel to
// zero frequency and gives its in-phase (I) and quadrature (Q) components.
// A CIC decimator on each branch low-passes them and lowers the rate by R.
// A vectoring CORDIC takes the phase phi = atan2(Q, I) of every decimated
// pair, and the instantaneous frequency is the difference of two successive
// phases, omega = phi[n] - phi[n-1]. Phases are binary angles (2^16 = one
// turn), so the difference wraps correctly through +-pi.
//
// Output: freq_out is signed 16-bit, freq_out / 2^16 = (f - f_lo) * R / f_s
// cycles per output sample (at 10 MSPS and R = 40, one LSB is 3.815 Hz and
// 75 kHz deviation reads 19661). out_valid pulses at f_s / R. Latency from
// the R-th input of a block: 1 (mixer) + 1 (CIC) + 20 (CORDIC) + 1 cycles.
// The chain DDS, mixer, CIC, arctan and phase difference follows the
// document; the first, optional decimator is left out as it allows; widths
// and R are this design's choice.
module fm_demodulator #(
  parameter int unsigned IW    = 16,
  parameter int unsigned R     = 40,
  parameter int unsigned CIC_N = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          ftw,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [15:0]   freq_out
);
  // local oscillator
  logic signed [15:0] lo_cos, lo_sin;
  dds #(.PHW(32), .LUTA(10), .OW(16)) u_lo (
    .clk, .rst_n, .en(in_valid), .ftw, .cos_out(lo_cos), .sin_out(lo_sin)
  );

  // mixer
  logic signed [IW+16:0] pi_full, pq_full;
  logic signed [15:0]    mix_i, mix_q;
  logic                  mix_v;
  assign pi_full =  (IW+17)'(in_data) * (IW+17)'(lo_cos);
  assign pq_full = -((IW+17)'(in_data) * (IW+17)'(lo_sin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_i <= '0; mix_q <= '0; mix_v <= 1'b0;
    end else begin
      mix_v <= in_valid;
      if (in_valid) begin
        mix_i <= 16'(pi_full >>> (IW - 1));
        mix_q <= 16'(pq_full >>> (IW - 1));
      end
    end
  end

  // decimation of I and Q
  logic               dec_v, dec_vq;
  logic signed [15:0] dec_i, dec_q;
  cic_decimator #(.IW(16), .OW(16), .NSTAGES(CIC_N), .R(R)) u_cic_i (
    .clk, .rst_n, .in_valid(mix_v), .in_data(mix_i), .out_valid(dec_v), .out_data(dec_i)
  );
  cic_decimator #(.IW(16), .OW(16), .NSTAGES(CIC_N), .R(R)) u_cic_q (
    .clk, .rst_n, .in_valid(mix_v), .in_data(mix_q), .out_valid(dec_vq), .out_data(dec_q)
  );

  // arctan
  logic               ph_v;
  logic [15:0]        ph_mag;
  logic signed [15:0] ph;
  cordic_vec #(.W(16), .PW(16), .ITER(16)) u_atan (
    .clk, .rst_n, .in_valid(dec_v), .x(dec_i), .y(dec_q),
    .out_valid(ph_v), .mag(ph_mag), .phase(ph)
  );

  // phase to frequency
  logic signed [15:0] ph_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_prev <= '0; freq_out <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= ph_v;
      if (ph_v) begin
        freq_out <= ph - ph_prev;
        ph_prev  <= ph;
      end
    end
  end
endmodule
