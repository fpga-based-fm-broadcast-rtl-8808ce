// pwm_sdm: first-order sigma-delta modulator used as a one-bit audio DAC.
//
// A W-bit accumulator adds the unsigned input sample on every clock; the
// carry out of the addition is the output bit. The larger the input, the
// more often the accumulator overflows, so the density of ones equals
// in_data / 2^W. An external RC reconstruction (low-pass) filter turns the
// bit stream into the analog audio signal. The output is registered. The
// accumulator structure is the document's; the enable input is this
// design's addition (when low the output rests at half density, the audio
// zero level, by adding mid-scale).
module pwm_sdm #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] in_data,
  output logic         pwm_out
);
  logic [W-1:0] acc;
  logic [W:0]   sum;
  assign sum = {1'b0, acc} + {1'b0, (en ? in_data : W'(1) << (W - 1))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      pwm_out <= 1'b0;
    end else begin
      acc     <= sum[W-1:0];
      pwm_out <= sum[W];
    end
  end
endmodule
