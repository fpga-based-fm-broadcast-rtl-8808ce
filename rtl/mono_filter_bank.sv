// mono_filter_bank: the second filter bank, one low-pass FIR per channel.
//
// Each channel's demodulated signal passes through its own low-pass filter
// that keeps the mono audio band (the first 15 kHz, with the cut-off placed
// near 22 kHz) and removes the stereo pilot, the stereo sub-band and the
// out-of-band noise of the discriminator. All mono filters have the same
// response, so the bank holds one shared coefficient set, written through
// the coef_* port, and CHANNELS filter datapaths that use it. Each channel
// has its own valid strobe; outputs follow their inputs by one clock.
// The bank of low-pass filters and its bandwidth are the document's; its
// place after the demodulator (where the audio band exists) and the
// run-time coefficients are this design's choice.
module mono_filter_bank #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned NTAPS    = 100,
  parameter int unsigned DW       = 16,
  parameter int unsigned CW       = 16,
  parameter int unsigned OW       = 16,
  parameter int unsigned SHIFT    = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(NTAPS)-1:0]  coef_addr,
  input  logic signed [CW-1:0]      coef_data,
  input  logic [CHANNELS-1:0]       in_valid,
  input  logic signed [DW-1:0]      in_data  [CHANNELS],
  output logic [CHANNELS-1:0]       out_valid,
  output logic signed [OW-1:0]      out_data [CHANNELS]
);
  logic signed [CW-1:0] coef [NTAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) coef[k] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    fir_filter #(.NTAPS(NTAPS), .DW(DW), .CW(CW), .OW(OW), .SHIFT(SHIFT)) u_lpf (
      .clk, .rst_n, .in_valid(in_valid[c]), .in_data(in_data[c]), .coef(coef),
      .out_valid(out_valid[c]), .out_data(out_data[c])
    );
  end
endmodule
