// channel_filter_bank: the first filter bank, one band-pass FIR per channel.
//
// All CHANNELS filters run in parallel on the same ADC sample stream; each is
// meant to pass one 200 kHz wide FM channel centred on a detected carrier, so
// that several channels are separated at the same time. The coefficients of
// every filter live in registers inside the bank and are written one word at
// a time through the coef_* port (channel, tap address, value), so the bank
// can be retuned after each sensing run; a controller or host computes them
// (for instance a windowed-sinc band-pass, see the testbench). Outputs are
// one sample per channel, all valid on the same cycle, one clock after the
// input. The bank structure and the 200 kHz pass band are the document's;
// the coefficient values are not given there and are loaded at run time.
module channel_filter_bank #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned NTAPS    = 1000,
  parameter int unsigned DW       = 12,
  parameter int unsigned CW       = 16,
  parameter int unsigned OW       = 16,
  parameter int unsigned SHIFT    = 13
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         coef_we,
  input  logic [$clog2(CHANNELS)-1:0]  coef_ch,
  input  logic [$clog2(NTAPS)-1:0]     coef_addr,
  input  logic signed [CW-1:0]         coef_data,
  input  logic                         in_valid,
  input  logic signed [DW-1:0]         in_data,
  output logic                         out_valid,
  output logic signed [OW-1:0]         out_data [CHANNELS]
);
  logic signed [CW-1:0] coef [CHANNELS][NTAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CHANNELS; c++)
        for (int k = 0; k < NTAPS; k++) coef[c][k] <= '0;
    end else if (coef_we) begin
      coef[coef_ch][coef_addr] <= coef_data;
    end
  end

  logic [CHANNELS-1:0] ov;
  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    fir_filter #(.NTAPS(NTAPS), .DW(DW), .CW(CW), .OW(OW), .SHIFT(SHIFT)) u_bpf (
      .clk, .rst_n, .in_valid, .in_data, .coef(coef[c]),
      .out_valid(ov[c]), .out_data(out_data[c])
    );
  end
  assign out_valid = ov[0];
endmodule
