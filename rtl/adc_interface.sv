// adc_interface: encode-clock generator and sample capture for a parallel
// 12-bit ADC (AD6640 class).
//
// The FPGA drives the converter's ENC pin; every rising ENC edge starts a
// conversion. ENC is the system clock divided by ENC_DIV: high for
// ENC_DIV/2 cycles, low for the rest, so both pulse widths stay above the
// converter's 6.5 ns minimum whenever ENC_DIV >= 2 at 100 MHz. The data bus is
// first registered in the I/O register, then taken as the new sample on the
// falling ENC edge, half a period after the rising edge, well after the
// converter's 10.5 ns output delay. Because ENC is made from the same clock,
// the bus changes at a known phase and needs no synchroniser. The captured
// word is two's complement, as the converter outputs it; sample_valid pulses
// for one cycle per sample. With the default 100 MHz clock and ENC_DIV = 10
// the sample rate is the 10 MSPS the design runs at.
// The converter, its 12-bit parallel bus and the 10 MHz encode rate follow
// the original description; the clock divider, the capture edge and the
// input register are this design's own choices.
module adc_interface #(
  parameter int unsigned ADC_W   = 12,
  parameter int unsigned ENC_DIV = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ADC_W-1:0]        adc_data,
  output logic                    adc_enc,
  output logic signed [ADC_W-1:0] sample,
  output logic                    sample_valid
);
  localparam int unsigned CW = (ENC_DIV > 2) ? $clog2(ENC_DIV) : 1;
  localparam int unsigned HI = ENC_DIV / 2;

  logic [CW-1:0]    cnt;
  logic [ADC_W-1:0] bus_q;

  initial assert (ENC_DIV >= 2) else $error("ENC_DIV must be at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      adc_enc      <= 1'b0;
      bus_q        <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      cnt          <= (cnt == CW'(ENC_DIV - 1)) ? '0 : cnt + 1'b1;
      adc_enc      <= (cnt < CW'(HI));
      bus_q        <= adc_data;
      sample_valid <= 1'b0;
      // cnt == HI is the cycle on which adc_enc falls
      if (cnt == CW'(HI)) begin
        sample       <= bus_q;
        sample_valid <= 1'b1;
      end
    end
  end
endmodule
