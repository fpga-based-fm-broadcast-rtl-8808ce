// cic_decimator: Cascaded Integrator-Comb (Hogenauer) decimator.
//
// NSTAGES integrators run at the input rate, the stream is then kept one
// sample in R, and NSTAGES comb sections (differential delay 1) run at the
// output rate: a low-pass filter and down-sampler made only of adders,
// subtracters and registers. The DC gain R^NSTAGES is taken out, as far as
// a power of two allows, by keeping the OW top bits of the
// IW + NSTAGES*ceil(log2 R)-bit word (gain R^N / 2^(N*ceil(log2 R)),
// 0.244 for N = 3, R = 40). Wrap-around in the integrators is harmless in
// two's complement. out_valid pulses once every R accepted inputs, one clock
// after the R-th. The use of a CIC decimator is the document's; stage count,
// decimation factor and scaling are this design's choice.
module cic_decimator #(
  parameter int unsigned IW      = 16,
  parameter int unsigned OW      = 16,
  parameter int unsigned NSTAGES = 3,
  parameter int unsigned R       = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);
  localparam int unsigned GW = IW + NSTAGES * $clog2(R);
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;

  logic signed [GW-1:0] integ [NSTAGES];
  logic signed [GW-1:0] comb_d [NSTAGES];
  logic signed [GW-1:0] c [NSTAGES+1];
  logic [RW-1:0]        phase;
  logic                 dec_v;

  always_comb begin
    c[0] = integ[NSTAGES-1];
    for (int s = 0; s < NSTAGES; s++) c[s+1] = c[s] - comb_d[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTAGES; s++) begin
        integ[s]  <= '0;
        comb_d[s] <= '0;
      end
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + GW'(in_data);
        for (int s = 1; s < NSTAGES; s++) integ[s] <= integ[s] + integ[s-1];
        phase <= (phase == RW'(R - 1)) ? '0 : phase + 1'b1;
      end
      // the comb runs on the integrator output after every R-th input
      if (dec_v) begin
        for (int s = 0; s < NSTAGES; s++) comb_d[s] <= c[s];
        out_data  <= OW'(c[NSTAGES] >>> (GW - OW));
        out_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_v <= 1'b0;
    else        dec_v <= in_valid && (phase == RW'(R - 1));
  end
endmodule
