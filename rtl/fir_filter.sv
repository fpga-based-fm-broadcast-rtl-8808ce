// fir_filter: fully parallel FIR filter in transposed direct form.
//
// Both filter banks are built from this block. Every accepted input sample
// x[n] is multiplied by all NTAPS coefficients at once; the products are
// added into a chain of partial-sum registers, so the output for x[n] is
// y[n] = sum_k coef[k] * x[n-k], available one clock after in_valid with no
// long adder tree on the critical path. The output is y[n] shifted right by
// SHIFT with rounding and saturated to OW bits. Coefficients come in on a
// port so that a bank can hold them in registers and retune them at run time.
//
// Timing: one sample per clock at most; out_valid follows in_valid by one
// cycle. The FIR structure is the document's; the transposed form, the
// widths and the run-time coefficient port are this design's choice.
module fir_filter #(
  parameter int unsigned NTAPS = 32,
  parameter int unsigned DW    = 16,
  parameter int unsigned CW    = 16,
  parameter int unsigned OW    = 16,
  parameter int unsigned SHIFT = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  input  logic signed [CW-1:0] coef [NTAPS],
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);
  localparam int unsigned AW = DW + CW + $clog2(NTAPS) + 1;

  initial assert (NTAPS >= 2) else $error("fir_filter needs at least two taps");

  logic signed [AW-1:0] z [NTAPS-1];
  logic signed [AW-1:0] xe;
  logic signed [AW-1:0] prod [NTAPS];

  always_comb begin
    xe = AW'(in_data);
    for (int k = 0; k < NTAPS; k++) prod[k] = xe * AW'(coef[k]);
  end

  logic signed [AW-1:0] y, yr;
  assign y  = prod[0] + z[0];
  assign yr = (y + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;

  localparam logic signed [AW-1:0] OMAX = (AW'(1) <<< (OW - 1)) - 1;
  localparam logic signed [AW-1:0] OMIN = -(AW'(1) <<< (OW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) z[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < NTAPS - 2; k++) z[k] <= prod[k+1] + z[k+1];
        z[NTAPS-2] <= prod[NTAPS-1];
        out_data   <= (yr > OMAX) ? OW'(OMAX) : (yr < OMIN) ? OW'(OMIN) : OW'(yr);
      end
    end
  end
endmodule
