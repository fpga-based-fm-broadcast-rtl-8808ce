// dds: direct digital synthesiser, the demodulator's local oscillator.
//
// A PHW-bit phase accumulator advances by the tuning word ftw on every
// enabled clock, so the output frequency is ftw / 2^PHW times the sample
// rate. The two top phase bits select the quadrant and the next LUTA bits
// address a quarter-wave sine table (computed at elaboration, sampled at
// the centres of the 2^LUTA steps so the quadrant mirroring is exact); the
// other three quadrants come from mirroring the address and negating the
// value, which cuts the table to a quarter of a full cycle. Cosine is the
// same lookup a quarter cycle ahead. Outputs are signed OW-bit, peak
// 2^(OW-1)-1, registered: they belong to the phase before the update.
// The quarter-wave scheme is the document's; sizes are this design's choice.
module dds #(
  parameter int unsigned PHW  = 32,
  parameter int unsigned LUTA = 10,
  parameter int unsigned OW   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [PHW-1:0]       ftw,
  output logic signed [OW-1:0] cos_out,
  output logic signed [OW-1:0] sin_out
);
  localparam int unsigned Q = 1 << LUTA;

  typedef logic [OW-2:0] qtab_t [Q];
  function automatic qtab_t make_qtab();
    qtab_t t;
    real a, amp;
    amp = real'((longint'(1) << (OW - 1)) - 1);
    for (int i = 0; i < Q; i++) begin
      a = 3.14159265358979323846 / 2.0 * (real'(i) + 0.5) / real'(Q);
      t[i] = (OW-1)'($rtoi($floor($sin(a) * amp + 0.5)));
    end
    return t;
  endfunction
  localparam qtab_t QSIN = make_qtab();

  logic [PHW-1:0] acc;

  function automatic logic signed [OW-1:0] lookup(input logic [1:0] quad, input logic [LUTA-1:0] idx);
    logic [OW-2:0] m;
    m = quad[0] ? QSIN[~idx] : QSIN[idx];
    return quad[1] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  logic [1:0]      quad;
  logic [LUTA-1:0] idx;
  assign quad = acc[PHW-1 -: 2];
  assign idx  = acc[PHW-3 -: LUTA];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      cos_out <= '0;
      sin_out <= '0;
    end else if (en) begin
      acc     <= acc + ftw;
      sin_out <= lookup(quad, idx);
      cos_out <= lookup(quad + 2'd1, idx);
    end
  end
endmodule
