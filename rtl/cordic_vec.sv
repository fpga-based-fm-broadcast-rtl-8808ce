// cordic_vec: pipelined vectoring-mode CORDIC giving magnitude and phase.
//
// The same unit serves two places in the design: it turns each complex FFT
// bin into its magnitude sqrt(re^2 + im^2) for spectrum sensing, and it
// computes atan2(Q, I) for the FM demodulator. A first stage folds the vector
// into the right half-plane by a +-90 degree rotation; ITER micro-rotation
// stages then drive y to zero while summing the rotation angles from an
// arctangent table computed at elaboration. The remaining x is the magnitude
// times the CORDIC gain (about 1.6468), which a final constant multiply by
// 0.60725 removes.
//
// Interface: x, y are signed W-bit. mag is unsigned W-bit (the largest
// magnitude, sqrt(2) * 2^(W-1), still fits). phase is a signed PW-bit binary
// angle: 2^(PW-1) stands for pi. Timing: fully pipelined, one result per
// clock through ITER + 2 register stages: a result is on the outputs
// ITER + 1 clocks after the edge that takes its input. The use of
// CORDIC for both jobs is the document's; the stage count, widths and angle
// format are this design's choice.
module cordic_vec #(
  parameter int unsigned W    = 24,
  parameter int unsigned PW   = 16,
  parameter int unsigned ITER = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x,
  input  logic signed [W-1:0]  y,
  output logic                 out_valid,
  output logic [W-1:0]         mag,
  output logic signed [PW-1:0] phase
);
  localparam int unsigned G   = 4;         // fraction guard bits
  localparam int unsigned XW  = W + 2 + G; // growth by the CORDIC gain
  localparam int unsigned ZW  = PW + 6;    // extra angle precision
  localparam int unsigned KW  = 17;
  localparam int unsigned LAT = ITER + 2;
  localparam logic [KW-1:0] KINV = KW'(39797);  // round(0.607252935 * 2^16)

  typedef logic signed [ZW-1:0] atan_tab_t [ITER];
  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    real sc;
    sc = real'(longint'(1) << (ZW - 1)) / 3.14159265358979323846;
    for (int i = 0; i < ITER; i++)
      t[i] = ZW'($rtoi($floor($atan(1.0 / real'(longint'(1) << i)) * sc + 0.5)));
    return t;
  endfunction
  localparam atan_tab_t ATAN_T = make_atan();

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [LAT-1:0]       vld;

  // stage 0: quadrant fold
  logic signed [XW-1:0] xg, yg;
  assign xg = XW'(x) <<< G;
  assign yg = XW'(y) <<< G;
  always_ff @(posedge clk) begin
    if (x >= 0) begin
      xs[0] <= xg;  ys[0] <= yg;  zs[0] <= '0;
    end else if (y >= 0) begin   // rotate by -90 deg: (x,y) -> (y,-x)
      xs[0] <= yg;  ys[0] <= -xg; zs[0] <= ZW'(1) <<< (ZW - 2);
    end else begin               // rotate by +90 deg: (x,y) -> (-y,x)
      xs[0] <= -yg; ys[0] <= xg;  zs[0] <= -(ZW'(1) <<< (ZW - 2));
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN_T[i];
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN_T[i];
      end
    end
  end

  // gain correction and rounding of the angle
  logic [XW+KW-1:0] mprod;
  logic [XW-1:0]    xpos;
  assign xpos  = (xs[ITER] < 0) ? '0 : xs[ITER];
  assign mprod = (XW+KW)'(xpos) * (XW+KW)'(KINV);
  logic [XW+KW-17-G:0] mscaled;
  assign mscaled = mprod[XW+KW-1:16+G] + (XW+KW-16-G)'(mprod[15+G]);

  always_ff @(posedge clk) begin
    mag   <= (mscaled > (XW+KW-16-G)'({W{1'b1}})) ? {W{1'b1}} : W'(mscaled);
    phase <= PW'((zs[ITER] + (ZW'(1) <<< (ZW - PW - 1))) >>> (ZW - PW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];
endmodule
