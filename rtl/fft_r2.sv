// fft_r2: N-point radix-2 decimation-in-time FFT with burst I/O.
//
// The core works in three phases, one after the other, like a burst-mode FFT
// core. LOAD takes N real samples (one per in_valid) and writes them in
// bit-reversed order into an in-place complex store. CALC runs log2(N) stages
// of N/2 butterflies, one butterfly per clock, reading both operands and
// writing both results in the same cycle; the twiddle factors
// W^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) come from two tables computed at
// elaboration in Q2.(TW-2). UNLOAD streams bins 0..OUT_N-1 in natural order,
// one per clock, with out_idx and out_last. No scaling is applied: the word
// width DW must hold IW + log2(N) + 1 bits so no stage can overflow (24 bits
// for 12-bit samples and N = 2048).
//
// Timing: CALC takes N/2*log2(N) cycles (11264 for N = 2048), UNLOAD OUT_N
// cycles. in_ready is high only during LOAD; busy is high outside LOAD.
// The transform size, the radix-2 algorithm, fixed point and burst I/O are
// the document's; the single-butterfly in-place architecture and the widths
// are this design's choice.
module fft_r2 #(
  parameter int unsigned N     = 2048,
  parameter int unsigned IW    = 12,
  parameter int unsigned DW    = 24,
  parameter int unsigned TW    = 16,
  parameter int unsigned OUT_N = N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IW-1:0]     in_data,
  output logic                     in_ready,
  output logic                     busy,
  output logic                     out_valid,
  output logic signed [DW-1:0]     out_re,
  output logic signed [DW-1:0]     out_im,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic                     out_last
);
  localparam int unsigned LOG = $clog2(N);
  localparam int unsigned PW  = DW + TW + 1;

  typedef logic signed [TW-1:0] tw_tab_t [N/2];

  function automatic tw_tab_t make_tab(input bit is_sin);
    tw_tab_t t;
    real a, sc;
    sc = real'(longint'(1) << (TW - 2));
    for (int k = 0; k < N/2; k++) begin
      a = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      t[k] = TW'($rtoi($floor((is_sin ? $sin(a) : $cos(a)) * sc + 0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_T = make_tab(1'b0);
  localparam tw_tab_t SIN_T = make_tab(1'b1);

  initial assert (DW >= IW + LOG + 1) else $error("DW too narrow for an unscaled FFT");
  initial assert (N == (1 << LOG)) else $error("N must be a power of two");

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_UNLOAD} state_e;
  state_e state;

  logic signed [DW-1:0] mre [N];
  logic signed [DW-1:0] mim [N];

  logic [LOG-1:0]           cnt;     // load / unload index
  logic [$clog2(LOG+1)-1:0] stage;
  logic [LOG-2:0]           bfly;    // butterfly within stage

  function automatic logic [LOG-1:0] bitrev(input logic [LOG-1:0] v);
    for (int i = 0; i < LOG; i++) bitrev[i] = v[LOG-1-i];
  endfunction

  // butterfly addressing
  logic [LOG-1:0] i0, i1, half, grp_mask;
  logic [LOG-2:0] tw_k;
  always_comb begin
    half     = LOG'(1) << stage;
    grp_mask = half - 1'b1;
    // i0 = (bfly / half) * 2 * half + (bfly % half)
    i0       = ((LOG'(bfly) & ~grp_mask) << 1) | (LOG'(bfly) & grp_mask);
    i1       = i0 | half;
    tw_k     = (LOG-1)'((LOG'(bfly) & grp_mask) << (LOG - 1 - 32'(stage)));
  end

  logic signed [DW-1:0] xr0, xi0, xr1, xi1;
  logic signed [PW-1:0] pr, pi, er, ei, wc, ws;
  logic signed [DW-1:0] tr, ti;
  always_comb begin
    xr0 = mre[i0]; xi0 = mim[i0];
    xr1 = mre[i1]; xi1 = mim[i1];
    er  = PW'(xr1);          wc = PW'(COS_T[tw_k]);
    ei  = PW'(xi1);          ws = PW'(SIN_T[tw_k]);
    pr  = er * wc + ei * ws;
    pi  = ei * wc - er * ws;
    tr  = DW'((pr + (PW'(1) <<< (TW - 3))) >>> (TW - 2));
    ti  = DW'((pi + (PW'(1) <<< (TW - 3))) >>> (TW - 2));
  end

  // memory writes
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mre[bitrev(cnt)] <= DW'(in_data);
      mim[bitrev(cnt)] <= '0;
    end else if (state == S_CALC) begin
      mre[i0] <= xr0 + tr;  mim[i0] <= xi0 + ti;
      mre[i1] <= xr0 - tr;  mim[i1] <= xi0 - ti;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      stage     <= '0;
      bfly      <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_idx   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            if (stage == ($clog2(LOG+1))'(LOG - 1)) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_UNLOAD: begin
          out_valid <= 1'b1;
          out_re    <= mre[cnt];
          out_im    <= mim[cnt];
          out_idx   <= cnt;
          out_last  <= (cnt == LOG'(OUT_N - 1));
          cnt       <= cnt + 1'b1;
          if (cnt == LOG'(OUT_N - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);
endmodule
