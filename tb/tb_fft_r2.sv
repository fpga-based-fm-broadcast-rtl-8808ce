// tb_fft_r2: compares the FFT with a direct DFT computed here in floating
// point, for a 128-point and a full 2048-point instance, with random and
// multi-tone 12-bit inputs. Every output bin must be within a small
// tolerance (twiddle rounding), bins must come out in natural order with
// out_last on the final one, and the compute phase must take exactly
// N/2*log2(N) cycles (first output N/2*log2(N)+1 cycles after the last input).
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_fft_r2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979323846;

  // ---- small instance
  localparam int NA = 128, NB = 2048;
  logic a_iv = 1'b0, a_rdy, a_busy, a_ov, a_last;
  logic signed [11:0] a_in = '0;
  logic signed [19:0] a_re, a_im;
  logic [6:0] a_idx;
  fft_r2 #(.N(NA), .IW(12), .DW(20), .TW(16)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_in), .in_ready(a_rdy), .busy(a_busy),
    .out_valid(a_ov), .out_re(a_re), .out_im(a_im), .out_idx(a_idx), .out_last(a_last));

  logic b_iv = 1'b0, b_rdy, b_busy, b_ov, b_last;
  logic signed [11:0] b_in = '0;
  logic signed [23:0] b_re, b_im;
  logic [10:0] b_idx;
  fft_r2 #(.N(NB), .IW(12), .DW(24), .TW(16)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_in), .in_ready(b_rdy), .busy(b_busy),
    .out_valid(b_ov), .out_re(b_re), .out_im(b_im), .out_idx(b_idx), .out_last(b_last));

  int x [NB];
  real ref_re [NB], ref_im [NB];

  task automatic make_ref(input int n);
    for (int k = 0; k < n; k++) begin
      real sr = 0.0, si = 0.0;
      for (int t = 0; t < n; t++) begin
        real a = 2.0 * PI * real'((k * t) % n) / real'(n);
        sr += real'(x[t]) * $cos(a);
        si -= real'(x[t]) * $sin(a);
      end
      ref_re[k] = sr; ref_im[k] = si;
    end
  endtask

  task automatic run(input bit big, input int n, input int kind);
    int t_last_in, t_first_out, got;
    real tol, sabs;
    sabs = 0.0;
    for (int t = 0; t < n; t++) begin
      if (kind == 0) x[t] = $urandom_range(0, 4095) - 2048;
      else x[t] = $rtoi(700.0 * $cos(2.0 * PI * 37.0 * t / n) + 500.0 * $sin(2.0 * PI * 200.0 * t / n + 0.3)
                        + 300.0 * $cos(2.0 * PI * real'(n/2 - 3) * t / n));
      sabs += (x[t] < 0) ? -real'(x[t]) : real'(x[t]);
    end
    make_ref(n);
    tol = 4.0 + sabs * 3.0e-4;
    // feed with gaps
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (big) begin b_iv = 1'b1; b_in = 12'(x[t]); end else begin a_iv = 1'b1; a_in = 12'(x[t]); end
      @(negedge clk);
      b_iv = 1'b0; a_iv = 1'b0;
    end
    t_last_in = cyc - 1;
    got = 0; t_first_out = -1;
    while (got < n) begin
      @(posedge clk); #1;
      if (big ? b_ov : a_ov) begin
        real er, ei;
        int idx = big ? int'(b_idx) : int'(a_idx);
        if (t_first_out < 0) t_first_out = cyc;
        er = real'(big ? b_re : a_re) - ref_re[got];
        ei = real'(big ? b_im : a_im) - ref_im[got];
        checks++;
        if (idx != got || er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10) $display("N=%0d bin %0d idx %0d: got %0d,%0d ref %f,%f", n, got, idx,
                                      big ? b_re : a_re, big ? b_im : a_im, ref_re[got], ref_im[got]);
        end
        if (got == n - 1) begin checks++; if (!(big ? b_last : a_last)) begin failures++; $display("no out_last"); end end
        got++;
      end
    end
    checks++;
    // t_last_in is taken one clock before the last input edge, so the first
    // output, N/2*log2(N)+1 edges later, is seen N/2*log2(N)+2 counts later
    if (t_first_out - t_last_in != n / 2 * $clog2(n) + 2) begin
      failures++; $display("N=%0d latency %0d exp %0d", n, t_first_out - t_last_in, n / 2 * $clog2(n) + 2);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, NA, 0);
    run(0, NA, 1);
    run(1, NB, 1);
    run(1, NB, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
