// tb_peak_detector: feeds magnitude spectra (noise floor plus carriers with
// side lobes) and compares the result with a reference model written here:
// max, min, midrange (max+min)/2, bins strictly above it noted in bin order
// up to 20, stable sort by falling magnitude, the 8 strongest reported with
// frequency bin*5. Covers fewer than 8 carriers, more than 20 candidates
// and the full 1024-bin size, and checks the processing time after the last
// magnitude: NBINS + 3 cycles of threshold pass, (20-1)^2 of sorting, 2 more.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_peak_detector;
  import fm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 64, NL = 1024;
  logic start_s = 0, mv_s = 0, start_l = 0, mv_l = 0;
  logic [23:0] mag_s = '0, mag_l = '0;
  logic busy_s, done_s, busy_l, done_l;
  peak_t pk_s [8], pk_l [8];
  logic [3:0] nf_s, nf_l;
  logic [23:0] mx_s, mn_s, md_s, mx_l, mn_l, md_l;
  peak_detector #(.NBINS(NS)) dut_s (.clk, .rst_n, .start(start_s), .mag_valid(mv_s), .mag(mag_s),
    .busy(busy_s), .done(done_s), .peaks(pk_s), .num_found(nf_s), .max_mag(mx_s), .min_mag(mn_s), .midrange(md_s));
  peak_detector #(.NBINS(NL)) dut_l (.clk, .rst_n, .start(start_l), .mag_valid(mv_l), .mag(mag_l),
    .busy(busy_l), .done(done_l), .peaks(pk_l), .num_found(nf_l), .max_mag(mx_l), .min_mag(mn_l), .midrange(md_l));

  int spec [NL];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(input bit is_big, input int ncar, input int floor_hi);
    int n = is_big ? NL : NS;
    int mx = 0, mn = 32'h7fffffff, mid, nc = 0, t_last, t_done;
    int cb [20], cp [20];
    // spectrum
    for (int b = 0; b < n; b++) spec[b] = $urandom_range(10, floor_hi);
    for (int c = 0; c < ncar; c++) begin
      int b = $urandom_range(2, n - 3);
      int p = $urandom_range(200000, 4000000);
      spec[b] = p; spec[b-1] = p / 3 + $urandom_range(0, 999); spec[b+1] = p / 4 + $urandom_range(0, 999);
    end
    // reference
    for (int b = 0; b < n; b++) begin if (spec[b] > mx) mx = spec[b]; if (spec[b] < mn) mn = spec[b]; end
    mid = (mx + mn) / 2;
    for (int b = 0; b < n; b++) if (spec[b] > mid && nc < 20) begin cb[nc] = b; cp[nc] = spec[b]; nc++; end
    for (int i = nc; i < 20; i++) begin cb[i] = 0; cp[i] = 0; end
    for (int i = 0; i < 19; i++)                // stable insertion-style bubble
      for (int j = 0; j < 19; j++)
        if (cp[j] < cp[j+1]) begin int tb = cb[j], tp = cp[j]; cb[j] = cb[j+1]; cp[j] = cp[j+1]; cb[j+1] = tb; cp[j+1] = tp; end
    // drive
    @(negedge clk); if (is_big) start_l = 1; else start_s = 1;
    @(negedge clk); start_l = 0; start_s = 0;
    for (int b = 0; b < n; b++) begin
      if ($urandom_range(0, 3) == 0) @(negedge clk);   // gaps
      if (is_big) begin mv_l = 1; mag_l = 24'(spec[b]); end else begin mv_s = 1; mag_s = 24'(spec[b]); end
      @(negedge clk); mv_l = 0; mv_s = 0;
    end
    t_last = cyc;
    while (!(is_big ? done_l : done_s)) @(posedge clk);
    t_done = cyc;
    #1;
    checks++;
    if ((is_big ? md_l : md_s) != 24'(mid) || (is_big ? mx_l : mx_s) != 24'(mx) || (is_big ? mn_l : mn_s) != 24'(mn)) begin
      failures++; $display("mid/max/min %0d %0d %0d exp %0d %0d %0d", is_big ? md_l : md_s, is_big ? mx_l : mx_s, is_big ? mn_l : mn_s, mid, mx, mn);
    end
    checks++;
    if ((is_big ? nf_l : nf_s) != 4'((nc > 8) ? 8 : nc)) begin failures++; $display("num_found %0d exp %0d", is_big ? nf_l : nf_s, nc); end
    for (int i = 0; i < 8; i++) begin
      peak_t p = is_big ? pk_l[i] : pk_s[i];
      checks++;
      if (p.bin != 11'(cb[i]) || p.pwr != 24'(cp[i]) || p.freq != 16'(cb[i] * 5)) begin
        failures++; $display("peak %0d: bin %0d pwr %0d freq %0d exp bin %0d pwr %0d", i, p.bin, p.pwr, p.freq, cb[i], cp[i]);
      end
    end
    checks++;
    if (t_done - t_last != n + 3 + 19 * 19 + 2) begin failures++; $display("time %0d exp %0d", t_done - t_last, n + 366); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 3, 1000);     // few carriers
    run(0, 6, 1000);
    run(0, 0, 100000);   // noise only: many bins above midrange -> capped at 20
    run(1, 8, 3000);     // full size, 8 carriers with side lobes
    run(1, 12, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
