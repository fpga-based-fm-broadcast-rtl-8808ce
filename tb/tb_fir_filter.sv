// tb_fir_filter: random coefficients and random input with gaps; each output
// must equal the direct convolution sum_k coef[k]*x[n-k], rounded
// (>> SHIFT, half up) and saturated, exactly, one clock after its input.
// Run at 33 taps and at 1000 taps (the channel filter size).
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_fir_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 33, NB = 1000;
  logic iv = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [15:0] ca [NA], cb [NB];
  logic ova, ovb;
  logic signed [15:0] ya, yb;
  fir_filter #(.NTAPS(NA), .DW(16), .CW(16), .OW(16), .SHIFT(15)) dut_a (.clk, .rst_n, .in_valid(iv), .in_data(x), .coef(ca), .out_valid(ova), .out_data(ya));
  fir_filter #(.NTAPS(NB), .DW(16), .CW(16), .OW(16), .SHIFT(18)) dut_b (.clk, .rst_n, .in_valid(iv), .in_data(x), .coef(cb), .out_valid(ovb), .out_data(yb));

  longint hist [$];

  function automatic longint expect_y(input int n, input int sh, input bit big);
    longint acc = 0, r;
    for (int k = 0; k < n; k++) if (k < hist.size()) acc += longint'(big ? cb[k] : ca[k]) * hist[hist.size() - 1 - k];
    r = (acc + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    for (int k = 0; k < NA; k++) ca[k] = 16'($urandom_range(0, 65535));
    for (int k = 0; k < NB; k++) cb[k] = 16'($urandom_range(0, 2047) - 1024);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint ea, eb;
      @(negedge clk);
      iv = 1'b1; x = 16'($urandom_range(0, 65535));
      hist.push_back(longint'(x));
      ea = expect_y(NA, 15, 0);
      eb = expect_y(NB, 18, 1);
      @(negedge clk);
      iv = 1'b0;
      checks++;
      if (!ova || !ovb || longint'(ya) != ea || longint'(yb) != eb) begin
        failures++; if (failures < 10) $display("n=%0d ya %0d exp %0d yb %0d exp %0d", i, ya, ea, yb, eb);
      end
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk); checks++; if (ova) begin failures++; $display("spurious valid"); end
      end
    end
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
