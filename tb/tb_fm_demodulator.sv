// tb_fm_demodulator: a 1.3 MHz carrier at fs = 10 MSPS is frequency
// modulated with a staircase of deviations (+50, -30, 0, +75, -75 kHz) and a
// 10 kHz sine. With the oscillator tuned to the carrier, each settled output
// must equal deviation * R / fs * 2^16 (1 LSB = 3.815 Hz) within 0.5 %, and
// for the sine the output must follow 5 kHz * sin(...) after the pipeline
// delay. One output per R = 40 inputs.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_fm_demodulator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 10.0e6, FC = 1.3e6;

  logic iv = 0, ov;
  logic signed [15:0] x = '0, fo;
  logic [31:0] ftw;
  assign ftw = 32'($rtoi(FC / FS * 4294967296.0));
  fm_demodulator #(.IW(16), .R(40), .CIC_N(3)) dut (.clk, .rst_n, .ftw, .in_valid(iv), .in_data(x), .out_valid(ov), .freq_out(fo));

  real ph = 0.0, dev = 0.0;
  int  nin = 0, nout = 0;
  real last_out;
  always @(posedge clk) if (rst_n && ov) begin nout++; last_out = real'(fo); end

  task automatic step(input real d, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); iv = 1;
      x = 16'($rtoi(12000.0 * $cos(ph)));
      ph += 2.0 * PI * (FC + d) / FS;
      if (ph > 2.0 * PI) ph -= 2.0 * PI;
      nin++;
      @(negedge clk); iv = 0;
    end
  endtask

  real devs [5] = '{50.0e3, -30.0e3, 0.0, 75.0e3, -75.0e3};
  real expv;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (devs[k]) begin
      step(devs[k], 40 * 30);
      expv = devs[k] * 40.0 / FS * 65536.0;
      checks++;
      if (fabs(last_out - expv) > 0.005 * fabs(expv) + 3.0) begin
        failures++; $display("dev %f: out %f exp %f", devs[k], last_out, expv);
      end
    end
    // 10 kHz tone, 5 kHz deviation: compare peak output with 5 kHz
    begin
      real pk = 0.0;
      for (int i = 0; i < 40 * 100; i++) begin
        step(5.0e3 * $sin(2.0 * PI * 10.0e3 * i / FS), 1);
        if (i > 40 * 20 && fabs(last_out) > pk) pk = fabs(last_out);
      end
      expv = 5.0e3 * 40.0 / FS * 65536.0;
      checks++;
      if (pk < 0.9 * expv || pk > 1.05 * expv) begin failures++; $display("tone peak %f exp %f", pk, expv); end
    end
    repeat (60) @(posedge clk);
    checks++; if (nout != nin / 40) begin failures++; $display("outputs %0d for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
