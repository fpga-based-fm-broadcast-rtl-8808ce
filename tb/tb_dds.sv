// tb_dds: for several tuning words, checks each sine/cosine output against
// sin/cos of the accumulated phase computed here (the outputs belong to the
// phase before each update). The error bound is set by the 12-bit table
// address (2*pi/4096 of full scale, about 50 LSB), and the outputs may not
// change while en is low.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_dds;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  localparam real PI = 3.14159265358979323846;

  logic en = 0;
  logic [31:0] ftw = '0;
  logic signed [15:0] c, s;
  dds #(.PHW(32), .LUTA(10), .OW(16)) dut (.clk, .rst_n, .en, .ftw, .cos_out(c), .sin_out(s));

  longint unsigned ph;
  real a, es, ec;
  logic signed [15:0] hc, hs;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    ph = 0;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      ftw = (t == 0) ? 32'h0100_0000 : (t == 1) ? 32'd429496730 : 32'($urandom);
      for (int i = 0; i < 500; i++) begin
        @(negedge clk); en = 1;
        a  = 2.0 * PI * real'(ph) / 4294967296.0;
        es = 32767.0 * $sin(a); ec = 32767.0 * $cos(a);
        ph = (ph + ftw) & 64'hFFFF_FFFF;
        @(negedge clk); en = 0;
        checks++;
        if (fabs(real'(s) - es) > 60.0 || fabs(real'(c) - ec) > 60.0) begin
          failures++; if (failures < 10) $display("ftw %h: sin %0d exp %f cos %0d exp %f", ftw, s, es, c, ec);
        end
        hc = c; hs = s;
        @(negedge clk);
        checks++; if (c != hc || s != hs) begin failures++; $display("changed while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
