// tb_cordic_vec: random vectors in all four quadrants (and the axes) through
// the two configurations used in the design: W=24/18 iterations (spectrum
// magnitude) and W=16/16 iterations (demodulator arctan). Magnitude is
// checked against sqrt(x^2+y^2) and phase against atan2(y,x) scaled to a
// 16-bit binary angle, both computed here in floating point; out_valid must
// appear exactly ITER+1 clocks after the edge that takes the input.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_cordic_vec;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  logic iv = 1'b0;
  logic signed [23:0] xa = '0, ya = '0;
  logic signed [15:0] xb = '0, yb = '0;
  logic ova, ovb;
  logic [23:0] maga; logic [15:0] magb;
  logic signed [15:0] pha, phb;
  cordic_vec #(.W(24), .PW(16), .ITER(18)) dut_a (.clk, .rst_n, .in_valid(iv), .x(xa), .y(ya), .out_valid(ova), .mag(maga), .phase(pha));
  cordic_vec #(.W(16), .PW(16), .ITER(16)) dut_b (.clk, .rst_n, .in_valid(iv), .x(xb), .y(yb), .out_valid(ovb), .mag(magb), .phase(phb));

  typedef struct { real m; real p; int t; } exp_t;
  exp_t qa [$], qb [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real pdiff(input real a, input real b);
    real d = a - b;
    while (d > 32768.0) d -= 65536.0;
    while (d < -32768.0) d += 65536.0;
    return d;
  endfunction

  exp_t e;
  real  dm, dp;
  always @(posedge clk) if (rst_n) begin
    if (ova) begin
      e = qa.pop_front();
      dm = real'(maga) - e.m; dp = pdiff(real'(pha), e.p);
      checks++;
      if (dm > 3.0 + e.m * 1e-4 || dm < -3.0 - e.m * 1e-4 || (e.m > 64.0 && (dp > 2.0 || dp < -2.0)) || cyc - e.t != 19) begin
        failures++; if (failures < 10) $display("A: mag %0d exp %f, ph %0d exp %f, lat %0d", maga, e.m, pha, e.p, cyc - e.t);
      end
    end
    if (ovb) begin
      e = qb.pop_front();
      dm = real'(magb) - e.m; dp = pdiff(real'(phb), e.p);
      checks++;
      if (dm > 3.0 + e.m * 1e-4 || dm < -3.0 - e.m * 1e-4 || (e.m > 64.0 && (dp > 3.0 || dp < -3.0)) || cyc - e.t != 17) begin
        failures++; if (failures < 10) $display("B: mag %0d exp %f, ph %0d exp %f, lat %0d", magb, e.m, phb, e.p, cyc - e.t);
      end
    end
  end

  task automatic push(input int x24, input int y24, input int x16, input int y16);
    exp_t en;
    @(negedge clk);
    iv = 1'b1; xa = 24'(x24); ya = 24'(y24); xb = 16'(x16); yb = 16'(y16);
    en.m = $sqrt(real'(x24) * real'(x24) + real'(y24) * real'(y24));
    en.p = $atan2(real'(y24), real'(x24)) * 32768.0 / PI; en.t = cyc + 1; qa.push_back(en);
    en.m = $sqrt(real'(x16) * real'(x16) + real'(y16) * real'(y16));
    en.p = $atan2(real'(y16), real'(x16)) * 32768.0 / PI; qb.push_back(en);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    push(1000000, 0, 20000, 0);
    push(0, 1000000, 0, 20000);
    push(-1000000, 0, -20000, 0);
    push(0, -1000000, 0, -20000);
    push(-8388608, -8388608, -32768, -32768);
    push(8388607, 8388607, 32767, 32767);
    for (int i = 0; i < 2000; i++)
      push($urandom_range(0, 16777215) - 8388608, $urandom_range(0, 16777215) - 8388608,
           $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    @(negedge clk) iv = 1'b0;
    repeat (40) @(posedge clk);
    checks++; if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("missing outputs"); end
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
