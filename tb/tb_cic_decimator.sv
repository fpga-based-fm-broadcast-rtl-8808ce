// tb_cic_decimator: random input with gaps through an N=3, R=40 decimator,
// compared sample for sample with an integer model of the same
// pipelined integrator/comb recursion and output scaling (keep the top 16 of 34 bits);
// one output per 40 inputs. A constant input then checks the DC gain
// 40^3 / 2^18.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_cic_decimator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, ov;
  logic signed [15:0] x = '0, y;
  cic_decimator #(.IW(16), .OW(16), .NSTAGES(3), .R(40)) dut (.clk, .rst_n, .in_valid(iv), .in_data(x), .out_valid(ov), .out_data(y));

  longint i1 = 0, i2 = 0, i3 = 0, c1 = 0, c2 = 0, c3 = 0, d1, d2, d3, e;
  longint exp_q [$];
  int nin = 0, nout = 0;

  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (exp_q.size() == 0 || longint'(y) != exp_q[0]) begin
      failures++; if (failures < 10) $display("out %0d got %0d exp %0d", nout, y, exp_q.size() ? exp_q[0] : 0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    nout++;
  end

  task automatic push(input int v);
    @(negedge clk); iv = 1; x = 16'(v);
    i3 += i2; i2 += i1; i1 += v; nin++;  // registered stages: each uses the previous value
    if (nin % 40 == 0) begin
      d1 = i3 - c1; c1 = i3; d2 = d1 - c2; c2 = d1; d3 = d2 - c3; c3 = d2;
      exp_q.push_back(d3 >>> 18);
    end
    @(negedge clk); iv = 0;
    if ($urandom_range(0, 3) == 0) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) push($urandom_range(0, 65535) - 32768);
    for (int i = 0; i < 400; i++) push(20000);
    repeat (5) @(negedge clk);
    checks++; if (nout != nin / 40) begin failures++; $display("outputs %0d for %0d inputs", nout, nin); end
    // settled DC gain: 20000 * 64000 / 262144 = 4882.8
    checks++; if (y < 4881 || y > 4883) begin failures++; $display("dc gain output %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
