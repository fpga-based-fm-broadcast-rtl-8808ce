// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the one-cycle read latency, full/empty flags and the fill count.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_sync_fifo;
  localparam int unsigned D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 1'b0, wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [23:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.W(24), .DEPTH(D)) dut (.*);

  logic [23:0] q [$];
  logic        exp_v = 1'b0;
  bit          wok;
  logic [23:0] exp_d;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check previous read
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_d) begin failures++; $display("data %h exp %h", rd_data, exp_d); end
      end
      checks++;
      if (count != q.size() || full != (q.size() == D) || empty != (q.size() == 0)) begin
        failures++; $display("flags count=%0d model=%0d", count, q.size());
      end
      wr_en   = ($urandom_range(0, 99) < (i < 1500 ? 60 : 35));
      rd_en   = ($urandom_range(0, 99) < (i < 1500 ? 35 : 60));
      wr_data = 24'($urandom);
      exp_v   = rd_en && q.size() > 0;
      wok     = wr_en && q.size() < D;
      if (exp_v) exp_d = q[0];
      @(posedge clk);
      if (exp_v) void'(q.pop_front());
      if (wok) q.push_back(wr_data);
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
