// tb_spi_slave: a mode-0 master (SCK period 20 system clocks, MSB first)
// sends 200 random bytes. Every byte must appear on rx_byte with one
// rx_valid pulse, at most 4 clocks after the eighth rising SCK edge. The
// byte the slave returns in transfer k+1 must be the tx_byte presented after
// transfer k (here rx+1); the first transfer returns the byte present at
// slave select.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_spi_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sck = 0, ss_n = 1, mosi = 0, miso, rxv;
  logic [7:0] tx = 8'hC8, rxb;
  spi_slave dut (.clk, .rst_n, .sck, .ss_n, .mosi, .miso, .tx_byte(tx), .rx_valid(rxv), .rx_byte(rxb));

  int nrx = 0, last_edge = 0, cyc = 0;
  logic [7:0] rx_log [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && rxv) begin
      rx_log.push_back(rxb);
      tx <= rxb + 8'd1;          // the response for the next transfer
      checks++; if (cyc - last_edge > 5) begin failures++; $display("rx_valid %0d clocks after last edge", cyc - last_edge); end
    end
  end

  task automatic xfer(input logic [7:0] mo, output logic [7:0] mi);
    for (int b = 7; b >= 0; b--) begin
      mosi = mo[b];
      repeat (10) @(negedge clk);
      sck = 1; mi[b] = miso; last_edge = cyc;
      repeat (10) @(negedge clk);
      sck = 0;
    end
    repeat (6) @(negedge clk);
  endtask

  logic [7:0] sent [$], got;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    ss_n = 0; repeat (10) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      sent.push_back(8'($urandom));
      xfer(sent[k], got);
      checks++;
      if (k == 0 ? got != 8'hC8 : got != sent[k-1] + 8'd1) begin
        failures++; if (failures < 10) $display("xfer %0d miso %h", k, got);
      end
      if (k == 99) begin ss_n = 1; repeat (20) @(negedge clk); ss_n = 0; repeat (10) @(negedge clk); end
    end
    ss_n = 1;
    repeat (10) @(negedge clk);
    checks++; if (rx_log.size() != 200) begin failures++; $display("%0d bytes received", rx_log.size()); end
    foreach (rx_log[k]) begin checks++; if (rx_log[k] != sent[k]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
