// tb_record_memory: three channels, 16-word banks, one stored word per two
// ticks. Channels 0 and 2 record together until "stop all"; channel 0 is then
// re-armed and records until its bank fills (full flag, recording stops by
// itself) while channel 2 keeps its words; channel 1 is never armed. Each bank is played back and must return exactly the
// words a model stored, one per storage slot, then raise play_done. A stop
// during playback must end the stream early.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_record_memory;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int CH = 3, D = 16, DEC = 2;

  logic tick = 0, stop_all = 0, pstart = 0, pstop = 0;
  logic [CH-1:0] rstart = '0, rec, full;
  logic signed [15:0] din [CH];
  logic [$clog2(D+1)-1:0] len [CH];
  logic [$clog2(CH)-1:0] pch = '0;
  logic playing, pv, pdone;
  logic signed [15:0] pd;
  record_memory #(.CHANNELS(CH), .DEPTH(D), .DW(16), .DECIM(DEC)) dut (
    .clk, .rst_n, .tick, .in_data(din), .rec_start(rstart), .rec_stop_all(stop_all),
    .recording(rec), .full, .len, .play_start(pstart), .play_ch(pch), .play_stop(pstop),
    .playing, .play_valid(pv), .play_data(pd), .play_done(pdone));

  // model of what each bank should hold
  logic signed [15:0] stored [CH][$];
  logic m_rec [CH];
  int ticks = 0, n = 0, slots_between = 0, last_pv = -1;
  int got [$];
  int ndone = 0;

  always @(posedge clk) if (rst_n) begin
    if (tick) begin
      if (ticks % DEC == 0)
        for (int c = 0; c < CH; c++) if (m_rec[c] && stored[c].size() < D) stored[c].push_back(din[c]);
      ticks++;
    end
    if (pv) got.push_back(int'(pd));
    if (pdone) ndone++;
  end

  // ticks every 4 clocks; input words change every tick
  initial forever begin
    @(negedge clk); tick = (n % 4 == 0); n++;
    if (tick) for (int c = 0; c < CH; c++) din[c] = 16'(c * 1000 + n);
  end

  task automatic ticks_wait(input int k);
    repeat (k * 4) @(negedge clk);
  endtask

  task automatic play(input int c, input int expect_n, input bit stop_early);
    got.delete(); ndone = 0;
    @(negedge clk); pstart = 1; pch = c[$clog2(CH)-1:0];
    @(negedge clk); pstart = 0;
    if (stop_early) begin
      ticks_wait(6); @(negedge clk); pstop = 1; @(negedge clk); pstop = 0;
      ticks_wait(4);
      checks++; if (playing || got.size() >= expect_n || got.size() == 0) begin failures++; $display("stop: playing %b got %0d", playing, got.size()); end
      for (int i = 0; i < got.size(); i++) begin checks++; if (got[i] != stored[c][i]) failures++; end
      return;
    end
    ticks_wait(DEC * (expect_n + 3));
    checks++; if (got.size() != expect_n) begin failures++; $display("ch%0d played %0d words, exp %0d", c, got.size(), expect_n); end
    checks++; if (ndone != 1 || playing) begin failures++; $display("ch%0d play_done %0d playing %b", c, ndone, playing); end
    for (int i = 0; i < got.size() && i < stored[c].size(); i++) begin
      checks++;
      if (got[i] != stored[c][i]) begin failures++; if (failures < 10) $display("ch%0d word %0d got %0d exp %0d", c, i, got[i], stored[c][i]); end
    end
  endtask

  initial begin
    foreach (m_rec[c]) m_rec[c] = 0;
    foreach (din[c]) din[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    ticks_wait(3);
    // arm channels 0 and 2 (the model follows from the next clock)
    @(negedge clk); rstart = 3'b101; @(posedge clk); #1 rstart = '0; m_rec[0] = 1; m_rec[2] = 1;
    ticks_wait(2 * 7);
    @(negedge clk); stop_all = 1; @(posedge clk); #1 stop_all = 0; m_rec[0] = 0; m_rec[2] = 0;
    checks++; if (rec != 3'b000 || len[0] == 0 || len[2] == 0) begin failures++; $display("after stop-all recording=%b", rec); end
    // re-arm channel 0 alone: it starts again from an empty bank and runs until full
    @(negedge clk); rstart = 3'b001; @(posedge clk); #1 rstart = '0; stored[0].delete(); m_rec[0] = 1;
    ticks_wait(2 * D + 4);
    checks++; if (!full[0] || rec[0] || len[0] != D) begin failures++; $display("ch0 full %b rec %b len %0d", full[0], rec[0], len[0]); end
    checks++; if (full[2] || len[2] != stored[2].size() || len[2] == 0) begin failures++; $display("ch2 full %b len %0d model %0d", full[2], len[2], stored[2].size()); end
    checks++; if (len[1] != 0 || full[1] || rec[1]) begin failures++; $display("ch1 touched"); end
    play(0, D, 0);
    play(2, stored[2].size(), 0);
    play(1, 0, 0);
    play(0, D, 1);
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
