// tb_command_controller: drives command bytes as the SPI slave would present
// them and checks the reply byte loaded for the next transfer and the
// control strobes: link-OK status after reset, sense start and busy/done
// status, the frequency list (count, then two bytes per channel, low byte
// first), stream/playback/record with their channel byte, record stop-all and
// the idle command.
//
// The expected values are worked out here, independently of the RTL; the
// rates and sizes checked follow the original description where it gives
// them, and the stimulus, reduced sizes and tolerances are this testbench's
// own choices.
module tb_command_controller;
  import fm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int CH = 8;

  logic rxv = 0, sbusy = 0, sdone = 0;
  logic [7:0] rxb = '0, txb, lastc;
  logic sstart, sen, pstart, pstop, rstop;
  logic [2:0] sch, pch;
  logic [CH-1:0] rstart;
  peak_t peaks [CH];
  logic [3:0] nf = 4'd5;
  command_controller #(.CHANNELS(CH)) dut (
    .clk, .rst_n, .rx_valid(rxv), .rx_byte(rxb), .tx_byte(txb),
    .sense_start(sstart), .sense_busy(sbusy), .sense_done(sdone), .peaks, .num_found(nf),
    .stream_en(sen), .stream_ch(sch), .play_start(pstart), .play_stop(pstop), .play_ch(pch),
    .rec_start(rstart), .rec_stop_all(rstop), .last_cmd(lastc));

  int n_sstart = 0, n_pstart = 0, n_pstop = 0, n_rstop = 0;
  logic [CH-1:0] rs_seen = '0;
  always @(posedge clk) if (rst_n) begin
    n_sstart += sstart; n_pstart += pstart; n_pstop += pstop; n_rstop += rstop; rs_seen |= rstart;
  end

  task automatic send(input logic [7:0] b, input logic [7:0] exp_reply);
    @(negedge clk); rxv = 1; rxb = b;
    @(negedge clk); rxv = 0;
    checks++;
    if (txb !== exp_reply) begin failures++; $display("cmd %0d: reply %0d exp %0d", b, txb, exp_reply); end
    repeat (3) @(negedge clk);
  endtask

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    foreach (peaks[i]) begin peaks[i].freq = 16'h1000 * i + 16'h0123 + i; peaks[i].bin = 11'(i); peaks[i].pwr = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    chk(txb == ST_LINK_OK, "link ok after reset");
    send(CMD_SENSE, ST_BUSY);
    chk(n_sstart == 1, "sense start");
    sbusy = 1; repeat (2) @(negedge clk);
    chk(txb == ST_BUSY, "busy status");
    send(CMD_SENSE, ST_BUSY);
    chk(n_sstart == 1, "no restart while busy");
    sbusy = 0; sdone = 1; @(negedge clk); sdone = 0; repeat (2) @(negedge clk);
    chk(txb == ST_DONE, "done status");
    // frequency list
    send(CMD_SEND_FREQS, 8'd5);
    for (int i = 0; i < 2 * CH; i++)
      send(CMD_SEND_FREQS, (i % 2 == 0) ? peaks[i/2].freq[7:0] : peaks[i/2].freq[15:8]);
    send(CMD_SEND_FREQS, ST_DONE);
    send(CMD_IDLE, ST_DONE);
    chk(n_pstop == 1 && !sen, "idle stops audio");
    // stream channel 3
    send(CMD_STREAM, ST_DONE); chk(!sen, "stream waits for channel");
    send(8'd3, ST_DONE);       chk(sen && sch == 3 && n_pstop == 2, "stream ch3");
    // record channels 1 and 6, then stop all
    send(CMD_RECORD, ST_DONE); send(8'd1, ST_DONE);
    send(CMD_RECORD, ST_DONE); send(8'd6, ST_DONE);
    chk(rs_seen == 8'b0100_0010, "record start ch1, ch6");
    send(CMD_REC_STOP, ST_DONE); chk(n_rstop == 1, "record stop all");
    // playback channel 6
    send(CMD_PLAYBACK, ST_DONE); send(8'd6, ST_DONE);
    chk(n_pstart == 1 && pch == 6 && !sen, "playback ch6");
    chk(lastc == 8'd6, "last byte");
    send(CMD_IDLE, ST_DONE);
    chk(n_pstop == 3, "idle stops playback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
