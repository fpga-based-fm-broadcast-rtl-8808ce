// record_memory: multi-channel audio recorder with single-channel playback.
//
// Every channel owns a bank of DEPTH words, so any number of channels can be
// recorded at the same time, which is the point of the monitor. All
// channels' audio arrives together on each tick (the audio-rate strobe of
// the demodulators); one tick in DECIM is a storage slot, so the stored rate
// is the audio rate / DECIM (250 kSPS / 5 = 50 kSPS at the defaults,
// enough for the 15 kHz mono band once it has been low-pass filtered).
//
// Recording: rec_start[c] starts a new recording of channel c from address 0;
// on each slot every recording channel writes one word. A bank that fills
// up stops by itself and raises full[c] (overflow; the recording is kept).
// rec_stop_all ends every recording. len[c] is the recorded length.
// Playback: play_start with play_ch replays that bank from address 0, one
// word per slot on play_data / play_valid, up to its length; play_done
// pulses after the last word, and play_stop ends it early.
// Recording to memory is the document's; bank layout, depth and rates are
// this design's choice. Each bank is a simple dual-port RAM.
module record_memory #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned DW       = 16,
  parameter int unsigned DECIM    = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tick,
  input  logic signed [DW-1:0]          in_data [CHANNELS],
  input  logic [CHANNELS-1:0]           rec_start,
  input  logic                          rec_stop_all,
  output logic [CHANNELS-1:0]           recording,
  output logic [CHANNELS-1:0]           full,
  output logic [$clog2(DEPTH+1)-1:0]    len [CHANNELS],
  input  logic                          play_start,
  input  logic [$clog2(CHANNELS)-1:0]   play_ch,
  input  logic                          play_stop,
  output logic                          playing,
  output logic                          play_valid,
  output logic signed [DW-1:0]          play_data,
  output logic                          play_done
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH + 1);
  localparam int unsigned DC = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [DC-1:0] dcnt;
  logic          slot;
  assign slot = tick && (dcnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dcnt <= '0;
    else if (tick) dcnt <= (dcnt == DC'(DECIM - 1)) ? '0 : dcnt + 1'b1;
  end

  // recording, one bank per channel
  logic [DW-1:0] rd_word [CHANNELS];
  logic [LW-1:0] rd_ptr;   // one bit wider than the address so a full bank can be read out
  logic          rd_en;

  for (genvar c = 0; c < CHANNELS; c++) begin : g_bank
    logic [DW-1:0] mem [DEPTH];
    logic          we;
    assign we = slot && recording[c];

    always_ff @(posedge clk) begin
      if (we)    mem[AW'(len[c])] <= in_data[c];
      if (rd_en) rd_word[c] <= mem[AW'(rd_ptr)];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        recording[c] <= 1'b0; full[c] <= 1'b0; len[c] <= '0;
      end else if (rec_start[c]) begin
        recording[c] <= 1'b1; full[c] <= 1'b0; len[c] <= '0;
      end else if (rec_stop_all) begin
        recording[c] <= 1'b0;
      end else if (we) begin
        len[c] <= len[c] + 1'b1;
        if (len[c] == LW'(DEPTH - 1)) begin
          recording[c] <= 1'b0;
          full[c]      <= 1'b1;
        end
      end
    end
  end

  // playback
  logic [$clog2(CHANNELS)-1:0] pch;
  logic                        rd_pend;
  assign rd_en = playing && slot && (rd_ptr < len[pch]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      playing <= 1'b0; pch <= '0; rd_ptr <= '0; rd_pend <= 1'b0;
      play_valid <= 1'b0; play_data <= '0; play_done <= 1'b0;
    end else begin
      play_valid <= 1'b0;
      play_done  <= 1'b0;
      rd_pend    <= rd_en;
      if (rd_pend) begin
        play_valid <= 1'b1;
        play_data  <= rd_word[pch];
      end
      if (play_start) begin
        playing <= 1'b1; pch <= play_ch; rd_ptr <= '0;
      end else if (play_stop) begin
        playing <= 1'b0;
      end else if (playing) begin
        if (rd_en) rd_ptr <= rd_ptr + 1'b1;
        // finished once every stored word has been read and delivered
        if (!rd_en && !rd_pend && rd_ptr >= len[pch] && slot) begin
          playing   <= 1'b0;
          play_done <= 1'b1;
        end
      end
    end
  end
endmodule
