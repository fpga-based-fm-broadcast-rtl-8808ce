// command_controller: interprets the one-byte commands of the user interface.
//
// Each byte received over SPI is a command code (fm_pkg::cmd_e):
//   0 IDLE       stop streaming and playback
//   1 SENSE      start a spectrum-sensing run (ignored while one is running)
//   2 SEND_FREQS read out the channel list, one byte per transfer
//   3 STREAM     the next byte is a channel index; stream it to the PWM
//   4 PLAYBACK   the next byte is a channel index; replay its recording
//   5 RECORD     the next byte is a channel index; start recording it
//   6 REC_STOP   stop every recording
// The byte returned in each transfer (tx_byte, shifted out during the next
// transfer) is the status: 200 until the first sensing run has finished,
// 1 while one runs, 0 once the list is valid. A run of SEND_FREQS commands
// returns, after the status, the number of detected channels and then the
// NPEAKS frequencies, low byte first, each in MHz with 10 fraction bits
// (MHz = value / 1024); after the list the status is returned again.
// Codes 0..4, the status values 200 and 0 and the frequency format are the
// document's; the channel-index byte, codes 5 and 6 and the busy status are
// this design's choice. Unknown codes are ignored.
module command_controller
  import fm_pkg::*;
#(
  parameter int unsigned CHANNELS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rx_valid,
  input  logic [7:0]                    rx_byte,
  output logic [7:0]                    tx_byte,
  // spectrum sensing
  output logic                          sense_start,
  input  logic                          sense_busy,
  input  logic                          sense_done,
  input  peak_t                         peaks [CHANNELS],
  input  logic [$clog2(CHANNELS+1)-1:0] num_found,
  // audio routing
  output logic                          stream_en,
  output logic [$clog2(CHANNELS)-1:0]   stream_ch,
  output logic                          play_start,
  output logic                          play_stop,
  output logic [$clog2(CHANNELS)-1:0]   play_ch,
  output logic [CHANNELS-1:0]           rec_start,
  output logic                          rec_stop_all,
  output logic [7:0]                    last_cmd
);
  localparam int unsigned CHW = $clog2(CHANNELS);
  localparam int unsigned NB  = 2 * CHANNELS;   // bytes of the frequency list

  typedef enum logic [1:0] {A_NONE, A_STREAM, A_PLAY, A_REC} arg_e;
  arg_e pending;

  logic       ever_done;
  logic       in_list;
  logic [$clog2(NB+1)-1:0] list_idx;
  logic [7:0] status;

  assign status = sense_busy ? ST_BUSY : (ever_done ? ST_DONE : ST_LINK_OK);

  function automatic logic [7:0] list_byte(input int unsigned i, input peak_t p [CHANNELS]);
    logic [FREQ_W-1:0] f;
    f = p[i/2].freq;
    return (i % 2 == 0) ? f[7:0] : f[15:8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= A_NONE; ever_done <= 1'b0; in_list <= 1'b0; list_idx <= '0;
      tx_byte <= ST_LINK_OK; sense_start <= 1'b0; stream_en <= 1'b0; stream_ch <= '0;
      play_start <= 1'b0; play_stop <= 1'b0; play_ch <= '0; rec_start <= '0;
      rec_stop_all <= 1'b0; last_cmd <= '0;
    end else begin
      sense_start  <= 1'b0;
      play_start   <= 1'b0;
      play_stop    <= 1'b0;
      rec_start    <= '0;
      rec_stop_all <= 1'b0;
      if (sense_done) ever_done <= 1'b1;
      if (!rx_valid) begin
        if (!in_list) tx_byte <= status;
      end else begin
        last_cmd <= rx_byte;
        if (pending != A_NONE) begin
          // argument byte: channel index
          unique case (pending)
            A_STREAM: begin stream_en <= 1'b1; stream_ch <= CHW'(rx_byte); play_stop <= 1'b1; end
            A_PLAY:   begin play_start <= 1'b1; play_ch <= CHW'(rx_byte); stream_en <= 1'b0; end
            A_REC:    rec_start[CHW'(rx_byte)] <= 1'b1;
            default: ;
          endcase
          pending <= A_NONE;
          in_list <= 1'b0;
          tx_byte <= status;
        end else begin
          in_list <= 1'b0;
          tx_byte <= status;
          unique case (rx_byte)
            CMD_IDLE:  begin stream_en <= 1'b0; play_stop <= 1'b1; end
            CMD_SENSE: if (!sense_busy) begin sense_start <= 1'b1; tx_byte <= ST_BUSY; end
            CMD_SEND_FREQS: begin
              if (!in_list) begin
                in_list  <= 1'b1;
                list_idx <= '0;
                tx_byte  <= 8'(num_found);
              end else if (list_idx < ($clog2(NB+1))'(NB)) begin
                in_list  <= 1'b1;
                tx_byte  <= list_byte(32'(list_idx), peaks);
                list_idx <= list_idx + 1'b1;
              end
            end
            CMD_STREAM:   pending <= A_STREAM;
            CMD_PLAYBACK: pending <= A_PLAY;
            CMD_RECORD:   pending <= A_REC;
            CMD_REC_STOP: rec_stop_all <= 1'b1;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
