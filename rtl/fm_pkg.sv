// fm_pkg: constants and types shared by the FM broadcast monitor.
//
// The command codes 0..4 are the ones the user-interface microcontroller sends
// over SPI (idle/stop, sense, send frequencies, stream, playback). Codes 5 and
// 6 (record a channel, stop recording) are this design's own additions, since
// the record command has no code of its own on the microcontroller side. The
// status bytes follow the interface description: 200 answers a fresh link,
// 0 reports a finished sensing run; 1 (busy) is this design's choice.
package fm_pkg;

  localparam int unsigned ADC_W  = 12;   // AD6640 resolution
  localparam int unsigned FREQ_W = 16;   // detected frequency, MHz in Q6.10
  localparam int unsigned MAG_W  = 24;   // magnitude-spectrum word

  typedef enum logic [7:0] {
    CMD_IDLE       = 8'd0,  // stop streaming / playback, return status
    CMD_SENSE      = 8'd1,  // start spectrum sensing
    CMD_SEND_FREQS = 8'd2,  // read out the detected channel list
    CMD_STREAM     = 8'd3,  // + channel byte: stream that channel to the PWM
    CMD_PLAYBACK   = 8'd4,  // + channel byte: play a recorded channel
    CMD_RECORD     = 8'd5,  // + channel byte: start recording that channel
    CMD_REC_STOP   = 8'd6   // stop all recording
  } cmd_e;

  localparam logic [7:0] ST_LINK_OK = 8'd200;  // no sensing run finished yet
  localparam logic [7:0] ST_DONE    = 8'd0;    // sensing finished, list valid
  localparam logic [7:0] ST_BUSY    = 8'd1;    // sensing in progress

  // One detected channel: frequency for the display, FFT bin for tuning,
  // and the magnitude that ranked it.
  typedef struct packed {
    logic [FREQ_W-1:0] freq;
    logic [10:0]       bin;
    logic [MAG_W-1:0]  pwr;
  } peak_t;

endpackage
