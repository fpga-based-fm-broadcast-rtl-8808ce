// peak_detector: finds the strongest channels in a magnitude spectrum.
//
// It follows the sensing procedure of the monitor in four phases:
//   SCAN   - the NBINS magnitudes of one spectrum arrive (mag_valid), are
//            written into the spectrum memory (a FIFO) and their maximum and
//            minimum are tracked;
//   THRESH - the midrange (max + min) / 2 becomes the threshold;
//   SELECT - the spectrum is read back; every bin whose magnitude is greater
//            than the threshold is noted with its frequency and magnitude,
//            up to MAX_CAND candidates;
//   SORT   - a bubble sort, one compare-and-swap per clock, orders the
//            candidates by falling magnitude (equal magnitudes keep their
//            bin order), which pushes the weaker side-lobe bins of an FM
//            carrier down the list.
// The NPEAKS strongest then appear on peaks[] and done pulses; num_found
// counts the valid entries (the rest are zero). A bin's frequency is
// bin * FREQ_STEP, in MHz with 10 fraction bits: the bin spacing of a
// 2048-point FFT at 10 MSPS is 4.883 kHz, i.e. 5/1024 MHz.
//
// Timing: SCAN is paced by the input; SELECT takes about NBINS + 3 cycles,
// SORT (MAX_CAND-1)^2 cycles. A new start clears everything.
// The midrange threshold, the noting of bins above it, the sort by
// magnitude, the 8 reported channels, the 20 candidates and the 1024-word
// spectrum memory follow the original description. The threshold is
// (max + min) / 2 with a strict comparison, as the description's formula and
// text give them; the sort circuit and the output format are this design's.
module peak_detector
  import fm_pkg::*;
#(
  parameter int unsigned NBINS     = 1024,
  parameter int unsigned MAX_CAND  = 20,
  parameter int unsigned NPEAKS    = 8,
  parameter int unsigned FREQ_STEP = 5
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           mag_valid,
  input  logic [MAG_W-1:0]               mag,
  output logic                           busy,
  output logic                           done,
  output peak_t                          peaks [NPEAKS],
  output logic [$clog2(NPEAKS+1)-1:0]    num_found,
  output logic [MAG_W-1:0]               max_mag,
  output logic [MAG_W-1:0]               min_mag,
  output logic [MAG_W-1:0]               midrange
);
  localparam int unsigned BW = $clog2(NBINS + 1);
  localparam int unsigned CW = $clog2(MAX_CAND + 1);

  typedef enum logic [2:0] {P_IDLE, P_SCAN, P_THRESH, P_SELECT, P_SORT, P_DONE} pstate_e;
  pstate_e st;

  peak_t cand [MAX_CAND];
  logic [CW-1:0] ncand;
  logic [BW-1:0] wcnt;    // magnitudes written
  logic [BW-1:0] rcnt;    // reads issued
  logic [BW-1:0] bin_q;   // bin of the word on fifo_rd_data
  logic          rd_pending;
  logic [CW-1:0] sj, spass;

  // spectrum memory
  logic                 fifo_rd;
  logic [MAG_W-1:0]     fifo_q;
  logic                 fifo_full, fifo_empty;
  logic [$clog2(NBINS+1)-1:0] fifo_count;
  sync_fifo #(.W(MAG_W), .DEPTH(NBINS)) u_spectrum_mem (
    .clk, .rst_n, .clear(start),
    .wr_en(st == P_SCAN && mag_valid), .wr_data(mag),
    .rd_en(fifo_rd), .rd_data(fifo_q),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );
  assign fifo_rd = (st == P_SELECT) && !fifo_empty && (rcnt < BW'(NBINS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; ncand <= '0; wcnt <= '0; rcnt <= '0; bin_q <= '0;
      rd_pending <= 1'b0; sj <= '0; spass <= '0; done <= 1'b0;
      max_mag <= '0; min_mag <= '1; midrange <= '0; num_found <= '0;
      for (int i = 0; i < MAX_CAND; i++) cand[i] <= '0;
      for (int i = 0; i < NPEAKS; i++) peaks[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st <= P_SCAN; ncand <= '0; wcnt <= '0; rcnt <= '0;
        rd_pending <= 1'b0; sj <= '0; spass <= '0;
        max_mag <= '0; min_mag <= '1;
        for (int i = 0; i < MAX_CAND; i++) cand[i] <= '0;
      end else begin
        unique case (st)
          P_IDLE: ;
          P_SCAN: if (mag_valid) begin
            if (mag > max_mag) max_mag <= mag;
            if (mag < min_mag) min_mag <= mag;
            wcnt <= wcnt + 1'b1;
            if (wcnt == BW'(NBINS - 1)) st <= P_THRESH;
          end
          P_THRESH: begin
            midrange <= MAG_W'(({1'b0, max_mag} + {1'b0, min_mag}) >> 1);
            st       <= P_SELECT;
          end
          P_SELECT: begin
            rd_pending <= fifo_rd;
            if (fifo_rd) begin
              rcnt  <= rcnt + 1'b1;
              bin_q <= rcnt;
            end
            if (rd_pending && fifo_q > midrange && ncand < CW'(MAX_CAND)) begin
              cand[ncand].freq <= FREQ_W'(32'(bin_q) * FREQ_STEP);
              cand[ncand].bin  <= 11'(bin_q);
              cand[ncand].pwr  <= fifo_q;
              ncand            <= ncand + 1'b1;
            end
            if (!fifo_rd && !rd_pending && rcnt == BW'(NBINS)) st <= P_SORT;
          end
          P_SORT: begin
            if (spass == CW'(MAX_CAND - 1)) begin
              st <= P_DONE;
            end else begin
              if (cand[sj].pwr < cand[sj+1].pwr) begin
                cand[sj]   <= cand[sj+1];
                cand[sj+1] <= cand[sj];
              end
              if (sj == CW'(MAX_CAND - 2)) begin
                sj    <= '0;
                spass <= spass + 1'b1;
              end else begin
                sj <= sj + 1'b1;
              end
            end
          end
          P_DONE: begin
            for (int i = 0; i < NPEAKS; i++)
              peaks[i] <= (i < MAX_CAND) ? cand[i] : '0;
            num_found <= (ncand > CW'(NPEAKS)) ? ($clog2(NPEAKS+1))'(NPEAKS)
                                                : ($clog2(NPEAKS+1))'(ncand);
            done <= 1'b1;
            st   <= P_IDLE;
          end
          default: st <= P_IDLE;
        endcase
      end
    end
  end

  assign busy = (st != P_IDLE);
endmodule
