// spi_slave: SPI slave (mode 0, 8-bit words, MSB first) for the UI link.
//
// The microcontroller is the master (2 Mbit/s in the reference set-up); the
// FPGA samples SCK, SS_n and MOSI with its own clock through short shift
// registers and acts on the detected edges, so the SPI pins never clock any
// logic. A received bit is taken on each SCK rising edge; after the eighth,
// rx_byte is presented with a one-cycle rx_valid pulse. MISO is driven from a
// transmit shift register that moves on SCK falling edges. The register is
// loaded with tx_byte when SS_n falls and again one clock after each
// rx_valid, so the byte returned in a transfer is the one the user logic
// chose after seeing the previous byte (one transfer of delay, the usual SPI
// reply convention). The bit counter resets while SS_n is high. The system
// clock must be at least 8 times the SCK rate. Oversampling, mode, word size
// and bit order are the document's; the reload point is this design's choice.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck,
  input  logic       ss_n,
  input  logic       mosi,
  output logic       miso,
  input  logic [7:0] tx_byte,
  output logic       rx_valid,
  output logic [7:0] rx_byte
);
  logic [2:0] sck_r, ss_r;
  logic [1:0] mosi_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_r <= '0; ss_r <= '1; mosi_r <= '0;
    end else begin
      sck_r  <= {sck_r[1:0], sck};
      ss_r   <= {ss_r[1:0], ss_n};
      mosi_r <= {mosi_r[0], mosi};
    end
  end

  logic sck_rise, sck_fall, active, msg_start;
  assign sck_rise  = (sck_r[2:1] == 2'b01);
  assign sck_fall  = (sck_r[2:1] == 2'b10);
  assign active    = ~ss_r[1];
  assign msg_start = (ss_r[2:1] == 2'b10);

  logic [2:0] bitcnt;
  logic [7:0] rx_sh, tx_sh;
  logic       reload;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0; rx_sh <= '0; tx_sh <= '0; rx_valid <= 1'b0; rx_byte <= '0; reload <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      reload   <= 1'b0;
      if (!active) begin
        bitcnt <= '0;
      end else if (sck_rise) begin
        bitcnt <= bitcnt + 1'b1;
        rx_sh  <= {rx_sh[6:0], mosi_r[1]};
        if (bitcnt == 3'd7) begin
          rx_byte  <= {rx_sh[6:0], mosi_r[1]};
          rx_valid <= 1'b1;
        end
      end
      reload <= rx_valid;
      if (msg_start || reload)
        tx_sh <= tx_byte;
      else if (active && sck_fall && bitcnt != 3'd0)
        tx_sh <= {tx_sh[6:0], 1'b0};
    end
  end

  assign miso = tx_sh[7];
endmodule
