// spi_slave: SPI receiver for the command link from the microcontroller.
//
// The microcontroller forwards each host command to the FPGA over SPI. This block is an
// SPI mode-0 slave (clock idles low, data sampled on the rising edge, MSB first) that
// oversamples sck, cs_n and mosi with the system clock through two-flop synchronisers,
// so sck must stay below about clk/4. Each completed byte is presented for one clock on
// rx_valid/rx_data. frame_start pulses when cs_n falls, so the receiver of the bytes can
// align command frames to chip-select. On miso the block returns tx_data, MSB first,
// loaded when cs_n falls and after every byte, changing on the falling edge of sck.
// SPI mode, bit order and the status return are this design's choices; the source only
// says that SPI is used.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  input  logic [7:0] tx_data,
  output logic       frame_start,
  output logic       rx_valid,
  output logic [7:0] rx_data
);
  logic [2:0] sck_s, cs_s;
  logic [1:0] mosi_s;
  logic [6:0] shreg;   // first seven bits of the byte in progress
  logic [7:0] txreg;
  logic [2:0] bitcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  wire sck_rise = sck_s[1] & ~sck_s[2];
  wire sck_fall = ~sck_s[1] & sck_s[2];
  wire cs_fall  = ~cs_s[1] & cs_s[2];
  wire cs_act   = ~cs_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg       <= '0;
      txreg       <= '0;
      bitcnt      <= '0;
      rx_valid    <= 1'b0;
      rx_data     <= '0;
      frame_start <= 1'b0;
      miso        <= 1'b0;
    end else begin
      rx_valid    <= 1'b0;
      frame_start <= cs_fall;
      if (cs_fall) begin
        bitcnt <= '0;
        txreg  <= tx_data;
        miso   <= tx_data[7];
      end else if (cs_act) begin
        if (sck_rise) begin
          shreg  <= {shreg[5:0], mosi_s[1]};
          bitcnt <= bitcnt + 3'd1;
          if (bitcnt == 3'd7) begin
            rx_valid <= 1'b1;
            rx_data  <= {shreg, mosi_s[1]};
            txreg    <= tx_data;
          end else begin
            txreg <= {txreg[6:0], 1'b0};
          end
        end else if (sck_fall) begin
          miso <= txreg[7];
        end
      end
    end
  end
endmodule
