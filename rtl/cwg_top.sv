// cwg_top: FPGA controller of a three-channel custom waveform generator.
//
// Three AD9858 DDS chips (1 GHz clock, 32-bit tuning words, four frequency profiles)
// make the output signals; this FPGA, clocked at 50 MHz, turns operator commands into
// DDS register writes and keeps the time-varying modes running, since no PC can feed
// the DDS ports fast enough. Commands arrive from the host through a microcontroller
// over SPI (spi_slave), are assembled and converted from BCD to tuning words
// (cmd_parser with bcd_to_bin and ftw_calc) and go to one channel_ctrl per DDS, which
// programs its chip through an ad9858_port driver in one of seven modes: fixed, AM, FM,
// chirp, TDM, FDM and BFSK. One adc_sampler triggers the shared modulation ADC at 1 MHz
// whenever a channel runs AM or FM and hands every sample to all channels.
// A monitor DDS (dds_core) on the FPGA clock follows the tuning word the selected
// channel's DDS is producing and drives an external DAC, so a frequency counter can
// check the programmed frequency at one twentieth of its value (50 MHz / 1 GHz).
//
// Ports: SPI slave pins; ADC convert-start and parallel data; one modulating bit per
// channel for BFSK; per channel the 20 AD9858 control lines (D, A, WR_N, RD_N, FUD, PS,
// RESET). mode/running report each channel's state; mon_sel/mon_dac are the monitor
// DDS channel select and its 14-bit offset-binary DAC word. The DDS reference clock, the
// SYNC_CLK distribution between the chips and the analog outputs are outside the FPGA.
// The split into these blocks, the per-channel ports and the shared ADC are this
// design's choices; the source gives the system, the modes and the clock rates.
module cwg_top
  import cwg_pkg::*;
#(
  parameter int unsigned NUM_CH = 3,
  parameter int unsigned ADC_W  = 12
) (
  input  logic             clk,          // 50 MHz
  input  logic             rst_n,
  // SPI from the microcontroller
  input  logic             spi_sck,
  input  logic             spi_cs_n,
  input  logic             spi_mosi,
  output logic             spi_miso,
  // modulation ADC
  output logic             adc_convst,
  input  logic [ADC_W-1:0] adc_data,
  // BFSK modulating bits
  input  logic [NUM_CH-1:0] fsk_in,
  // AD9858 control ports
  output logic [7:0]       dds_d     [NUM_CH],
  output logic [5:0]       dds_a     [NUM_CH],
  output logic [NUM_CH-1:0] dds_wr_n,
  output logic [NUM_CH-1:0] dds_rd_n,
  output logic [NUM_CH-1:0] dds_fud,
  output logic [1:0]       dds_ps    [NUM_CH],
  output logic [NUM_CH-1:0] dds_reset,
  // status
  output mode_e            mode      [NUM_CH],
  output logic [NUM_CH-1:0] running,
  // monitor DDS: follows the tuning word of channel mon_sel, drives a DAC
  input  logic [1:0]       mon_sel,
  output logic [13:0]      mon_dac
);
  logic       frame_start, rx_valid;
  logic [7:0] rx_data, status;
  logic       cfg_valid;
  cfg_wr_t    cfg;

  spi_slave u_spi (
    .clk(clk), .rst_n(rst_n), .sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi),
    .miso(spi_miso), .tx_data(status), .frame_start(frame_start),
    .rx_valid(rx_valid), .rx_data(rx_data)
  );

  cmd_parser u_parser (
    .clk(clk), .rst_n(rst_n), .frame_start(frame_start), .rx_valid(rx_valid),
    .rx_data(rx_data), .cfg_valid(cfg_valid), .cfg(cfg), .status(status)
  );

  logic                    sample_valid;
  logic signed [ADC_W-1:0] sample;
  logic [NUM_CH-1:0]       adc_en;

  adc_sampler #(.ADC_W(ADC_W)) u_adc (
    .clk(clk), .rst_n(rst_n), .enable(|adc_en), .adc_convst(adc_convst),
    .adc_data(adc_data), .sample_valid(sample_valid), .sample(sample)
  );

  logic [31:0] cur_ftw [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic        req_valid, req_ready, req_fud, reset_req;
    logic [5:0]  req_addr;
    logic [31:0] req_data;
    logic [2:0]  req_nbytes;

    channel_ctrl #(.CHAN(2'(c)), .ADC_W(ADC_W)) u_ctrl (
      .clk(clk), .rst_n(rst_n), .cfg_valid(cfg_valid), .cfg(cfg),
      .sample_valid(sample_valid), .sample(sample), .fsk_in(fsk_in[c]),
      .req_valid(req_valid), .req_ready(req_ready), .req_addr(req_addr),
      .req_data(req_data), .req_nbytes(req_nbytes), .req_fud(req_fud),
      .reset_req(reset_req), .dds_ps(dds_ps[c]), .mode(mode[c]),
      .adc_en(adc_en[c]), .running(running[c]), .cur_ftw(cur_ftw[c])
    );

    ad9858_port u_port (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
      .req_addr(req_addr), .req_data(req_data), .req_nbytes(req_nbytes),
      .req_fud(req_fud), .reset_req(reset_req),
      .dds_d(dds_d[c]), .dds_a(dds_a[c]), .dds_wr_n(dds_wr_n[c]), .dds_rd_n(dds_rd_n[c]),
      .dds_fud(dds_fud[c]), .dds_reset(dds_reset[c])
    );
  end

  // Monitor DDS on the FPGA clock: the same tuning word gives f_dds * 50 MHz / 1 GHz,
  // one twentieth of the DDS output, low enough for a DAC and frequency counter.
  logic [31:0] mon_ftw;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mon_ftw <= '0;
    else        mon_ftw <= (int'(mon_sel) < NUM_CH) ? cur_ftw[mon_sel] : cur_ftw[0];
  end

  dds_core #(.ACC_W(32), .PHASE_W(12), .AMP_W(14)) u_mon (
    .clk(clk), .rst_n(rst_n), .ftw_load(1'b1), .ftw(mon_ftw), .dac(mon_dac), .phase()
  );
endmodule
