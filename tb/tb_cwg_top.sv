// tb_cwg_top: end-to-end test of the three-channel controller at its default
// parameters. Commands go in over SPI exactly as the microcontroller would send them
// (five-byte frames, BCD frequencies in 10 Hz units); three DDS port models and an
// ADC model sit on the outputs. The scenario uses the settings shown on the host
// screen and in the measurements of the source: a 45 MHz single tone, FM at 20 MHz
// with 15 kHz deviation, a 300-360 MHz chirp in 25 kHz steps, TDM of four tones,
// FDM of 130/140/150 MHz, AM at 135 MHz with 1 kHz deviation, BFSK, an identical
// tone on all channels through the broadcast address with phase offsets of 0, 120 and
// 240 degrees, a rejected frame and a DDS reset. The monitor DAC output is counted in
// cycles against the selected channel's frequency divided by 20. Each tuning word is checked against round(f * 2^32 / 1 GHz) computed here,
// and every mechanism is counted; one that never happens is a failure.
module tb_cwg_top;
  import cwg_pkg::*;
  localparam int NCH = 3;
  logic clk = 0, rst_n = 0;
  logic sck = 0, cs_n = 1, mosi = 0, miso;
  logic adc_convst;
  logic [11:0] adc_data = 12'h800;
  logic [NCH-1:0] fsk_in = '0;
  logic [7:0] dds_d [NCH];
  logic [5:0] dds_a [NCH];
  logic [NCH-1:0] dds_wr_n, dds_rd_n, dds_fud, dds_reset, running;
  logic [1:0] dds_ps [NCH];
  mode_e mode [NCH];
  logic [1:0] mon_sel = 2'd0;
  logic [13:0] mon_dac;
  int checks = 0, failures = 0;
  int cyc = 0;

  cwg_top dut (
    .clk(clk), .rst_n(rst_n), .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .spi_miso(miso), .adc_convst(adc_convst), .adc_data(adc_data), .fsk_in(fsk_in),
    .dds_d(dds_d), .dds_a(dds_a), .dds_wr_n(dds_wr_n), .dds_rd_n(dds_rd_n),
    .dds_fud(dds_fud), .dds_ps(dds_ps), .dds_reset(dds_reset), .mode(mode),
    .running(running), .mon_sel(mon_sel), .mon_dac(mon_dac));

  logic [31:0] m_cfr [NCH], m_dftw [NCH], m_sel [NCH];
  logic [15:0] m_dfrrw [NCH];
  logic [31:0] m_prof [NCH][4];
  logic [13:0] m_pow [NCH][4];
  int m_nwr [NCH], m_nfud [NCH], m_nreset [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_dds
    ad9858_model u_dds (
      .d(dds_d[c]), .a(dds_a[c]), .wr_n(dds_wr_n[c]), .rd_n(dds_rd_n[c]),
      .fud(dds_fud[c]), .ps(dds_ps[c]), .reset(dds_reset[c]), .cfr(m_cfr[c]),
      .dftw(m_dftw[c]), .dfrrw(m_dfrrw[c]), .ftw_sel(m_sel[c]), .ftw_prof(m_prof[c]),
      .pow_prof(m_pow[c]),
      .n_wr(m_nwr[c]), .n_fud(m_nfud[c]), .n_reset(m_nreset[c]));
  end

  always #10 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_mode [8];
  int n_adc_upd = 0, n_retrig = 0, n_tdm_sw = 0, n_fdm_hop = 0, n_fsk = 0;
  int n_bcast = 0, n_reject = 0, n_reset = 0, n_monitor = 0, n_phase = 0;

  // cycles of the monitor DAC output in a window of n clocks
  task automatic monitor_cycles(input int n, output int rises);
    logic above;
    rises = 0;
    above = mon_dac >= 14'd8192;
    repeat (n) begin
      @(posedge clk);
      if (!above && mon_dac >= 14'd8192) rises++;
      above = mon_dac >= 14'd8192;
    end
  endtask

  // ---------------- ADC model ----------------
  logic [11:0] held = 12'h800;
  logic prev_cv = 0;
  always @(posedge clk) begin
    cyc++;
    if (adc_convst && !prev_cv)
      fork begin
        repeat (30) @(posedge clk);
        held = 12'($urandom);
        adc_data <= held;
      end join_none
    prev_cv = adc_convst;
  end

  // ---------------- helpers ----------------
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] ftw_of(input longint unsigned f10);
    return 32'(((128'(f10) * 128'd10 << 32) + 128'd500_000_000) / 128'd1_000_000_000);
  endfunction

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  localparam int HALF = 4;
  logic [7:0] last_miso;
  task automatic spi_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (HALF) @(posedge clk);
      sck = 1;
      last_miso[i] = miso;
      repeat (HALF) @(posedge clk);
      sck = 0;
    end
  endtask

  task automatic send(input logic [1:0] ch, input op_e op, input logic [31:0] bcd);
    cs_n = 0;
    repeat (HALF) @(posedge clk);
    spi_byte({ch, 1'b0, 5'(op)});
    for (int i = 3; i >= 0; i--) spi_byte(bcd[8*i +: 8]);
    repeat (HALF) @(posedge clk);
    cs_n = 1;
    repeat (20) @(posedge clk);
  endtask

  task automatic freq(input int ch, input op_e op, input int unsigned f10);
    send(2'(ch), op, to_bcd(f10));
  endtask

  task automatic apply(input int ch, input mode_e m);
    int t = 0;
    send(2'(ch), OP_APPLY, to_bcd(int'(m)));
    while (t < 5000 && !(ch == 3 ? &running : running[ch])) begin
      @(posedge clk);
      t++;
    end
    chk(ch == 3 ? &running : running[ch], $sformatf("ch%0d mode %s not running", ch, m.name()));
    if (ch == 3) for (int c = 0; c < NCH; c++) n_mode[mode[c]]++;
    else n_mode[mode[ch]]++;
    repeat (5) @(posedge clk);
  endtask

  // ---------------- run-time monitors ----------------
  logic [NCH-1:0] prev_fud = '0;
  int last_fud [NCH];
  logic [1:0] prev_ps [NCH];
  logic [31:0] fm_centre, fm_dev;
  bit fm_check = 0;   // off while the AM/FM settings are being changed
  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (dds_fud[c] && !prev_fud[c] && running[c]) begin
        case (mode[c])
          MODE_AM, MODE_FM: if (fm_check) begin
            longint signed off;
            off = (longint'($signed(held ^ 12'h800)) * longint'(fm_dev)) >>> 11;
            n_adc_upd++;
            chk(m_prof[c][0] == 32'(longint'(fm_centre) + off),
                $sformatf("ch%0d ADC update %h expected %h", c, m_prof[c][0],
                          32'(longint'(fm_centre) + off)));
          end
          MODE_CHIRP: begin
            n_retrig++;
            if (n_retrig > 1)
              chk(cyc - last_fud[c] == 2400 * 50,
                  $sformatf("chirp retrigger after %0d clocks", cyc - last_fud[c]));
          end
          MODE_FDM: n_fdm_hop++;
          default: ;
        endcase
        last_fud[c] = cyc;
      end
      if (dds_ps[c] != prev_ps[c] && running[c] && mode[c] == MODE_TDM) n_tdm_sw++;
      if (dds_ps[c] != prev_ps[c] && running[c] && mode[c] == MODE_BFSK) n_fsk++;
      prev_fud[c] = dds_fud[c];
      prev_ps[c]  = dds_ps[c];
    end
  end

  int unsigned tdm_f [4] = '{2_818_400, 4_187_170, 6_289_100, 9_705_770};
  int unsigned fdm_f [3] = '{13_000_000, 14_000_000, 15_000_000};

  initial begin
    for (int c = 0; c < NCH; c++) begin
      last_fud[c] = 0;
      prev_ps[c] = 0;
    end
    foreach (n_mode[i]) n_mode[i] = 0;
    fm_centre = '0;
    fm_dev = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ---- channel 0: 45 MHz single tone ----
    freq(0, OP_FREQ0, 4_500_000);
    apply(0, MODE_FIXED);
    chk(m_prof[0][0] == ftw_of(4_500_000) && m_cfr[0] == CFR_SINGLE && dds_ps[0] == 0,
        $sformatf("fixed 45 MHz: %h", m_prof[0][0]));
    // monitor DDS at f/20: 45 MHz -> 2.25 MHz, 450 cycles in 10,000 clocks (200 us)
    begin
      int r;
      monitor_cycles(10_000, r);
      chk(r >= 449 && r <= 451, $sformatf("monitor: %0d cycles for 45 MHz", r));
      if (r >= 449 && r <= 451) n_monitor++;
    end

    // ---- channel 1: FM, centre 20 MHz, 15 kHz deviation ----
    freq(1, OP_FREQ0, 2_000_000);
    freq(1, OP_DEV, 1_500);
    fm_centre = ftw_of(2_000_000);
    fm_dev    = ftw_of(1_500);
    apply(1, MODE_FM);
    fm_check = 1;

    // ---- channel 2: chirp 300 to 360 MHz in 25 kHz steps ----
    freq(2, OP_FREQ0, 30_000_000);
    freq(2, OP_STOP, 36_000_000);
    freq(2, OP_STEP, 2_500);
    apply(2, MODE_CHIRP);
    chk(m_cfr[2] == CFR_CHIRP && m_prof[2][0] == ftw_of(30_000_000) &&
        m_dftw[2] == ftw_of(2_500) && m_dfrrw[2] == 16'd125,
        $sformatf("chirp registers %h %h %h %h", m_cfr[2], m_prof[2][0], m_dftw[2],
                  m_dfrrw[2]));
    // two full sweeps (2400 steps of 1 us each) while FM keeps running
    repeat (2 * 2400 * 50 + 2000) @(posedge clk);
    chk(n_retrig >= 2, $sformatf("%0d chirp retriggers", n_retrig));
    chk(n_adc_upd >= 200, $sformatf("%0d FM updates", n_adc_upd));
    chk(m_prof[0][0] == ftw_of(4_500_000), "fixed tone disturbed");

    // ---- channel 0: TDM of the four host-screen tones, minimum dwell ----
    for (int i = 0; i < 4; i++) freq(0, op_e'(i), tdm_f[i]);
    send(2'd0, OP_COUNT, to_bcd(4));
    send(2'd0, OP_DWELL, to_bcd(2));
    apply(0, MODE_TDM);
    for (int i = 0; i < 4; i++)
      chk(m_prof[0][i] == ftw_of(tdm_f[i]), $sformatf("tdm profile %0d", i));
    repeat (400) @(posedge clk);
    chk(n_tdm_sw >= 150, $sformatf("%0d TDM switches", n_tdm_sw));

    // ---- channel 2: FDM of 130, 140, 150 MHz ----
    for (int i = 0; i < 3; i++) freq(2, op_e'(i), fdm_f[i]);
    send(2'd2, OP_COUNT, to_bcd(3));
    send(2'd2, OP_DWELL, to_bcd(40));
    apply(2, MODE_FDM);
    begin
      int k;
      logic [31:0] last;
      k = 0;
      last = m_prof[2][0];
      repeat (600) begin
        @(posedge clk);
        #1;
        if (m_prof[2][0] != last) begin
          k++;
          chk(m_prof[2][0] == ftw_of(fdm_f[k % 3]), $sformatf("fdm tone %0d", k));
          last = m_prof[2][0];
        end
      end
      chk(k >= 8, $sformatf("%0d FDM hops", k));
    end

    // ---- channel 1: AM, 135 MHz with 1 kHz deviation ----
    fm_check = 0;
    freq(1, OP_FREQ0, 13_500_000);
    freq(1, OP_DEV, 100);
    fm_centre = ftw_of(13_500_000);
    fm_dev    = ftw_of(100);
    begin
      int n_before;
      n_before = n_adc_upd;
      apply(1, MODE_AM);
      fm_check = 1;
      repeat (3000) @(posedge clk);
      chk(n_adc_upd - n_before >= 50, "AM updates");
    end

    // ---- channel 1: BFSK ----
    fm_check = 0;
    freq(1, OP_FREQ0, 10_000_000);
    freq(1, OP_FREQ1, 10_100_000);
    apply(1, MODE_BFSK);
    repeat (40) begin
      fsk_in[1] = 1'($urandom);
      repeat (6) @(posedge clk);
      #1;
      chk(m_sel[1] == ftw_of(fsk_in[1] ? 10_100_000 : 10_000_000), "bfsk tone");
    end
    chk(n_fsk >= 5, $sformatf("%0d BFSK toggles", n_fsk));
    // monitor on channel 1 in BFSK: it follows the tone the modulating bit selects
    begin
      int r;
      mon_sel = 2'd1;
      fsk_in[1] = 1'b1;
      repeat (10) @(posedge clk);
      monitor_cycles(10_000, r);   // 101 MHz / 20 = 5.05 MHz -> 1010 cycles
      chk(r >= 1009 && r <= 1011, $sformatf("monitor: %0d cycles for 101 MHz", r));
      if (r >= 1009 && r <= 1011) n_monitor++;
      mon_sel = 2'd0;
    end

    // ---- all channels: identical 100 MHz tone, phases 0 / 120 / 240 degrees ----
    for (int c = 0; c < NCH; c++) send(2'(c), OP_PHASE, to_bcd(c * 12_000));
    freq(3, OP_FREQ0, 10_000_000);
    apply(3, MODE_FIXED);
    for (int c = 0; c < NCH; c++) begin
      logic [13:0] pw;
      pw = 14'(((64'(c * 12_000) << 32) + 64'd18_000) / 64'd36_000 >> 18);
      chk(m_prof[c][0] == 32'h1999_999A && m_sel[c] == 32'h1999_999A,
          $sformatf("broadcast ch%0d %h", c, m_sel[c]));
      if (m_sel[c] == 32'h1999_999A) n_bcast++;
      chk(m_pow[c][0] == pw, $sformatf("phase ch%0d %h, expected %h", c, m_pow[c][0], pw));
      if (m_pow[c][0] == pw && pw != 0) n_phase++;
    end

    // ---- a frame with a non-BCD digit is rejected; status reads back over MISO ----
    send(2'd0, OP_FREQ0, 32'h0450_00A0);
    send(2'd0, OP_DWELL, to_bcd(2));   // the status is returned during this frame
    chk(last_miso[7] == 1'b1, $sformatf("status after bad frame %h", last_miso));
    chk(m_prof[0][0] == 32'h1999_999A, "bad frame changed the tone");
    if (last_miso[7]) n_reject++;

    // ---- DDS reset of channel 2 ----
    send(2'd2, OP_RESET, to_bcd(0));
    repeat (20) @(posedge clk);
    chk(m_nreset[2] == 1 && m_nreset[0] == 0 && mode[2] == MODE_IDLE &&
        m_prof[2][0] == 0, "reset of channel 2");
    if (m_nreset[2] == 1) n_reset++;

    // ---- every mechanism happened ----
    chk(n_mode[MODE_FIXED] > 0, "fixed mode never ran");
    chk(n_mode[MODE_AM]    > 0, "AM mode never ran");
    chk(n_mode[MODE_FM]    > 0, "FM mode never ran");
    chk(n_mode[MODE_CHIRP] > 0, "chirp mode never ran");
    chk(n_mode[MODE_TDM]   > 0, "TDM mode never ran");
    chk(n_mode[MODE_FDM]   > 0, "FDM mode never ran");
    chk(n_mode[MODE_BFSK]  > 0, "BFSK mode never ran");
    chk(n_adc_upd > 0 && n_retrig > 0 && n_tdm_sw > 0 && n_fdm_hop > 0 && n_fsk > 0 &&
        n_bcast == NCH && n_reject > 0 && n_reset > 0 && n_monitor == 2 &&
        n_phase == NCH - 1,
        "a mechanism never happened");
    $display("mechanisms: modes F%0d AM%0d FM%0d C%0d T%0d D%0d B%0d, adc updates %0d,",
             n_mode[MODE_FIXED], n_mode[MODE_AM], n_mode[MODE_FM], n_mode[MODE_CHIRP],
             n_mode[MODE_TDM], n_mode[MODE_FDM], n_mode[MODE_BFSK], n_adc_upd);
    $display("  chirp retriggers %0d, tdm switches %0d, fdm hops %0d, fsk toggles %0d,",
             n_retrig, n_tdm_sw, n_fdm_hop, n_fsk);
    $display("  broadcast %0d, rejected frames %0d, dds resets %0d, monitor checks %0d",
             n_bcast, n_reject, n_reset, n_monitor);
    $display("  phase offsets %0d", n_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
