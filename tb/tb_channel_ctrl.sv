// tb_channel_ctrl: runs one channel controller, its port driver and a DDS port model
// through all seven modes and RESET. For each mode it checks what ends up in the DDS
// registers (tuning words, and phase offset words for TDM and BFSK) against values
// computed here, and the run-time behaviour: tuning-word
// updates from ADC samples (AM/FM), the chirp retrigger period of steps*50 clocks,
// the profile-pin sequence and dwell (TDM), the rewritten tuning-word sequence (FDM)
// and the profile pin following the modulating bit (BFSK).
module tb_channel_ctrl;
  import cwg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0;
  cfg_wr_t cfg;
  logic sample_valid = 0;
  logic signed [11:0] sample = '0;
  logic fsk_in = 0;
  logic req_valid, req_ready, req_fud, reset_req, adc_en, running;
  logic [5:0] req_addr;
  logic [31:0] req_data;
  logic [2:0] req_nbytes;
  logic [1:0] ps;
  mode_e mode;
  logic [31:0] cur_ftw;
  logic [7:0] d;
  logic [5:0] a;
  logic wr_n, rd_n, fud, dreset;
  logic [31:0] m_cfr, m_dftw, m_sel;
  logic [13:0] m_pow [4];
  logic [15:0] m_dfrrw;
  logic [31:0] m_prof [4];
  int m_nwr, m_nfud, m_nreset;
  int checks = 0, failures = 0;
  int cyc = 0;

  channel_ctrl #(.CHAN(2'd1)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_valid(cfg_valid), .cfg(cfg),
    .sample_valid(sample_valid), .sample(sample), .fsk_in(fsk_in),
    .req_valid(req_valid), .req_ready(req_ready), .req_addr(req_addr),
    .req_data(req_data), .req_nbytes(req_nbytes), .req_fud(req_fud),
    .reset_req(reset_req), .dds_ps(ps), .mode(mode), .adc_en(adc_en), .running(running),
    .cur_ftw(cur_ftw));

  ad9858_port u_port (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_addr(req_addr), .req_data(req_data), .req_nbytes(req_nbytes), .req_fud(req_fud),
    .reset_req(reset_req), .dds_d(d), .dds_a(a), .dds_wr_n(wr_n), .dds_rd_n(rd_n),
    .dds_fud(fud), .dds_reset(dreset));

  ad9858_model u_dds (
    .d(d), .a(a), .wr_n(wr_n), .rd_n(rd_n), .fud(fud), .ps(ps), .reset(dreset),
    .cfr(m_cfr), .dftw(m_dftw), .dfrrw(m_dfrrw), .ftw_sel(m_sel), .ftw_prof(m_prof),
    .pow_prof(m_pow),
    .n_wr(m_nwr), .n_fud(m_nfud), .n_reset(m_nreset));

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic put(input logic [1:0] ch, input op_e op, input logic [31:0] v);
    @(negedge clk);
    cfg_valid = 1;
    cfg = '{chan: ch, op: op, value: v};
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic apply(input mode_e m);
    int t = 0;
    put(2'd1, OP_APPLY, 32'(m));
    while (!running && t < 2000) begin
      @(negedge clk);
      t++;
    end
    chk(running && mode == m, $sformatf("mode %s not running", m.name()));
    repeat (3) @(negedge clk);
  endtask

  task automatic give_sample(input logic signed [11:0] s);
    @(negedge clk);
    sample_valid = 1;
    sample = s;
    @(negedge clk);
    sample_valid = 0;
    repeat (40) @(negedge clk);
  endtask

  function automatic logic [31:0] fm_ftw(input logic [31:0] c, input logic [31:0] dv,
                                         input logic signed [11:0] s);
    longint signed off;
    off = (longint'(s) * longint'(dv));
    off = off >>> 11;
    return 32'(longint'(c) + off);
  endfunction

  logic [31:0] slots [4];
  int fud_t [$];
  logic prev_fud = 0;
  always @(posedge clk) begin
    if (fud && !prev_fud) fud_t.push_back(cyc);
    prev_fud = fud;
  end

  initial begin
    cfg = '{chan: 2'd0, op: OP_FREQ0, value: '0};
    for (int i = 0; i < 4; i++) slots[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // settings for another channel are ignored; channel 3 reaches everyone
    put(2'd0, OP_FREQ0, 32'h1111_1111);
    put(2'd3, OP_FREQ0, 32'h1999_999A);     // 100 MHz
    // ---- FIXED ----
    apply(MODE_FIXED);
    chk(m_cfr == CFR_SINGLE && m_prof[0] == 32'h1999_999A && ps == 2'd0,
        $sformatf("fixed: cfr %h ftw0 %h", m_cfr, m_prof[0]));

    // ---- FM: centre 20 MHz, deviation 15 kHz ----
    put(2'd1, OP_FREQ0, 32'h051E_B852);
    put(2'd1, OP_DEV, 32'd64_425);
    apply(MODE_FM);
    chk(adc_en, "fm: ADC not enabled");
    chk(m_prof[0] == 32'h051E_B852, "fm: centre not programmed");
    foreach (slots[i]) begin
      logic signed [11:0] s;
      s = 12'($urandom);
      give_sample(s);
      chk(m_prof[0] == fm_ftw(32'h051E_B852, 32'd64_425, s),
          $sformatf("fm: sample %0d gave %h, expected %h", s, m_prof[0],
                    fm_ftw(32'h051E_B852, 32'd64_425, s)));
    end
    give_sample(12'sh7FF);
    chk(m_prof[0] == fm_ftw(32'h051E_B852, 32'd64_425, 12'sh7FF), "fm: full scale");

    // ---- AM ----
    put(2'd1, OP_FREQ0, 32'h2290_0000);
    put(2'd1, OP_DEV, 32'd4295);
    apply(MODE_AM);
    give_sample(-12'sd1000);
    chk(m_prof[0] == fm_ftw(32'h2290_0000, 32'd4295, -12'sd1000), "am: sample");

    // ---- CHIRP: 10 steps, retrigger every 10*50 clocks ----
    put(2'd1, OP_FREQ0, 32'h4000_0000);
    put(2'd1, OP_STEP, 32'd1000);
    put(2'd1, OP_STOP, 32'h4000_0000 + 32'd10_500);
    apply(MODE_CHIRP);
    chk(m_cfr == CFR_CHIRP && m_dftw == 32'd1000 && m_dfrrw == 16'd125 &&
        m_prof[0] == 32'h4000_0000,
        $sformatf("chirp registers cfr %h dftw %h dfrrw %h", m_cfr, m_dftw, m_dfrrw));
    fud_t.delete();
    repeat (2100) @(negedge clk);
    chk(fud_t.size() >= 4, $sformatf("chirp: %0d retriggers", fud_t.size()));
    for (int i = 1; i < fud_t.size(); i++)
      chk(fud_t[i] - fud_t[i-1] == 500,
          $sformatf("chirp retrigger period %0d", fud_t[i] - fud_t[i-1]));

    // ---- TDM: three tones, dwell 20 ----
    for (int i = 0; i < 4; i++) put(2'd1, op_e'(i), slots[i]);
    put(2'd1, OP_COUNT, 32'd3);
    put(2'd1, OP_DWELL, 32'd20);
    put(2'd1, OP_PHASE, 32'h4000_0000);          // 90 degrees: top 14 bits 0x1000
    apply(MODE_TDM);
    for (int i = 0; i < 3; i++) begin
      chk(m_prof[i] == slots[i], $sformatf("tdm: profile %0d", i));
      chk(m_pow[i] == 14'h1000, $sformatf("tdm: phase offset %0d = %h", i, m_pow[i]));
    end
    chk(m_pow[3] == 14'h0000, "tdm: unused profile's phase offset written");
    begin
      logic [1:0] last;
      int t_last, nsw;
      last   = ps;
      t_last = cyc;
      nsw    = 0;
      repeat (200) begin
        @(negedge clk);
        if (ps != last) begin
          chk(ps == ((last == 2'd2) ? 2'd0 : last + 2'd1), "tdm: profile order");
          if (nsw > 0) chk(cyc - t_last == 20, $sformatf("tdm dwell %0d", cyc - t_last));
          chk(m_sel == slots[ps], "tdm: selected tuning word");
          chk(cur_ftw == m_sel, "tdm: tuning-word mirror");
          nsw++;
          t_last = cyc;
          last = ps;
        end
      end
      chk(nsw >= 9, $sformatf("tdm: %0d switches", nsw));
    end

    // ---- FDM: three tones by rewriting FTW0, dwell 100 ----
    put(2'd1, OP_DWELL, 32'd100);
    apply(MODE_FDM);
    begin
      logic [31:0] last;
      int k, t_last;
      last   = m_prof[0];
      k      = 0;
      t_last = -1;
      repeat (700) begin
        @(negedge clk);
        if (m_prof[0] != last) begin
          k++;
          chk(m_prof[0] == slots[k % 3], $sformatf("fdm: tone %0d", k));
          if (t_last >= 0) chk(cyc - t_last == 100, $sformatf("fdm dwell %0d", cyc - t_last));
          t_last = cyc;
          last = m_prof[0];
        end
      end
      chk(k >= 6, $sformatf("fdm: %0d hops", k));
      chk(ps == 2'd0, "fdm: profile pins move");
    end

    // ---- BFSK ----
    put(2'd1, OP_PHASE, 32'h2AAB_0000);          // 60 degrees: top 14 bits 0x0AAA
    apply(MODE_BFSK);
    chk(m_prof[0] == slots[0] && m_prof[1] == slots[1], "bfsk: tones");
    chk(m_pow[0] == 14'h0AAA && m_pow[1] == 14'h0AAA && m_pow[2] == 14'h1000,
        $sformatf("bfsk: phase offsets %h %h %h", m_pow[0], m_pow[1], m_pow[2]));
    repeat (20) begin
      fsk_in = 1'($urandom);
      repeat (5) @(negedge clk);
      chk(ps == {1'b0, fsk_in} && m_sel == slots[fsk_in], "bfsk: selection follows bit");
      chk(cur_ftw == m_sel, "bfsk: tuning-word mirror");
    end

    // ---- RESET ----
    put(2'd1, OP_RESET, 32'd0);
    repeat (10) @(negedge clk);
    chk(m_nreset == 1 && mode == MODE_IDLE && !running && m_prof[0] == 0, "reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
