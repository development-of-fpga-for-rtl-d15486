// tb_dds_core: checks the phase accumulator (phase advances by the tuning word every
// clock) and the sine output two clocks later against 8191*sin(2*pi*(p+0.5)/4096)
// computed here for the 12-bit phase p, over several tuning words, and that the number
// of output cycles in a window matches f_out = ftw * f_clk / 2^32.
module tb_dds_core;
  logic clk = 0, rst_n = 0, ftw_load = 0;
  logic [31:0] ftw = '0, phase;
  logic [13:0] dac;
  int checks = 0, failures = 0;

  dds_core dut (.clk(clk), .rst_n(rst_n), .ftw_load(ftw_load), .ftw(ftw), .dac(dac),
                .phase(phase));

  always #10 clk = ~clk;

  function automatic int expect_dac(input logic [31:0] ph);
    real a;
    int  m;
    a = $sin(2.0 * 3.14159265358979 * (real'(ph[31:20]) + 0.5) / 4096.0);
    m = $rtoi(8191.0 * ((a < 0.0) ? -a : a) + 0.5);
    return (a < 0.0) ? 8192 - m : 8192 + m;
  endfunction

  task automatic run_ftw(input logic [31:0] w, input int ncyc);
    logic [31:0] ph [$];
    int rises;
    logic above;
    @(negedge clk);
    ftw = w;
    ftw_load = 1;
    @(negedge clk);
    ftw_load = 0;
    @(negedge clk);
    rises = 0;
    above = dac >= 14'd8192;
    ph.delete();
    for (int t = 0; t < ncyc; t++) begin
      ph.push_back(phase);
      @(negedge clk);
      checks++;
      if (phase != ph[$] + w) begin
        failures++;
        $display("FAIL phase step %h -> %h, ftw %h", ph[$], phase, w);
      end
      if (ph.size() >= 3) begin
        checks++;
        if (int'(dac) != expect_dac(ph[ph.size()-2])) begin
          failures++;
          if (failures < 10)
            $display("FAIL dac %0d expected %0d at phase %h", dac, expect_dac(ph[ph.size()-2]),
                     ph[ph.size()-2]);
        end
      end
      if (!above && dac >= 14'd8192) rises++;
      above = dac >= 14'd8192;
    end
    // expected full cycles in the window: ncyc * w / 2^32
    checks++;
    if (w != 0) begin
      longint e;
      e = (longint'(ncyc) * longint'(w)) >>> 32;
      if (rises < e - 1 || rises > e + 1) begin
        failures++;
        $display("FAIL %0d output cycles for ftw %h, expected %0d", rises, w, e);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (dac != 14'd8192) begin
      failures++;
      $display("FAIL reset output %0d", dac);
    end
    run_ftw(32'h0100_0000, 2000);   // 256 clocks per cycle
    run_ftw(32'h1999_999A, 2000);   // f_clk / 10
    run_ftw(32'h0000_0000, 50);     // frozen phase
    for (int i = 0; i < 5; i++) run_ftw($urandom_range(32'h0010_0000, 32'h7FFF_FFFF), 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
