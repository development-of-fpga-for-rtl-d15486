// tb_ftw_calc: checks frequency-to-tuning-word conversion for a 1 GHz DDS against
// round(f * 2^32 / 1e9) computed with wide integers, and the one-clock latency.
module tb_ftw_calc;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [26:0] freq = '0;
  logic        out_valid;
  logic [31:0] ftw;
  int checks = 0, failures = 0;

  ftw_calc dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .freq(freq),
                .out_valid(out_valid), .ftw(ftw));

  always #10 clk = ~clk;

  function automatic logic [31:0] expect_ftw(input longint unsigned f10);
    logic [127:0] num;
    num = (128'(f10) * 128'd10 << 32) + 128'd500_000_000;
    return 32'(num / 128'd1_000_000_000);
  endfunction

  task automatic conv(input int unsigned f10, input logic [31:0] exp_w);
    @(negedge clk);
    freq = 27'(f10);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || ftw !== exp_w) begin
      failures++;
      $display("FAIL f=%0d0 Hz: valid=%b ftw=%h expected %h", f10, out_valid, ftw, exp_w);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid held");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    conv(10_000_000, 32'h1999_999A);   // 100 MHz
    conv(25_000_000, 32'h4000_0000);   // 250 MHz = f_clk/4
    conv(1, 32'd43);                   // 10 Hz step: 42.94967296 -> 43
    for (int i = 0; i < 400; i++) begin
      int unsigned f;
      f = $urandom_range(0, 99_999_999);
      conv(f, expect_ftw(f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
