// tb_adc_sampler: checks the 1 MHz conversion rate (one convert-start every 50 clocks of
// 50 MHz), the capture of the ADC word and its offset-binary to two's-complement
// conversion, and that nothing is started while disabled.
module tb_adc_sampler;
  logic clk = 0, rst_n = 0, enable = 0;
  logic adc_convst, sample_valid;
  logic [11:0] adc_data;
  logic signed [11:0] sample;
  int checks = 0, failures = 0;
  int last_start = -1, nstart = 0, cyc = 0, nsamp = 0;
  logic prev_convst = 0;
  logic [11:0] held;

  adc_sampler dut (.clk(clk), .rst_n(rst_n), .enable(enable), .adc_convst(adc_convst),
                   .adc_data(adc_data), .sample_valid(sample_valid), .sample(sample));

  always #10 clk = ~clk;

  // ADC model: a new random code appears 30 clocks after each convert start
  always @(posedge clk) begin
    cyc++;
    if (adc_convst && !prev_convst) begin
      if (last_start >= 0) begin
        checks++;
        if (cyc - last_start != 50) begin
          failures++;
          $display("FAIL convert period %0d", cyc - last_start);
        end
      end
      last_start = cyc;
      nstart++;
      fork begin
        repeat (30) @(posedge clk);
        held = 12'($urandom);
        adc_data <= held;
      end join_none
    end
    prev_convst = adc_convst;
    if (sample_valid) begin
      nsamp++;
      checks++;
      if (sample !== $signed(held ^ 12'h800)) begin
        failures++;
        $display("FAIL sample %h from code %h", sample, held);
      end
    end
  end

  initial begin
    adc_data = 12'h800;
    held = 12'h800;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    checks++;
    if (nstart != 0) begin
      failures++;
      $display("FAIL conversions while disabled");
    end
    enable = 1;
    repeat (5000) @(posedge clk);
    enable = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (nstart < 99 || nstart > 101 || nsamp != nstart) begin
      failures++;
      $display("FAIL %0d starts and %0d samples in 100 us", nstart, nsamp);
    end
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
