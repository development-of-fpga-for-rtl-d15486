// tb_bcd_to_bin: checks BCD-to-binary conversion of eight-digit values against values
// built independently with integer division, including the extremes and bad digits.
module tb_bcd_to_bin;
  logic [31:0] bcd;
  logic [26:0] bin;
  logic        bad;
  int checks = 0, failures = 0;

  bcd_to_bin #(.DIGITS(8), .OUT_W(27)) dut (.bcd(bcd), .bin(bin), .bad_digit(bad));

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check_val(input int unsigned v);
    bcd = to_bcd(v);
    #1;
    checks++;
    if (bin !== 27'(v) || bad !== 1'b0) begin
      failures++;
      $display("FAIL value %0d: bin=%0d bad=%b", v, bin, bad);
    end
  endtask

  initial begin
    check_val(0);
    check_val(99_999_999);
    check_val(4_500_000);     // 45 MHz in 10 Hz units
    check_val(50_000_000);    // 500 MHz
    for (int i = 0; i < 500; i++) check_val($urandom_range(0, 99_999_999));
    bcd = 32'h0000_00A0;      // tens digit 10 is not BCD
    #1;
    checks++;
    if (bad !== 1'b1) begin
      failures++;
      $display("FAIL bad digit not flagged");
    end
    bcd = 32'hF123_4567;
    #1;
    checks++;
    if (bad !== 1'b1) begin
      failures++;
      $display("FAIL bad top digit not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
