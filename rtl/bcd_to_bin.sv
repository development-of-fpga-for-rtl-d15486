// bcd_to_bin: converts a packed BCD number to binary.
//
// The host sends every frequency as BCD digits (most significant digit in the top
// nibble). The value is built combinationally by Horner's rule, acc = acc*10 + digit,
// from the top digit down. A digit above 9 raises bad_digit; the binary result is then
// meaningless and the caller drops the command. Purely combinational, no clock.
module bcd_to_bin #(
  parameter int unsigned DIGITS = 8,
  parameter int unsigned OUT_W  = 27    // enough for 10^DIGITS - 1
) (
  input  logic [4*DIGITS-1:0] bcd,
  output logic [OUT_W-1:0]    bin,
  output logic                bad_digit
);
  always_comb begin
    logic [OUT_W-1:0] acc;
    logic [3:0]       d;
    acc = '0;
    bad_digit = 1'b0;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      d = bcd[4*i +: 4];
      if (d > 4'd9) bad_digit = 1'b1;
      acc = OUT_W'(acc * OUT_W'(10)) + OUT_W'(d);
    end
    bin = acc;
  end
endmodule
