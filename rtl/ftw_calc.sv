// ftw_calc: frequency to DDS frequency tuning word.
//
// The DDS produces f_out = FTW * REF_HZ / 2^32, so FTW = round(f * 2^32 / REF_HZ). The
// frequency arrives in units of UNIT_HZ (10 Hz, the host's resolution). Instead of a
// divider the block multiplies by the constant K = floor(2^64 * UNIT_HZ / REF_HZ) and
// keeps bits [63:32] of the product plus one half for rounding. For inputs below 2^27
// the truncation of K moves the result by far less than one LSB.
//
// Timing: one register stage. in_valid/freq are sampled on a clock edge and the tuning
// word appears with out_valid on the next edge. REF_HZ = 1 GHz and the 32-bit word come
// from the source; the 10 Hz unit follows its 10 Hz step size and host screen.
module ftw_calc #(
  parameter int unsigned  IN_W   = 27,
  parameter int unsigned  FTW_W  = 32,
  parameter longint unsigned REF_HZ  = 64'd1_000_000_000,
  parameter longint unsigned UNIT_HZ = 64'd10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  freq,
  output logic             out_valid,
  output logic [FTW_W-1:0] ftw
);
  localparam logic [127:0] K = ((128'd1 << (2 * FTW_W)) * 128'(UNIT_HZ)) / 128'(REF_HZ);

  logic [127:0] prod;
  always_comb prod = 128'(freq) * K + (128'd1 << (FTW_W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ftw       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) ftw <= prod[FTW_W +: FTW_W];
    end
  end
endmodule
