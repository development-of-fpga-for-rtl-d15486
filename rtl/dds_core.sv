// dds_core: phase-accumulator DDS with a quarter-wave compressed sine table.
//
// The classic DDS structure: a frequency register holds the tuning word, an adder and
// phase register accumulate it every clock (the phase wheel: 2^ACC_W points per turn,
// one turn per output cycle), and a phase-to-amplitude converter turns the top PHASE_W
// bits of the phase into a sample for a DAC. f_out = ftw * f_clk / 2^ACC_W.
// The table stores only the first quarter of a sine wave, 2^(PHASE_W-2) magnitudes of
// AMP_W-1 bits, sampled at the centres of the phase steps, sin(2*pi*(i+0.5)/2^PHASE_W).
// The second and fourth quarters read it backwards (index inverted) and the second half
// of the cycle is negated, so the table is a quarter of a full one. The table is
// computed at elaboration from $sin.
//
// Interface: ftw is loaded into the frequency register every clock while ftw_load is
// high; the phase register clears on reset. dac is offset binary (mid-scale
// 2^(AMP_W-1)) and shows the phase register's value two clocks later (table read,
// output register); a new tuning word reaches the phase register one clock after it is
// loaded. ACC_W = 32 and a 14-bit output follow the AD9858 figures in
// the source; the phase truncation to 12 bits and the quarter-wave table are this
// design's choices.
module dds_core #(
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned PHASE_W = 12,
  parameter int unsigned AMP_W   = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ftw_load,
  input  logic [ACC_W-1:0] ftw,
  output logic [AMP_W-1:0] dac,
  output logic [ACC_W-1:0] phase
);
  localparam int unsigned QN   = 2 ** (PHASE_W - 2);
  localparam int unsigned MAGW = AMP_W - 1;

  logic [MAGW-1:0] rom [QN];
  initial begin
    for (int i = 0; i < QN; i++)
      rom[i] = MAGW'($rtoi(((2.0 ** MAGW) - 1.0) *
                          $sin(2.0 * 3.14159265358979 * (i + 0.5) / (4.0 * QN)) + 0.5));
  end

  logic [ACC_W-1:0]   freq_q;
  logic [PHASE_W-3:0] idx;
  logic [1:0]         quad;
  logic               neg_q;   // second half of the cycle
  logic [MAGW-1:0]    mag_q;

  always_comb begin
    quad = phase[ACC_W-1 -: 2];
    idx  = phase[ACC_W-3 -: PHASE_W-2];
    if (quad[0]) idx = ~idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_q <= '0;
      phase  <= '0;
      neg_q  <= 1'b0;
      mag_q  <= '0;
      dac    <= AMP_W'(1) << (AMP_W - 1);
    end else begin
      if (ftw_load) freq_q <= ftw;
      phase  <= phase + freq_q;
      neg_q  <= quad[1];
      mag_q  <= rom[idx];
      dac    <= neg_q ? (AMP_W'(1) << (AMP_W - 1)) - AMP_W'(mag_q)
                          : (AMP_W'(1) << (AMP_W - 1)) + AMP_W'(mag_q);
    end
  end
endmodule
