// ad9858_model: behavioural model of the control port of an AD9858 DDS, for testbenches.
//
// Not synthesizable and not the chip: it keeps only what the controller's tests need.
// A byte is written into the buffer register at address A when WR_N rises. A rising
// edge of FUD copies the buffer into the active registers (the chip transfers on
// SYNC_CLK; here it is immediate). RESET clears both. The model reports the active
// control word, sweep words, the tuning and phase offset words of each profile and the
// tuning word of the profile selected by PS, and counts writes, updates and resets. The register map is the one in cwg_pkg.
module ad9858_model (
  input  logic [7:0]  d,
  input  logic [5:0]  a,
  input  logic        wr_n,
  input  logic        rd_n,
  input  logic        fud,
  input  logic [1:0]  ps,
  input  logic        reset,
  output logic [31:0] cfr,
  output logic [31:0] dftw,
  output logic [15:0] dfrrw,
  output logic [31:0] ftw_sel,
  output logic [31:0] ftw_prof [4],
  output logic [13:0] pow_prof [4],
  output int          n_wr,
  output int          n_fud,
  output int          n_reset
);
  import cwg_pkg::*;

  logic [7:0] buf_r [64];
  logic [7:0] act_r [64];

  function automatic logic [31:0] word(input int base);
    return {act_r[base+3], act_r[base+2], act_r[base+1], act_r[base]};
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      buf_r[i] = '0;
      act_r[i] = '0;
    end
    n_wr = 0;
    n_fud = 0;
    n_reset = 0;
    refresh();
  end

  always @(posedge wr_n) begin
    if (rd_n) begin
      buf_r[a] = d;
      n_wr++;
    end
  end
  always @(posedge fud) begin
    for (int i = 0; i < 64; i++) act_r[i] = buf_r[i];
    n_fud++;
    refresh();
  end
  always @(posedge reset) begin
    for (int i = 0; i < 64; i++) begin
      buf_r[i] = '0;
      act_r[i] = '0;
    end
    n_reset++;
    refresh();
  end

  task automatic refresh();
    cfr   = word(int'(A_CFR));
    dftw  = word(int'(A_DFTW));
    dfrrw = {act_r[int'(A_DFRRW)+1], act_r[int'(A_DFRRW)]};
    for (int p = 0; p < 4; p++) begin
      ftw_prof[p] = word(int'(ftw_addr(2'(p))));
      pow_prof[p] = 14'(word(int'(pow_addr(2'(p)))));
    end
    ftw_sel = word(int'(ftw_addr(ps)));
  endtask

  always @(ps) ftw_sel = word(int'(ftw_addr(ps)));
endmodule
