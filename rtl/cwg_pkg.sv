// cwg_pkg: types and constants shared by the custom waveform generator controller.
//
// The controller programs AD9858 direct digital synthesizers (DDS) that run on a 1 GHz
// reference and take a 32-bit frequency tuning word (FTW): f_out = FTW * f_clk / 2^32.
// Frequencies arrive from the host as eight BCD digits in units of 10 Hz (the host
// screen shows MHz with five decimals), so 500 MHz is 5000_0000.
//
// The seven operating modes follow the document. The command byte layout, the op codes
// and the AD9858 register addresses and control-register bits are this design's choice:
// the addresses are those of the AD9858 data sheet as far as known here and should be
// checked against it before use with real parts.
package cwg_pkg;

  localparam int unsigned FTW_W      = 32;   // tuning-word width (N)
  localparam int unsigned BCD_DIGITS = 8;    // digits per BCD value
  localparam int unsigned VAL_W      = 4 * BCD_DIGITS;
  localparam int unsigned NUM_SLOTS  = 4;    // frequency slots (AD9858 has four profiles)

  // Operating modes (Section I of the source).
  typedef enum logic [2:0] {
    MODE_FIXED = 3'd0,  // single tone
    MODE_AM    = 3'd1,  // ADC-driven tuning word around the message/carrier frequency
    MODE_FM    = 3'd2,  // ADC-driven tuning word: centre + sample * deviation
    MODE_CHIRP = 3'd3,  // DDS frequency sweep, retriggered by the FPGA
    MODE_TDM   = 3'd4,  // up to four tones switched with the profile-select pins
    MODE_FDM   = 3'd5,  // up to four tones hopped by rewriting the tuning word
    MODE_BFSK  = 3'd6,  // two tones selected by the modulating bit
    MODE_IDLE  = 3'd7   // nothing programmed
  } mode_e;

  // Command op codes: low five bits of the command byte. Bits [7:6] hold the channel.
  typedef enum logic [4:0] {
    OP_FREQ0 = 5'd0,  // single / start / centre / TDM f1 / BFSK mark
    OP_FREQ1 = 5'd1,  // TDM f2 / BFSK space
    OP_FREQ2 = 5'd2,  // TDM f3
    OP_FREQ3 = 5'd3,  // TDM f4
    OP_STOP  = 5'd4,  // chirp stop frequency
    OP_STEP  = 5'd5,  // chirp step
    OP_DEV   = 5'd6,  // FM / AM deviation
    OP_COUNT = 5'd7,  // number of TDM/FDM tones (binary value of the BCD field, 1..4)
    OP_DWELL = 5'd8,  // TDM/FDM dwell, in FPGA clock cycles
    OP_APPLY = 5'd9,  // program the DDS and start the mode given in the value field
    OP_RESET = 5'd10, // pulse the DDS reset pin, channel returns to idle
    OP_PHASE = 5'd11  // phase offset, in units of 0.01 degree
  } op_e;

  // What the command parser hands to a channel after conversion.
  typedef struct packed {
    logic [1:0]       chan;
    op_e              op;
    logic [FTW_W-1:0] value;   // tuning word for frequency ops, fraction of a turn
                               // (2^32 = 360 degrees) for the phase op, binary otherwise
  } cfg_wr_t;

  // AD9858 parallel-port register map (byte addresses, LSB byte at the base address).
  localparam logic [5:0] A_CFR   = 6'h00;  // control function register, 4 bytes
  localparam logic [5:0] A_DFTW  = 6'h04;  // delta frequency tuning word, 4 bytes
  localparam logic [5:0] A_DFRRW = 6'h08;  // delta frequency ramp rate word, 2 bytes
  localparam logic [5:0] A_FTW0  = 6'h0A;  // profile 0 tuning word, 4 bytes
  localparam logic [5:0] A_FTW1  = 6'h10;
  localparam logic [5:0] A_FTW2  = 6'h16;
  localparam logic [5:0] A_FTW3  = 6'h1C;
  // Each profile's 14-bit phase offset word (2 bytes) follows its tuning word.
  localparam int unsigned POW_W  = 14;

  // Control-register settings used by the modes.
  localparam int unsigned CFR_SWEEP_EN  = 14; // frequency sweep enable
  localparam int unsigned CFR_AUTOCLR_F = 12; // clear the frequency accumulator on update
  localparam logic [31:0] CFR_SINGLE = 32'h0000_0000;
  localparam logic [31:0] CFR_CHIRP  = CFR_SINGLE | (32'd1 << CFR_SWEEP_EN)
                                                  | (32'd1 << CFR_AUTOCLR_F);

  function automatic logic [5:0] ftw_addr(input logic [1:0] slot);
    case (slot)
      2'd0: return A_FTW0;
      2'd1: return A_FTW1;
      2'd2: return A_FTW2;
      default: return A_FTW3;
    endcase
  endfunction

  function automatic logic [5:0] pow_addr(input logic [1:0] slot);
    return ftw_addr(slot) + 6'd4;
  endfunction

endpackage
