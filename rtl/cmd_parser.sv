// cmd_parser: turns the byte stream from the host into channel settings.
//
// The host software converts what the operator types (frequencies in MHz with 10 Hz
// resolution, chirp step, FM deviation, TDM tone count) into BCD and sends it through the
// microcontroller. This block assembles five-byte frames:
//   byte 0      command: [7:6] channel (3 = all channels), [4:0] op code (cwg_pkg::op_e)
//   bytes 1..4  eight BCD digits, most significant first
// A frame starts with the first byte after chip-select falls. When the fifth byte
// arrives the BCD value is converted to binary (combinational). Frequency ops (FREQ0-3,
// STOP, STEP, DEV) are then turned into a 32-bit tuning word by ftw_calc, one clock
// later. The phase op (hundredths of a degree) goes through a second ftw_calc with
// 36000 as its reference and becomes round(v * 2^32 / 36000), a 32-bit fraction of a
// turn that wraps at 360 degrees. Other ops carry the binary value as is. The result leaves as one cfg_valid
// pulse with a cfg_wr_t. A frame with a non-BCD digit or an unknown op code is dropped
// and counted in status[7] (sticky) and not in the good-frame count status[6:0].
// Frame layout and op codes are this design's own; the source states only that the
// commands are BCD.
module cmd_parser
  import cwg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       cfg_valid,
  output cfg_wr_t    cfg,
  output logic [7:0] status
);
  localparam int unsigned BIN_W = 27;

  logic [2:0]       nbytes;
  logic [7:0]       cmd_q;
  logic [VAL_W-1:0] bcd_q;
  logic             done_q;      // full frame held in cmd_q/bcd_q
  logic [BIN_W-1:0] bin;
  logic             bad_digit;
  logic             ftw_vld;
  logic [FTW_W-1:0] ftw;
  logic             ph_vld;
  logic [FTW_W-1:0] ph;
  logic             pend_q;      // waiting for ftw_calc
  logic [6:0]       pend_cmd_q;  // channel and op code of that frame
  logic             err_q;
  logic [6:0]       good_q;

  bcd_to_bin #(.DIGITS(BCD_DIGITS), .OUT_W(BIN_W)) u_bcd (
    .bcd(bcd_q), .bin(bin), .bad_digit(bad_digit)
  );

  wire [4:0] op_raw   = cmd_q[4:0];
  wire       op_known = (op_raw <= 5'(OP_PHASE));
  wire       op_freq  = (op_raw <= 5'(OP_DEV));
  wire       op_phase = (op_raw == 5'(OP_PHASE));
  wire       accept   = done_q && !bad_digit && op_known;

  ftw_calc #(.IN_W(BIN_W), .FTW_W(FTW_W)) u_ftw (
    .clk(clk), .rst_n(rst_n),
    .in_valid(accept && op_freq), .freq(bin),
    .out_valid(ftw_vld), .ftw(ftw)
  );

  ftw_calc #(.IN_W(BIN_W), .FTW_W(FTW_W), .REF_HZ(64'd36000), .UNIT_HZ(64'd1)) u_phase (
    .clk(clk), .rst_n(rst_n),
    .in_valid(accept && op_phase), .freq(bin),
    .out_valid(ph_vld), .ftw(ph)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbytes     <= '0;
      cmd_q      <= '0;
      bcd_q      <= '0;
      done_q     <= 1'b0;
      pend_q     <= 1'b0;
      pend_cmd_q <= '0;
      cfg_valid  <= 1'b0;
      cfg        <= '{chan: 2'd0, op: OP_FREQ0, value: '0};
      err_q      <= 1'b0;
      good_q     <= '0;
    end else begin
      cfg_valid <= 1'b0;
      done_q    <= 1'b0;
      if (frame_start) begin
        nbytes <= '0;
      end else if (rx_valid) begin
        if (nbytes == 3'd0) cmd_q <= rx_data;
        else                bcd_q <= {bcd_q[VAL_W-9:0], rx_data};
        if (nbytes == 3'd4) begin
          nbytes <= '0;
          done_q <= 1'b1;
        end else begin
          nbytes <= nbytes + 3'd1;
        end
      end

      if (done_q) begin
        if (!accept) begin
          err_q <= 1'b1;
        end else begin
          good_q <= good_q + 7'd1;
          if (op_freq || op_phase) begin
            pend_q     <= 1'b1;
            pend_cmd_q <= {cmd_q[7:6], cmd_q[4:0]};
          end else begin
            cfg_valid <= 1'b1;
            cfg       <= '{chan: cmd_q[7:6], op: op_e'(op_raw), value: FTW_W'(bin)};
          end
        end
      end

      if (pend_q && (ftw_vld || ph_vld)) begin
        pend_q    <= 1'b0;
        cfg_valid <= 1'b1;
        cfg       <= '{chan: pend_cmd_q[6:5], op: op_e'(pend_cmd_q[4:0]),
                       value: ph_vld ? ph : ftw};
      end
    end
  end

  assign status = {err_q, good_q};
endmodule
