// ad9858_port: write engine for the parallel control port of one AD9858 DDS.
//
// The DDS is controlled through 20 lines: data D[7:0], address A[5:0], write strobe WR_N,
// read strobe RD_N, frequency update FUD, profile select PS[1:0] and RESET. This block
// drives all of them except PS, which belongs to the mode controller. A request writes
// req_nbytes (0..4) bytes of req_data, least significant byte first, to consecutive
// addresses starting at req_addr, and then, if req_fud is set, pulses FUD so the DDS
// moves its buffered registers into the active ones. A request with zero bytes and
// req_fud set is a bare update pulse (used to retrigger a chirp). reset_req pulses
// RESET for RESET_CLKS clocks. The engine never reads, so RD_N stays high.
//
// Timing per byte (clk cycles): SETUP_CLKS with address and data set up and WR_N high,
// WR_CLKS with WR_N low, then HOLD_CLKS with WR_N high and address/data held. With the
// defaults at 50 MHz that is 4 cycles, 80 ns, per byte, inside the port's 100 MHz limit
// stated in the source. FUD stays high FUD_CLKS cycles, longer than one 8 ns SYNC_CLK
// period of the DDS. req_ready is high only in the idle state; a request is taken when
// req_valid and req_ready are both high. All timing values are this design's choices.
module ad9858_port #(
  parameter int unsigned SETUP_CLKS = 1,
  parameter int unsigned WR_CLKS    = 2,
  parameter int unsigned HOLD_CLKS  = 1,
  parameter int unsigned FUD_CLKS   = 2,
  parameter int unsigned RESET_CLKS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [5:0]  req_addr,
  input  logic [31:0] req_data,
  input  logic [2:0]  req_nbytes,
  input  logic        req_fud,
  input  logic        reset_req,
  output logic [7:0]  dds_d,
  output logic [5:0]  dds_a,
  output logic        dds_wr_n,
  output logic        dds_rd_n,
  output logic        dds_fud,
  output logic        dds_reset
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD, S_FUD, S_RESET} state_e;

  state_e      state;
  logic [31:0] data_q;
  logic [2:0]  left_q;
  logic        fud_q;
  logic [7:0]  cnt;

  assign req_ready = (state == S_IDLE) && !reset_req;
  assign dds_rd_n  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      data_q    <= '0;
      left_q    <= '0;
      fud_q     <= 1'b0;
      cnt       <= '0;
      dds_d     <= '0;
      dds_a     <= '0;
      dds_wr_n  <= 1'b1;
      dds_fud   <= 1'b0;
      dds_reset <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (reset_req) begin
            state     <= S_RESET;
            dds_reset <= 1'b1;
            cnt       <= 8'(RESET_CLKS - 1);
          end else if (req_valid) begin
            fud_q <= req_fud;
            if (req_nbytes != 3'd0) begin
              state  <= S_SETUP;
              dds_a  <= req_addr;
              dds_d  <= req_data[7:0];
              data_q <= req_data >> 8;
              left_q <= req_nbytes - 3'd1;
              cnt    <= 8'(SETUP_CLKS - 1);
            end else if (req_fud) begin
              state   <= S_FUD;
              dds_fud <= 1'b1;
              cnt     <= 8'(FUD_CLKS - 1);
            end
          end
        end
        S_SETUP: begin
          if (cnt == 0) begin
            state    <= S_STROBE;
            dds_wr_n <= 1'b0;
            cnt      <= 8'(WR_CLKS - 1);
          end else cnt <= cnt - 8'd1;
        end
        S_STROBE: begin
          if (cnt == 0) begin
            state    <= S_HOLD;
            dds_wr_n <= 1'b1;
            cnt      <= 8'(HOLD_CLKS - 1);
          end else cnt <= cnt - 8'd1;
        end
        S_HOLD: begin
          if (cnt == 0) begin
            if (left_q != 3'd0) begin
              state  <= S_SETUP;
              dds_a  <= dds_a + 6'd1;
              dds_d  <= data_q[7:0];
              data_q <= data_q >> 8;
              left_q <= left_q - 3'd1;
              cnt    <= 8'(SETUP_CLKS - 1);
            end else if (fud_q) begin
              state   <= S_FUD;
              dds_fud <= 1'b1;
              cnt     <= 8'(FUD_CLKS - 1);
            end else begin
              state <= S_IDLE;
            end
          end else cnt <= cnt - 8'd1;
        end
        S_FUD: begin
          if (cnt == 0) begin
            state   <= S_IDLE;
            dds_fud <= 1'b0;
          end else cnt <= cnt - 8'd1;
        end
        S_RESET: begin
          if (cnt == 0) begin
            state     <= S_IDLE;
            dds_reset <= 1'b0;
          end else cnt <= cnt - 8'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Port rules: address and data must not change while the write strobe is low, and
  // a frequency update is never issued in the middle of a write.
  a_stable_under_wr: assert property (@(posedge clk) disable iff (!rst_n)
    (!dds_wr_n && $past(!dds_wr_n)) |-> ($stable(dds_a) && $stable(dds_d)));
  a_no_fud_in_wr: assert property (@(posedge clk) disable iff (!rst_n)
    !(dds_fud && !dds_wr_n));
endmodule
