// channel_ctrl: mode controller for one DDS channel.
//
// Holds the channel's settings (four frequency slots, chirp stop and step, deviation,
// tone count, dwell and phase offset, all frequencies already as 32-bit tuning words)
// and, on an APPLY command, programs the DDS for the requested mode and then keeps it
// running. Every programming sequence starts with the control register and then writes
// the phase offset (top 14 bits of the 32-bit phase setting) into the phase offset word
// of each profile the mode uses, so all tones of a channel share one phase offset; the
// mode-specific writes follow:
//
//   FIXED  control register, then FTW0 = slot 0, update.
//   AM/FM  as FIXED with slot 0 as centre. Each 1 MHz ADC sample s (signed, ADC_W bits)
//          gives FTW0 = slot0 + (s * dev) >>> (ADC_W-1), written with an update, so a
//          full-scale input swings the output by +/- the deviation. The source describes
//          both modes as recomputing the tuning word from the ADC, and so both do here.
//   CHIRP  sweep-enabled control register, DFTW = step, ramp-rate word RAMP_RATE,
//          FTW0 = start, update. The DDS then steps up by DFTW every RAMP_RATE SYNC_CLK
//          periods. The controller divides (stop - start) by step to get the number of
//          steps, counts STEP_CLKS = RAMP_RATE*SYNC_NS/CLK_NS clocks per step, and after
//          that many steps issues a bare update, which (with the auto-clear bit set in
//          the control register) returns the DDS to the start frequency.
//   TDM    FTW0..FTW(count-1) = slots, update; then the profile-select pins step through
//          0..count-1, one step every dwell clocks.
//   FDM    FTW0 = slot 0, update; then every dwell clocks FTW0 is rewritten with the next
//          of the count slots, so the tones are produced one after another by rewriting
//          the tuning word rather than by profile pins.
//   BFSK   FTW0 = slot 0, FTW1 = slot 1, update; then PS0 follows the modulating bit
//          fsk_in (two-flop synchronised).
//
// cfg writes addressed to CHAN or to channel 3 (all) update the settings at any time;
// the programmed sequence uses them at the next APPLY, except the AM/FM centre and
// deviation, which are read for every sample. A RESET command pulses the DDS reset pin
// and returns to IDLE. The requests to the port driver follow a valid/ready handshake:
// a request stays unchanged until taken. The modes and what each programs follow the
// source; the register sequence, the formulas' scaling, the dwell as a clock count and
// the chirp bookkeeping are this design's.
module channel_ctrl
  import cwg_pkg::*;
#(
  parameter logic [1:0]  CHAN        = 2'd0,
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned RAMP_RATE   = 125,  // DDS SYNC_CLK periods per sweep step
  parameter int unsigned SYNC_NS     = 8,    // SYNC_CLK = 1 GHz / 8
  parameter int unsigned CLK_NS      = 20,   // 50 MHz controller clock
  parameter int unsigned DWELL_RESET = 50    // default TDM/FDM dwell, clocks
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_valid,
  input  cfg_wr_t                 cfg,
  input  logic                    sample_valid,
  input  logic signed [ADC_W-1:0] sample,
  input  logic                    fsk_in,
  output logic                    req_valid,
  input  logic                    req_ready,
  output logic [5:0]              req_addr,
  output logic [31:0]             req_data,
  output logic [2:0]              req_nbytes,
  output logic                    req_fud,
  output logic                    reset_req,
  output logic [1:0]              dds_ps,
  output mode_e                   mode,
  output logic                    adc_en,
  output logic                    running,
  output logic [31:0]             cur_ftw
);
  localparam int unsigned STEP_CLKS = RAMP_RATE * SYNC_NS / CLK_NS;

  // ---------------- settings ----------------
  logic [FTW_W-1:0] slot_q [NUM_SLOTS];
  logic [FTW_W-1:0] stop_q, step_q, dev_q;
  logic [2:0]       count_q;
  logic [31:0]      dwell_q;
  logic [POW_W-1:0] pow_q;

  wire for_me = cfg_valid && (cfg.chan == CHAN || cfg.chan == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SLOTS; i++) slot_q[i] <= '0;
      stop_q  <= '0;
      step_q  <= '0;
      dev_q   <= '0;
      count_q <= 3'd4;
      dwell_q <= DWELL_RESET;
      pow_q   <= '0;
    end else if (for_me) begin
      case (cfg.op)
        OP_FREQ0: slot_q[0] <= cfg.value;
        OP_FREQ1: slot_q[1] <= cfg.value;
        OP_FREQ2: slot_q[2] <= cfg.value;
        OP_FREQ3: slot_q[3] <= cfg.value;
        OP_STOP:  stop_q    <= cfg.value;
        OP_STEP:  step_q    <= cfg.value;
        OP_DEV:   dev_q     <= cfg.value;
        OP_COUNT: count_q   <= (cfg.value == 0) ? 3'd1 :
                               (cfg.value > 4)  ? 3'd4 : cfg.value[2:0];
        OP_DWELL: dwell_q   <= (cfg.value < 2) ? 32'd2 : cfg.value;
        OP_PHASE: pow_q     <= cfg.value[FTW_W-1 -: POW_W];
        default: ;
      endcase
    end
  end

  wire apply_cmd = for_me && cfg.op == OP_APPLY;
  wire reset_cmd = for_me && cfg.op == OP_RESET;

  // ---------------- programming list ----------------
  typedef struct packed {
    logic [5:0]  addr;
    logic [31:0] data;
    logic [2:0]  nbytes;
    logic        fud;
    logic        last;
  } wr_t;

  logic [3:0] wi;          // index into the programming list
  logic [2:0] np;          // profiles the mode uses, each gets a phase offset write
  logic [2:0] j;           // index into the mode-specific part of the list (1 = first)
  wr_t        wcur;

  always_comb begin
    np = (mode == MODE_TDM) ? count_q : (mode == MODE_BFSK) ? 3'd2 : 3'd1;
    j  = 3'(wi - 4'(np));
    wcur = '{addr: A_CFR, data: CFR_SINGLE, nbytes: 3'd4, fud: 1'b0, last: 1'b0};
    if (wi == 4'd0) begin
      if (mode == MODE_CHIRP) wcur.data = CFR_CHIRP;
    end else if (wi <= 4'(np)) begin
      wcur = '{addr: pow_addr(2'(wi - 4'd1)), data: 32'(pow_q), nbytes: 3'd2,
               fud: 1'b0, last: 1'b0};
    end else begin
      case (mode)
        MODE_CHIRP: begin
          case (j)
            3'd1: wcur = '{addr: A_DFTW,  data: step_q, nbytes: 3'd4, fud: 1'b0, last: 1'b0};
            3'd2: wcur = '{addr: A_DFRRW, data: 32'(RAMP_RATE), nbytes: 3'd2,
                           fud: 1'b0, last: 1'b0};
            default: wcur = '{addr: A_FTW0, data: slot_q[0], nbytes: 3'd4,
                              fud: 1'b1, last: 1'b1};
          endcase
        end
        MODE_TDM: begin
          wcur = '{addr: ftw_addr(2'(j - 3'd1)), data: slot_q[2'(j - 3'd1)],
                   nbytes: 3'd4, fud: 1'b0, last: 1'b0};
          if (j >= count_q) begin
            wcur.fud  = 1'b1;
            wcur.last = 1'b1;
          end
        end
        MODE_BFSK: begin
          wcur = '{addr: ftw_addr(2'(j - 3'd1)), data: slot_q[2'(j - 3'd1)],
                   nbytes: 3'd4, fud: (j == 3'd2), last: (j == 3'd2)};
        end
        default: wcur = '{addr: A_FTW0, data: slot_q[0], nbytes: 3'd4, fud: 1'b1, last: 1'b1};
      endcase
    end
  end

  // ---------------- chirp step count ----------------
  logic             div_start, div_done;
  logic [FTW_W-1:0] div_q;
  logic [FTW_W-1:0] nsteps_q;
  logic             nsteps_ok;

  udiv #(.W(FTW_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .num(stop_q - slot_q[0]), .den(step_q),
    .busy(), .done(div_done), .quot(div_q), .rem()
  );

  // ---------------- sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_PROG, S_LAST, S_RUN} state_e;
  state_e state;

  logic [1:0]             fsk_s;
  logic [31:0]            tick;        // dwell or step-clock counter
  logic [FTW_W-1:0]       stepn;       // chirp steps since last retrigger
  logic [1:0]             idx;         // TDM profile / FDM slot
  logic                   pend;        // AM/FM: a new tuning word waits for the port
  logic [FTW_W-1:0]       pend_ftw;

  logic signed [ADC_W+FTW_W:0] mod_prod;
  logic [FTW_W-1:0]            mod_ftw;
  always_comb begin
    mod_prod = $signed({{(ADC_W+1){1'b0}}, dev_q}) * (ADC_W+FTW_W+1)'(sample);
    mod_ftw  = slot_q[0] + FTW_W'(mod_prod >>> (ADC_W - 1));
  end

  wire accepted = req_valid && req_ready;

  assign adc_en  = (state == S_RUN) && (mode == MODE_AM || mode == MODE_FM);
  assign running = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode       <= MODE_IDLE;
      wi         <= '0;
      req_valid  <= 1'b0;
      req_addr   <= '0;
      req_data   <= '0;
      req_nbytes <= '0;
      req_fud    <= 1'b0;
      reset_req  <= 1'b0;
      dds_ps     <= '0;
      fsk_s      <= '0;
      tick       <= '0;
      stepn      <= '0;
      idx        <= '0;
      pend       <= 1'b0;
      pend_ftw   <= '0;
      div_start  <= 1'b0;
      nsteps_q   <= '0;
      nsteps_ok  <= 1'b0;
    end else begin
      fsk_s     <= {fsk_s[0], fsk_in};
      div_start <= 1'b0;
      reset_req <= 1'b0;
      if (accepted) req_valid <= 1'b0;
      if (div_done) begin
        nsteps_q  <= div_q;
        nsteps_ok <= (step_q != 0) && (stop_q > slot_q[0]);
      end

      if (reset_cmd) begin
        state     <= S_IDLE;
        mode      <= MODE_IDLE;
        req_valid <= 1'b0;
        reset_req <= 1'b1;
        dds_ps    <= '0;
        pend      <= 1'b0;
      end else if (apply_cmd) begin
        state     <= S_PROG;
        mode      <= mode_e'(cfg.value[2:0]);
        wi        <= '0;
        req_valid <= 1'b0;
        dds_ps    <= '0;
        idx       <= '0;
        pend      <= 1'b0;
        nsteps_ok <= 1'b0;
        div_start <= (mode_e'(cfg.value[2:0]) == MODE_CHIRP);
        if (mode_e'(cfg.value[2:0]) == MODE_IDLE) state <= S_IDLE;
      end else begin
        case (state)
          S_IDLE: ;
          S_PROG: begin
            if (!req_valid) begin
              req_valid  <= 1'b1;
              req_addr   <= wcur.addr;
              req_data   <= wcur.data;
              req_nbytes <= wcur.nbytes;
              req_fud    <= wcur.fud;
            end else if (accepted) begin
              if (wcur.last) state <= S_LAST;
              else           wi    <= wi + 4'd1;
            end
          end
          S_LAST: begin
            // the final write and its update have left the port: the mode is live
            if (req_ready) begin
              state <= S_RUN;
              tick  <= '0;
              stepn <= '0;
              idx   <= (mode == MODE_FDM && count_q > 1) ? 2'd1 : 2'd0;
            end
          end
          S_RUN: begin
            case (mode)
              MODE_AM, MODE_FM: begin
                if (sample_valid) begin
                  pend     <= 1'b1;
                  pend_ftw <= mod_ftw;
                end
                if (pend && !req_valid && !sample_valid) begin
                  pend       <= 1'b0;
                  req_valid  <= 1'b1;
                  req_addr   <= A_FTW0;
                  req_data   <= pend_ftw;
                  req_nbytes <= 3'd4;
                  req_fud    <= 1'b1;
                end
              end
              MODE_CHIRP: begin
                if (nsteps_ok) begin
                  if (tick == 32'(STEP_CLKS - 1)) begin
                    tick <= '0;
                    if (stepn == nsteps_q - 1) begin
                      stepn <= '0;
                      if (!req_valid) begin
                        req_valid  <= 1'b1;
                        req_nbytes <= 3'd0;
                        req_fud    <= 1'b1;
                      end
                    end else begin
                      stepn <= stepn + 1'b1;
                    end
                  end else begin
                    tick <= tick + 32'd1;
                  end
                end
              end
              MODE_TDM: begin
                if (tick >= dwell_q - 32'd1) begin
                  tick   <= '0;
                  dds_ps <= ({1'b0, dds_ps} >= count_q - 3'd1) ? 2'd0 : dds_ps + 2'd1;
                end else begin
                  tick <= tick + 32'd1;
                end
              end
              MODE_FDM: begin
                if (tick >= dwell_q - 32'd1) begin
                  if (!req_valid) begin
                    tick       <= '0;
                    req_valid  <= 1'b1;
                    req_addr   <= A_FTW0;
                    req_data   <= slot_q[idx];
                    req_nbytes <= 3'd4;
                    req_fud    <= 1'b1;
                    idx        <= ({1'b0, idx} >= count_q - 3'd1) ? 2'd0 : idx + 2'd1;
                  end
                end else begin
                  tick <= tick + 32'd1;
                end
              end
              MODE_BFSK: dds_ps <= {1'b0, fsk_s[1]};
              default: ;
            endcase
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // ---------------- mirror of the DDS tuning words ----------------
  // Copies of what has been written to the four profile registers (shadow) and what an
  // update has made active, so cur_ftw tells which tuning word the DDS is producing
  // with the present profile pins. The sweep progress of a chirp is not tracked: in
  // chirp mode cur_ftw is the start word.
  logic [FTW_W-1:0] shadow_q [NUM_SLOTS];
  logic [FTW_W-1:0] active_q [NUM_SLOTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_SLOTS; p++) begin
        shadow_q[p] <= '0;
        active_q[p] <= '0;
      end
    end else if (reset_cmd) begin
      for (int p = 0; p < NUM_SLOTS; p++) begin
        shadow_q[p] <= '0;
        active_q[p] <= '0;
      end
    end else if (accepted) begin
      for (int p = 0; p < NUM_SLOTS; p++) begin
        if (req_nbytes == 3'd4 && req_addr == ftw_addr(2'(p))) begin
          shadow_q[p] <= req_data;
          if (req_fud) active_q[p] <= req_data;
        end else if (req_fud) begin
          active_q[p] <= shadow_q[p];
        end
      end
    end
  end

  assign cur_ftw = active_q[dds_ps];

  // A request must stay unchanged until the port driver takes it.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && !req_ready && !apply_cmd && !reset_cmd) |=>
      (req_valid && $stable(req_addr) && $stable(req_data) && $stable(req_nbytes)
       && $stable(req_fud)));
endmodule
