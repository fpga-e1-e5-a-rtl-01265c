// e5_channel: one E5 tracking channel (one "E5 correlator" of the receiver).
//
// Follows the classic tracking structure: the complex input is wiped of its
// carrier (carrier_nco + complex_mixer, "Doppler removal"), correlated with
// early, prompt and late replicas of the primary code (e5_prn_gen driven by
// code_nco, epl_correlator), and once per code period (1 ms) the sums go to
// track_loop, whose carrier and code corrections steer the two NCOs.
// chan_fsm keeps the channel state; on every TIC a measurement set (code
// phase, carrier phase, carrier word, power, status) is latched for the
// host.
//
// Replica timing: code_nco ticks twice per chip. Each tick pushes the
// generator's current chip into a three-slot line (early, prompt, late), and
// the generator steps on every second tick, so early leads prompt and
// prompt leads late by half a chip (one chip early-late spacing). The first
// half of chip 0 reaching the prompt slot marks a code epoch and dumps the
// correlator. One channel tracks one sideband (E5a or E5b, bit 14 of
// REG_PRN_INIT), as in the single-sideband tracking state.
//
// Host interface: word writes (`cfg_we`, `cfg_addr`, `cfg_wdata`) with the
// map of gal_pkg::chan_reg_e. A start (REG_CTRL bit 0) clears both NCOs,
// reloads the code and holds the code for REG_DELAY samples, which sets the
// code phase found by acquisition. The sample path adds a fixed three-cycle
// latency (input register, NCO, mixer) between sample and correlator.
// Outputs: the correlator sums each period, a data symbol (sign of I_P) per
// period while demodulation is on, and `meas` on each TIC.
module e5_channel
  import gal_pkg::*;
#(
  parameter int CODE_LEN = E5_CODE_LEN,
  parameter int unsigned POW_THR = 32'd200_000,
  parameter int unsigned SYNC_N  = 20,
  parameter int unsigned LOSS_N  = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         s_valid,
  input  iq8_t         s_in,
  input  logic         tic,
  // host register writes
  input  logic         cfg_we,
  input  chan_reg_e    cfg_addr,
  input  logic [31:0]  cfg_wdata,
  // results
  output chan_status_e status,
  output corr_t        corr,
  output logic         corr_valid,
  output logic         sym_valid,
  output logic         sym,        // 1 = negative prompt I
  output logic         lost,       // pulse: loss of lock
  output meas_t        meas,
  output logic         meas_valid
);
  // ------------------------------------------------------------ registers
  logic signed [NCO_W-1:0] carr_fcw0;
  logic        [NCO_W-1:0] code_fcw0;
  logic        [13:0]      prn_init;
  logic                    sel_b;
  logic        [31:0]      delay;
  logic                    loop_en;
  logic        [7:0]       sat_id;
  logic                    start, stop, acq_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      carr_fcw0 <= '0; code_fcw0 <= CODE_FCW_NOM; prn_init <= '0; sel_b <= 1'b0;
      delay <= '0; loop_en <= 1'b0; sat_id <= '0; start <= 1'b0; stop <= 1'b0; acq_req <= 1'b0;
    end else begin
      start   <= 1'b0;
      stop    <= 1'b0;
      acq_req <= 1'b0;
      if (cfg_we) begin
        unique case (cfg_addr)
          REG_CARR_FCW: carr_fcw0 <= cfg_wdata;
          REG_CODE_FCW: code_fcw0 <= cfg_wdata;
          REG_PRN_INIT: begin prn_init <= cfg_wdata[13:0]; sel_b <= cfg_wdata[14]; end
          REG_DELAY:    delay <= cfg_wdata;
          REG_CTRL:     begin
            start <= cfg_wdata[0]; loop_en <= cfg_wdata[1];
            stop  <= cfg_wdata[2]; acq_req <= cfg_wdata[3];
          end
          REG_SAT_ID:   sat_id <= cfg_wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ carrier path
  logic signed [NCO_W-1:0] carr_corr, code_corr, carr_fcw;
  logic        [NCO_W-1:0] code_fcw, carr_phase, code_phase;
  logic signed [31:0]      carr_cyc;
  lo_t                     lo_cos, lo_sin;
  iq8_t                    s_d;
  logic                    s_valid_d;
  logic                    tracking, demod_on;

  assign carr_fcw = carr_fcw0 + carr_corr;
  assign code_fcw = code_fcw0 + code_corr;

  carrier_nco u_carr (
    .clk, .rst, .load(start), .en(s_valid), .fcw(carr_fcw),
    .phase(carr_phase), .cycles(carr_cyc), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s_d <= '0; s_valid_d <= 1'b0;
    end else begin
      s_d <= s_in; s_valid_d <= s_valid;
    end
  end

  logic                   bb_valid;
  logic signed [BB_W-1:0] bb_i, bb_q;

  complex_mixer u_mix (
    .clk, .rst, .valid_i(s_valid_d), .x_i(s_d.i), .x_q(s_d.q),
    .lo_cos, .lo_sin, .valid_o(bb_valid), .y_i(bb_i), .y_q(bb_q)
  );

  // ------------------------------------------------------------ code path
  logic [31:0] wait_cnt;
  logic        code_run;
  logic        code_tick;
  logic        half;        // 0: first half of the generator's chip
  logic        prn_chip;
  logic [13:0] prn_idx;

  always_ff @(posedge clk) begin
    if (rst || stop) begin
      wait_cnt <= '0;
      code_run <= 1'b0;
    end else if (start) begin
      wait_cnt <= delay;
      code_run <= (delay == '0);
    end else if (!code_run && s_valid && tracking) begin
      if (wait_cnt <= 32'd1) code_run <= 1'b1;
      wait_cnt <= wait_cnt - 32'd1;
    end
  end

  code_nco u_code (
    .clk, .rst, .load(start), .en(s_valid && code_run), .fcw(code_fcw),
    .phase(code_phase), .tick(code_tick)
  );

  logic prn_last;   // end-of-code flag, not needed (epochs come from the dumps)

  e5_prn_gen #(.CODE_LEN(CODE_LEN)) u_prn (
    .clk, .rst, .init(start), .adv(code_tick && half), .sel_b,
    .init2(prn_init), .chip(prn_chip), .idx(prn_idx), .last(prn_last)
  );

  typedef struct packed {
    logic        chip;
    logic [13:0] idx;
    logic        half;
  } slot_t;
  slot_t early, prompt;
  logic  late_chip;
  logic  dump_pend;
  logic [31:0] epochs;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      half      <= 1'b0;
      early     <= '{chip: 1'b0, idx: '0, half: 1'b1};   // not an epoch mark
      prompt    <= '{chip: 1'b0, idx: '0, half: 1'b1};
      late_chip <= 1'b0;
      dump_pend <= 1'b0;
      epochs    <= '0;
    end else begin
      if (code_tick) begin
        half   <= ~half;
        early  <= '{chip: prn_chip, idx: prn_idx, half: half};
        prompt <= early;
        late_chip <= prompt.chip;
        if (early.idx == '0 && !early.half) begin
          dump_pend <= 1'b1;
          epochs    <= epochs + 32'd1;
        end
      end
      if (bb_valid && dump_pend && !(code_tick && early.idx == '0 && !early.half)) dump_pend <= 1'b0;
    end
  end

  corr_t corr_raw;
  logic  corr_raw_valid, primed;

  epl_correlator u_corr (
    .clk, .rst, .en(bb_valid && code_run), .dump(dump_pend),
    .x_i(bb_i), .x_q(bb_q), .c_e(early.chip), .c_p(prompt.chip), .c_l(late_chip),
    .corr(corr_raw), .valid(corr_raw_valid)
  );

  // The first dump after a start closes a partial period: drop it.
  always_ff @(posedge clk) begin
    if (rst || start) primed <= 1'b0;
    else if (corr_raw_valid) primed <= 1'b1;
  end

  assign corr       = corr_raw;
  assign corr_valid = corr_raw_valid && primed;

  // ------------------------------------------------------------ loops & state
  logic               upd;
  logic signed [17:0] carr_err;
  logic [ACC_W+1:0]   p_env;

  // The code discriminator output is only used inside the loop; it and the
  // end-of-code flag are collected here as deliberately unused.
  logic signed [16:0] code_err;
  logic               unused_ch;
  assign unused_ch = ^{code_err, prn_last};

  track_loop u_loop (
    .clk, .rst, .enable(loop_en && tracking), .corr_valid(corr_valid && tracking), .corr(corr_raw),
    .upd, .carr_err, .code_err(code_err), .p_env, .carr_corr, .code_corr
  );

  chan_fsm #(.POW_THR(POW_THR), .SYNC_N(SYNC_N), .LOSS_N(LOSS_N)) u_fsm (
    .clk, .rst, .acq_req, .start, .stop, .upd, .carr_err, .p_env,
    .status, .tracking, .demod_on, .loss(lost)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_valid <= 1'b0; sym <= 1'b0;
    end else begin
      sym_valid <= corr_valid && demod_on;
      if (corr_valid) sym <= corr_raw.ip[ACC_W-1];
    end
  end

  // ------------------------------------------------------------ TIC latch
  always_ff @(posedge clk) begin
    if (rst) begin
      meas <= '0; meas_valid <= 1'b0;
    end else begin
      meas_valid <= tic;
      if (tic) begin
        meas.status    <= status;
        meas.sat_id    <= sat_id;
        meas.epochs    <= epochs;
        meas.chip      <= prompt.idx;
        meas.half      <= prompt.half;
        meas.code_frac <= code_phase;
        meas.carr_cyc  <= carr_cyc;
        meas.carr_frac <= carr_phase;
        meas.carr_fcw  <= carr_fcw;
        meas.power     <= p_env[ACC_W-1:0];
      end
    end
  end
endmodule
