// chan_fsm: state of one tracking channel and its status number.
//
//   INIT (0) --acq_req--> ACQ (2) --start--> SSB (4) --sync--> PLL (5)
//   SSB/PLL --loss of lock--> ACQ;  any state --stop--> INIT;
//   a start from INIT is also accepted (parameters from a previous search).
//
// ACQ is the wait for the host's FFT search; `start` is the "acquisition
// success" command that loads the channel. SSB is tracking with bit
// synchronisation running and data demodulation off; PLL is the final
// state, loops locked and data demodulation on.
//
// Lock test, once per integration period (`upd`): an epoch is good when the
// prompt envelope is at least POW_THR and the Costas phase error is within
// +-PHASE_THR (2^-16 cycle). SYNC_N good epochs in a row complete the
// synchronisation (SSB -> PLL). An epoch counts against lock when the
// envelope is below POW_THR (in SSB, while the loops pull in) or when it is
// not good (in PLL); LOSS_N such epochs in a row are a loss of lock. The states, their numbers and transitions follow the receiver's
// tracking flow and status list; the lock test and its thresholds are this
// design's choice. `loss` pulses for one cycle when lock is lost.
module chan_fsm
  import gal_pkg::*;
#(
  parameter int unsigned POW_THR   = 32'd200_000,
  parameter int unsigned PHASE_THR = 6000,   // about 33 degrees
  parameter int unsigned SYNC_N    = 20,     // one 20 ms data bit of good epochs
  parameter int unsigned LOSS_N    = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               acq_req,
  input  logic               start,
  input  logic               stop,
  input  logic               upd,
  input  logic signed [17:0] carr_err,
  input  logic [ACC_W+1:0]   p_env,
  output chan_status_e       status,
  output logic               tracking,
  output logic               demod_on,
  output logic               loss
);
  localparam logic signed [17:0] PH_MAX = 18'(PHASE_THR);

  logic [7:0] good_cnt, bad_cnt;
  logic       good, low_pow;

  always_comb begin
    low_pow = (p_env < (ACC_W+2)'(POW_THR));
    good = (p_env >= (ACC_W+2)'(POW_THR)) &&
           (carr_err <= PH_MAX) && (carr_err >= -PH_MAX);
  end

  assign tracking = (status == CHST_SSB) || (status == CHST_PLL);
  assign demod_on = (status == CHST_PLL);

  always_ff @(posedge clk) begin
    if (rst) begin
      status   <= CHST_INIT;
      good_cnt <= '0;
      bad_cnt  <= '0;
      loss     <= 1'b0;
    end else begin
      loss <= 1'b0;
      if (stop) begin
        status <= CHST_INIT;
      end else if (start && (status == CHST_INIT || status == CHST_ACQ)) begin
        status   <= CHST_SSB;
        good_cnt <= '0;
        bad_cnt  <= '0;
      end else begin
        unique case (status)
          CHST_INIT: if (acq_req) status <= CHST_ACQ;
          CHST_SSB, CHST_PLL:
            if (upd) begin
              if (good) begin
                if (good_cnt != 8'hFF) good_cnt <= good_cnt + 8'd1;
                if (status == CHST_SSB && good_cnt + 8'd1 >= 8'(SYNC_N)) status <= CHST_PLL;
              end else begin
                good_cnt <= '0;
              end
              if (good || (status == CHST_SSB && !low_pow)) begin
                bad_cnt <= '0;
              end else begin
                bad_cnt  <= bad_cnt + 8'd1;
                if (bad_cnt + 8'd1 >= 8'(LOSS_N)) begin
                  status  <= CHST_ACQ;
                  loss    <= 1'b1;
                  bad_cnt <= '0;
                end
              end
            end
          default: ;
        endcase
      end
    end
  end
endmodule
