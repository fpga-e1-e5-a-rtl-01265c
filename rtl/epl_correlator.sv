// epl_correlator: early/prompt/late integrate-and-dump correlator.
//
// Each baseband sample (I, Q) is multiplied by the early, prompt and late
// replica chips (chip bit 0 -> +1, 1 -> -1) and added into six 32-bit
// accumulators I_E, I_P, I_L, Q_E, Q_P, Q_L. A sample that arrives with
// `dump` high starts a new integration period: the finished sums are
// copied to `corr` with `valid` high for one cycle and the accumulators
// restart from this sample's products. In the channel, `dump` marks the
// first sample of each prompt code period, giving the 1 ms coherent
// integration of the E5 tracking. Six accumulators and integrate-and-dump
// follow the receiver description; widths and the dump timing are this
// design's own.
module epl_correlator
  import gal_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   dump,
  input  logic signed [BB_W-1:0] x_i,
  input  logic signed [BB_W-1:0] x_q,
  input  logic                   c_e,
  input  logic                   c_p,
  input  logic                   c_l,
  output corr_t                  corr,
  output logic                   valid
);
  corr_t acc, nxt;

  function automatic logic signed [ACC_W-1:0] wipe(logic signed [BB_W-1:0] x, logic c);
    return c ? -ACC_W'(x) : ACC_W'(x);
  endfunction

  always_comb begin
    corr_t base;
    base   = dump ? '0 : acc;
    nxt.ie = base.ie + wipe(x_i, c_e);
    nxt.ip = base.ip + wipe(x_i, c_p);
    nxt.il = base.il + wipe(x_i, c_l);
    nxt.qe = base.qe + wipe(x_q, c_e);
    nxt.qp = base.qp + wipe(x_q, c_p);
    nxt.ql = base.ql + wipe(x_q, c_l);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      corr  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        acc <= nxt;
        if (dump) begin
          corr  <= acc;
          valid <= 1'b1;
        end
      end
    end
  end
endmodule
