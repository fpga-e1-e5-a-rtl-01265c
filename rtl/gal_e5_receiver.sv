// gal_e5_receiver: FPGA signal processing of a Galileo E5 receiver.
//
// Complex 8-bit samples at 112 MHz from the E5 front end feed, in parallel,
// NUM_CH tracking channels (e5_channel, eight by default) and one
// single-sideband snapshot acquisition unit (ssb_acq_unit). A time base
// (tic_gen) produces the TIC, 1250 per second: it aligns snapshot captures
// and latches every channel's measurements, which the host reads together
// with the TIC count.
//
// Work split with the host computer: the host starts a snapshot, reads the
// 64k-word capture from the external memory port, runs the FFT code search
// on it, and loads a channel with the carrier word, code word, code start
// delay and satellite code (register writes on the cfg_* port, channel
// selected by cfg_ch). The channel then tracks on its own (hardware DLL/PLL)
// and reports status, correlations, data symbols and TIC measurements.
//
// All outputs are registered in the blocks that drive them. The external
// snapshot memory and the link to the host are outside this module; their
// signals are ports.
module gal_e5_receiver
  import gal_pkg::*;
#(
  parameter int NUM_CH   = 8,
  parameter int CODE_LEN = E5_CODE_LEN,
  parameter int AW       = 16,
  parameter int CLK_HZ   = 112_000_000
) (
  input  logic                      clk,
  input  logic                      rst,
  // samples from the E5 front end / ADC
  input  logic                      s_valid,
  input  iq8_t                      s_in,
  // time base
  output logic                      tic,
  output logic [31:0]               tic_count,
  // snapshot acquisition unit
  input  logic                      acq_start,
  input  logic signed [NCO_W-1:0]   acq_fcw,
  output logic [31:0]               mem_data,
  output logic [AW-1:0]             mem_addr,
  output logic                      mem_we,
  output logic                      acq_busy,
  output logic                      acq_done,
  // channel register writes
  input  logic                      cfg_we,
  input  logic [$clog2(NUM_CH)-1:0] cfg_ch,
  input  chan_reg_e                 cfg_addr,
  input  logic [31:0]               cfg_wdata,
  // channel results
  output chan_status_e              status     [NUM_CH],
  output corr_t                     corr       [NUM_CH],
  output logic                      corr_valid [NUM_CH],
  output logic                      sym        [NUM_CH],
  output logic                      sym_valid  [NUM_CH],
  output logic                      lost       [NUM_CH],
  output meas_t                     meas       [NUM_CH],
  output logic                      meas_valid
);
  tic_gen #(.CLK_HZ(CLK_HZ), .TIC_HZ(TIC_HZ)) u_tic (
    .clk, .rst, .tic, .tic_count
  );

  ssb_acq_unit #(.AW(AW)) u_acq (
    .clk, .rst, .s_valid, .s_in, .nco_fcw(acq_fcw), .tic, .start(acq_start),
    .mem_data, .mem_addr, .mem_we, .busy(acq_busy), .done(acq_done)
  );

  logic mv [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    e5_channel #(.CODE_LEN(CODE_LEN)) u_ch (
      .clk, .rst, .s_valid, .s_in, .tic,
      .cfg_we(cfg_we && cfg_ch == ($clog2(NUM_CH))'(c)), .cfg_addr, .cfg_wdata,
      .status(status[c]), .corr(corr[c]), .corr_valid(corr_valid[c]),
      .sym_valid(sym_valid[c]), .sym(sym[c]), .lost(lost[c]),
      .meas(meas[c]), .meas_valid(mv[c])
    );
  end

  assign meas_valid = mv[0];
endmodule
