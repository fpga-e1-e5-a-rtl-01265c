// tb_e5_channel: closed-loop test of one tracking channel on a synthetic
// E5a signal: reference primary code, +2000 Hz Doppler, amplitude 12 in
// uniform noise of +-20, 8-bit I/Q at 112 MHz. The channel is started the
// way the host would after acquisition, with a carrier word 5 Hz off and a
// code start 3 samples (0.27 chip) late, loops enabled. Checks:
//  - the state reaches SSB, then PLL (20 good epochs), within 100 ms
//  - correlator dumps come every 112000 samples (1 ms integration)
//  - after lock: carrier word within 1.5 Hz of the true Doppler, prompt
//    envelope above early and late, early and late balanced within 30 % (the 5 Hz DLL is still pulling in)
//  - TIC measurement: prompt chip index within one chip of the true code
//    phase of the sample being correlated, and carrier cycles between two
//    TICs = 2000 Hz * 800 us = 1.6 cycles (+-0.1)
//  - data symbols are emitted only in PLL and are constant (no data here).
module tb_e5_channel;
  import gal_pkg::*;
  import e5_ref_pkg::*;
  localparam real FD    = 2000.0;
  localparam real CHIPS_PER_SAMPLE = 10.23e6 / 112.0e6;
  localparam int  D0    = 50_000;     // sample at which the signal's chip 0 begins
  localparam int  NS    = 2_000;      // sample at which the channel is started
  localparam int  LAT   = 3;          // input-to-correlator latency of the channel
  localparam logic [13:0] INIT2 = 14'h1A2B;

  logic clk = 0, rst = 1, s_valid = 0, tic = 0;
  iq8_t s_in;
  logic cfg_we = 0;
  chan_reg_e cfg_addr;
  logic [31:0] cfg_wdata;
  chan_status_e status;
  corr_t corr;
  logic corr_valid, sym_valid, sym, lost, meas_valid;
  meas_t meas;
  int checks = 0, failures = 0;

  e5_channel dut (.clk, .rst, .s_valid, .s_in, .tic, .cfg_we, .cfg_addr, .cfg_wdata,
    .status, .corr, .corr_valid, .sym_valid, .sym, .lost, .meas, .meas_valid);

  always #5 clk = ~clk;

  initial begin
    #1_100_000_000;   // 110 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  code_t code;
  longint n = 0;          // index of the sample now on s_in

  // signal source: one sample per clock
  always @(posedge clk) begin
    real ph, c;
    longint m;
    m = n + 1;
    if (m >= D0) c = code[int'(longint'($floor(real'(m - D0) * CHIPS_PER_SAMPLE)) % 10230)] ? -1.0 : 1.0;
    else c = 0.0;
    ph = 2.0 * 3.14159265358979 * FD * real'(m) / FS_HZ + 0.7;
    s_in.i <= 8'($rtoi($floor(12.0 * c * $cos(ph) + 0.5)) + $urandom_range(0, 40) - 20);
    s_in.q <= 8'($rtoi($floor(12.0 * c * $sin(ph) + 0.5)) + $urandom_range(0, 40) - 20);
    s_valid <= 1'b1;
    n <= m;
  end

  // TIC every 89600 samples
  always @(posedge clk) tic <= (n % 89600 == 89599);

  task automatic wr(input chan_reg_e a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  longint last_dump = -1;
  int dumps = 0, bad_rate = 0, syms = 0, sym_first = -1, sym_changes = 0, syms_early = 0;
  int ssb_seen = 0, pll_ms = -1;
  always @(negedge clk) if (!rst) begin
    if (corr_valid) begin
      if (last_dump >= 0 && (n - last_dump > 112001 || n - last_dump < 111999)) bad_rate++;
      last_dump = n; dumps++;
    end
    if (sym_valid) begin
      if (status != CHST_PLL) syms_early++;
      if (sym_first < 0) sym_first = sym;
      else if (int'(sym) != sym_first) sym_changes++;
      syms++;
    end
    if (status == CHST_SSB) ssb_seen = 1;
    if (status == CHST_PLL && pll_ms < 0) pll_ms = int'(n / 112000);
  end

  initial begin
    longint delay;
    real f_err, pe, ee, le, true_chip;
    logic signed [31:0] cyc0;
    logic [31:0] frac0;
    real dcyc;
    int tics;
    code = e5_code(1'b0, INIT2);
    cfg_addr = REG_CTRL; cfg_wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (n == NS - 14);
    // local prompt chip 0 to begin at D0 + 3 (samples): the start reaches the
    // channel at NS, and the prompt slot trails the code start by half a chip
    delay = D0 - NS - LAT - 6 + 3;
    wr(REG_CARR_FCW, hz_to_fcw(FD - 5.0));
    wr(REG_CODE_FCW, CODE_FCW_NOM);
    wr(REG_PRN_INIT, {17'd0, 1'b0, INIT2});
    wr(REG_DELAY, 32'(delay));
    wr(REG_SAT_ID, 32'd52);
    wr(REG_CTRL, 32'h3);
    $display("start at sample %0d", n);
    // run until lock plus 15 ms, at most 100 ms
    while (n < 100 * 112000 && !(pll_ms >= 0 && n > (pll_ms + 15) * 112000)) @(negedge clk);
    checks++;
    if (!ssb_seen || status != CHST_PLL) begin failures++; $display("FAIL status %0d (ssb seen %0d)", status, ssb_seen); end
    else $display("locked (PLL state) at %0d ms", pll_ms);
    checks++;
    if (dumps < 20 || bad_rate != 0) begin failures++; $display("FAIL dumps %0d, %0d off-rate", dumps, bad_rate); end
    // frequency
    f_err = real'(meas.carr_fcw) * FS_HZ / 4294967296.0 - FD;
    wait (corr_valid); @(negedge clk);
    f_err = real'(dut.carr_fcw) * FS_HZ / 4294967296.0 - FD;
    checks++;
    if (f_err > 1.5 || f_err < -1.5) begin failures++; $display("FAIL frequency error %f Hz", f_err); end
    pe = $sqrt(real'(corr.ip) ** 2 + real'(corr.qp) ** 2);
    ee = $sqrt(real'(corr.ie) ** 2 + real'(corr.qe) ** 2);
    le = $sqrt(real'(corr.il) ** 2 + real'(corr.ql) ** 2);
    $display("P %f E %f L %f  f_err %f Hz", pe, ee, le, f_err);
    checks++;
    if (!(pe > ee && pe > le) || ee > 1.3 * le || le > 1.3 * ee) begin failures++; $display("FAIL code alignment"); end
    // TIC measurements
    tics = 0;
    while (tics < 2) begin
      @(negedge clk);
      if (meas_valid) begin
        tics++;
        if (tics == 1) begin cyc0 = meas.carr_cyc; frac0 = meas.carr_frac; end
        else begin
          dcyc = real'(meas.carr_cyc - cyc0) + (real'(meas.carr_frac) - real'(frac0)) / 4294967296.0;
          checks++;
          if (dcyc > 1.7 || dcyc < 1.5) begin failures++; $display("FAIL carrier cycles per TIC %f", dcyc); end
          // the TIC was seen one cycle before meas_valid
          true_chip = $floor(real'(n - 2 - LAT - D0) * CHIPS_PER_SAMPLE);
          true_chip = true_chip - 10230.0 * $floor(true_chip / 10230.0);
          checks++;
          if ((real'(meas.chip) - true_chip > 1.0 && real'(meas.chip) - true_chip < 10229.0) ||
              (true_chip - real'(meas.chip) > 1.0 && true_chip - real'(meas.chip) < 10229.0)) begin
            failures++; $display("FAIL chip %0d expected %f", meas.chip, true_chip);
          end
          checks++;
          if (meas.sat_id != 52 || meas.status != 3'(CHST_PLL)) begin failures++; $display("FAIL meas id/status"); end
        end
      end
    end
    checks++;
    if (syms < 5 || syms_early != 0 || sym_changes != 0) begin
      failures++; $display("FAIL symbols %0d early %0d changes %0d", syms, syms_early, sym_changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
