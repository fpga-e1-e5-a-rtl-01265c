// tb_gal_e5_receiver: end-to-end run of the receiver at its default size
// (8 channels, 64k-word snapshot, 10230-chip codes, 112 MHz, TIC 1250 Hz).
//
// Input: two synthetic E5a satellites (ids 51 and 52), different codes,
// Dopplers (+1500 Hz, -2500 Hz) and code delays, amplitude 10 each in
// +-20 uniform noise. The testbench plays the host:
//  1. starts a snapshot with the NCO on satellite 51's Doppler, stores the
//     64k words in a memory model and searches 1 ms of it for the code of
//     satellite 51 over +-30 decimated-sample lags: the peak must be at the
//     true delay (within 2 samples) and stand 3x above the off-peak mean;
//  2. loads channel 0 and 1 with the two satellites (3 Hz and 2 samples
//     off), channel 2 with an acquisition request only, and channel 3 with
//     a satellite that is not in the signal;
//  3. checks that 0 and 1 reach the locked state, that their TIC
//     measurements give the right satellite, code phase (+-1 chip) and
//     Doppler (+-2 Hz), that channel 3 loses lock, and that stop returns it
//     to the initial state.
// Each mechanism is counted (snapshot capture, TIC, acquisition request,
// start, bit sync to locked state, loss of lock, stop, data symbols, TIC
// measurements); one that never happens is a failure.
module tb_gal_e5_receiver;
  import gal_pkg::*;
  import e5_ref_pkg::*;
  localparam real CPS = 10.23e6 / 112.0e6;   // chips per sample
  localparam int  LAT = 3;                   // sample-to-correlator latency
  localparam int  NCH = 8;

  localparam real         FD   [2] = '{1500.0, -2500.0};
  localparam int          DLY  [2] = '{40_000, 77_777};
  localparam logic [13:0] PRN  [2] = '{14'h1A2B, 14'h0F0F};
  localparam logic [13:0] PRN_ABSENT = 14'h2C5D;

  logic clk = 0, rst = 1, s_valid = 0;
  iq8_t s_in;
  logic tic, acq_start = 0, mem_we, acq_busy, acq_done;
  logic [31:0] tic_count, mem_data;
  logic [15:0] mem_addr;
  logic signed [31:0] acq_fcw;
  logic cfg_we = 0;
  logic [2:0] cfg_ch;
  chan_reg_e cfg_addr;
  logic [31:0] cfg_wdata;
  chan_status_e status [NCH];
  corr_t corr [NCH];
  logic corr_valid [NCH], sym [NCH], sym_valid [NCH], lost [NCH];
  meas_t meas [NCH];
  logic meas_valid;
  int checks = 0, failures = 0;

  gal_e5_receiver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_500_000_000;   // 150 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ signal
  code_t code [2];
  longint n = 0;
  always @(posedge clk) begin
    real si, sq, ph, c;
    longint m;
    m = n + 1;
    si = 0.0; sq = 0.0;
    for (int s = 0; s < 2; s++) begin
      if (m >= DLY[s]) begin
        c = code[s][int'(longint'($floor(real'(m - DLY[s]) * CPS)) % 10230)] ? -10.0 : 10.0;
        ph = 2.0 * 3.14159265358979 * FD[s] * real'(m) / FS_HZ + 0.3 * s;
        si += c * $cos(ph); sq += c * $sin(ph);
      end
    end
    s_in.i <= 8'($rtoi($floor(si + 0.5)) + $urandom_range(0, 40) - 20);
    s_in.q <= 8'($rtoi($floor(sq + 0.5)) + $urandom_range(0, 40) - 20);
    s_valid <= 1'b1;
    n <= m;
  end

  // ------------------------------------------------------------ external snapshot memory model
  logic [31:0] snap [65536];
  longint first_we_n = -1;
  int writes = 0, dones = 0, tics = 0, meas_tics = 0, syms = 0, sym_chg [2] = '{0, 0};
  int losses = 0, bad_addr = 0;
  int sym_first [2] = '{-1, -1};
  longint last_tic = -1;
  int bad_tic = 0;
  int seen_acq = 0, seen_ssb = 0, seen_pll = 0, seen_init_after_stop = 0;

  always @(negedge clk) if (!rst) begin
    if (mem_we) begin
      snap[mem_addr] = mem_data;
      if (mem_addr != 16'(writes)) bad_addr++;
      if (writes == 0) first_we_n = n;
      writes++;
    end
    if (acq_done) dones++;
    if (tic) begin
      if (last_tic >= 0 && n - last_tic != 89600) bad_tic++;
      last_tic = n; tics++;
    end
    if (meas_valid) meas_tics++;
    for (int c = 0; c < NCH; c++) begin
      if (lost[c]) losses++;
      if (status[c] == CHST_ACQ) seen_acq |= (1 << c);
      if (status[c] == CHST_SSB) seen_ssb |= (1 << c);
      if (status[c] == CHST_PLL) seen_pll |= (1 << c);
    end
    for (int c = 0; c < 2; c++) if (sym_valid[c]) begin
      syms++;
      if (sym_first[c] < 0) sym_first[c] = sym[c];
      else if (int'(sym[c]) != sym_first[c]) sym_chg[c]++;
    end
  end

  task automatic wr(input int ch, input chan_reg_e a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_ch = 3'(ch); cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // host-side snapshot search: correlation of 1 ms of the snapshot with the
  // code of satellite 0, resampled to the 18.667 MHz snapshot rate
  task automatic snapshot_search();
    real best, sum_off, v, ci, cq, pred;
    int best_lag, n_off;
    // word k holds the sum of input samples [n0 + 6k, n0 + 6k + 5]
    pred = real'(first_we_n) - 12.0;   // input sample of word 0 (about)
    best = 0.0; best_lag = 0; sum_off = 0.0; n_off = 0;
    for (int lag = -30; lag <= 30; lag++) begin
      ci = 0.0; cq = 0.0;
      for (int k = 0; k < 18667; k++) begin
        real t;
        int ch;
        t = pred + 6.0 * real'(k + lag) + 2.5 - real'(DLY[0]);
        ch = int'(longint'($floor(t * CPS)) % 10230);
        if (ch < 0) ch += 10230;
        v = code[0][ch] ? -1.0 : 1.0;
        ci += v * real'($signed(snap[k][31:16]));
        cq += v * real'($signed(snap[k][15:0]));
      end
      v = $sqrt(ci * ci + cq * cq);
      if (v > best) begin best = v; best_lag = lag; end
      sum_off += v; n_off++;
    end
    sum_off = (sum_off - best) / real'(n_off - 1);
    $display("snapshot search: peak %f at lag %0d, off-peak mean %f", best, best_lag, sum_off);
    checks++;
    if (best_lag > 2 || best_lag < -2 || best < 3.0 * sum_off) begin
      failures++; $display("FAIL snapshot correlation peak");
    end
  endtask

  initial begin
    int c3_lost;
    real f_err, true_chip;
    code[0] = e5_code(1'b0, PRN[0]);
    code[1] = e5_code(1'b0, PRN[1]);
    acq_fcw = hz_to_fcw(FD[0]);
    cfg_ch = 0; cfg_addr = REG_CTRL; cfg_wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // 1. snapshot
    wait (n > 50_000);
    @(negedge clk); acq_start = 1; @(negedge clk); acq_start = 0;
    wait (acq_done); @(negedge clk); @(negedge clk);
    checks++;
    if (writes != 65536 || bad_addr != 0 || first_we_n < 0) begin
      failures++; $display("FAIL snapshot writes %0d bad addr %0d", writes, bad_addr);
    end
    snapshot_search();
    // 2. channels
    for (int s = 0; s < 2; s++) begin
      longint d;
      // code start delay so that prompt chip 0 lines up (+2 samples), see tb_e5_channel
      d = longint'(DLY[s]) - (n + 14) - LAT - 6 + 2;
      while (d < 0) d += 112000;
      wr(s, REG_CARR_FCW, hz_to_fcw(FD[s] + 3.0));
      wr(s, REG_CODE_FCW, CODE_FCW_NOM);
      wr(s, REG_PRN_INIT, {18'd0, PRN[s]});
      wr(s, REG_DELAY, 32'(d - 4));      // the two writes that follow take 4 cycles
      wr(s, REG_SAT_ID, 32'(51 + s));
      wr(s, REG_CTRL, 32'h3);
    end
    wr(2, REG_CTRL, 32'h8);              // acquisition request only
    wr(3, REG_CARR_FCW, hz_to_fcw(500.0));
    wr(3, REG_PRN_INIT, {18'd0, PRN_ABSENT});
    wr(3, REG_SAT_ID, 32'd60);
    wr(3, REG_CTRL, 32'h3);
    c3_lost = 0;
    // 3. track: wait for both locks, at most 110 ms
    while (n < 110 * 112000 && !((seen_pll & 3) == 3 && n > 85 * 112000)) begin
      @(negedge clk);
      if (lost[3]) c3_lost = 1;
    end
    checks++;
    if (status[0] != CHST_PLL || status[1] != CHST_PLL) begin
      failures++; $display("FAIL lock: status %0d %0d", status[0], status[1]);
    end
    checks++;
    if (!c3_lost || status[3] != CHST_ACQ) begin failures++; $display("FAIL channel 3 did not lose lock (status %0d)", status[3]); end
    checks++;
    if (status[2] != CHST_ACQ || status[4] != CHST_INIT) begin failures++; $display("FAIL idle channel states"); end
    // TIC measurements
    wait (meas_valid); @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      f_err = real'(meas[s].carr_fcw) * FS_HZ / 4294967296.0 - FD[s];
      true_chip = $floor(real'(n - 2 - LAT - DLY[s]) * CPS);
      true_chip = true_chip - 10230.0 * $floor(true_chip / 10230.0);
      $display("ch%0d: sat %0d status %0d chip %0d (true %f) Doppler error %f Hz power %0d",
               s, meas[s].sat_id, meas[s].status, meas[s].chip, true_chip, f_err, meas[s].power);
      checks++;
      if (meas[s].sat_id != 8'(51 + s) || meas[s].status != 3'(CHST_PLL)) begin failures++; $display("FAIL meas id/status"); end
      checks++;
      if (f_err > 2.0 || f_err < -2.0) begin failures++; $display("FAIL Doppler"); end
      checks++;
      if ((real'(meas[s].chip) - true_chip > 1.0 && real'(meas[s].chip) - true_chip < 10229.0) ||
          (true_chip - real'(meas[s].chip) > 1.0 && true_chip - real'(meas[s].chip) < 10229.0)) begin
        failures++; $display("FAIL code phase");
      end
    end
    // stop channel 3
    wr(3, REG_CTRL, 32'h4);
    @(negedge clk);
    if (status[3] == CHST_INIT) seen_init_after_stop = 1;
    // mechanism counts
    $display("mechanisms: snapshot words %0d, TICs %0d, TIC measurements %0d, acq %b, ssb %b, locked %b, losses %0d, stop %0d, symbols %0d",
             writes, tics, meas_tics, seen_acq[3:0], seen_ssb[3:0], seen_pll[3:0], losses, seen_init_after_stop, syms);
    checks++; if (dones != 1)                 begin failures++; $display("FAIL snapshot capture count"); end
    checks++; if (tics < 10 || bad_tic != 0)  begin failures++; $display("FAIL TIC"); end
    checks++; if (meas_tics < 10)             begin failures++; $display("FAIL TIC measurements"); end
    checks++; if (!seen_acq[2])               begin failures++; $display("FAIL acquisition request"); end
    checks++; if ((seen_ssb & 4'hB) != 4'hB)  begin failures++; $display("FAIL start"); end
    checks++; if ((seen_pll & 3) != 3)        begin failures++; $display("FAIL sync to locked"); end
    checks++; if (losses < 1)                 begin failures++; $display("FAIL loss of lock"); end
    checks++; if (!seen_init_after_stop)      begin failures++; $display("FAIL stop"); end
    checks++; if (syms < 10 || sym_chg[0] != 0 || sym_chg[1] != 0) begin failures++; $display("FAIL data symbols"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
