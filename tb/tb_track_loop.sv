// tb_track_loop: random correlator sums with known prompt phase and known
// early/late envelopes. Checks, for every update:
//  - Costas error = atan(Q_P/I_P) in 2^-16 cycle (+-4), folded for I_P < 0
//  - prompt envelope = 1.64676*|P| (CORDIC gain, within 0.1 %)
//  - code error = (E-L)/(E+L) in 2^-15 chip (+-16)
//  - the loop-filter outputs against a model of
//      st += K1*(e - e_prev) + K2*e,  corr = st >>> 16
//    with K1, K2 worked out here from BW, zeta, k and T (10 Hz PLL, 5 Hz DLL)
//  - the latency from corr_valid to upd (at most 100 cycles)
//  - zero corrections while `enable` is low.
module tb_track_loop;
  import gal_pkg::*;
  logic clk = 0, rst = 1, enable = 0, corr_valid = 0, upd;
  corr_t corr;
  logic signed [17:0] carr_err;
  logic signed [16:0] code_err;
  logic [33:0] p_env;
  logic signed [31:0] carr_corr, code_corr;
  int checks = 0, failures = 0;

  track_loop dut (.clk, .rst, .enable, .corr_valid, .corr, .upd, .carr_err, .code_err, .p_env,
    .carr_corr, .code_corr);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int kcoef(real bw, real k, bit second, real scale);
    real wn, t1, t2;
    wn = bw * 8.0 * 0.7 / (4.0 * 0.49 + 1.0);
    t1 = k / (wn * wn);
    t2 = 1.4 / wn;
    return second ? $rtoi(scale * 0.001 / t1 * 4294967296.0 / 112.0e6 + 0.5)
                  : $rtoi(scale * t2 / t1 * 4294967296.0 / 112.0e6 + 0.5);
  endfunction

  initial begin
    real pi, th, a, me, ml, ph_e, ph_l, exp_c, exp_d, exp_p;
    int k1p, k2p, k1d, k2d, lat;
    longint stc, std_, epc, epd;
    pi = 3.14159265358979;
    k1p = kcoef(10.0, 0.25, 0, 1.0); k2p = kcoef(10.0, 0.25, 1, 1.0);
    k1d = kcoef(5.0, 1.0, 0, 4.0);   k2d = kcoef(5.0, 1.0, 1, 4.0);
    $display("coefficients PLL %0d %0d DLL %0d %0d", k1p, k2p, k1d, k2d);
    corr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    stc = 0; std_ = 0; epc = 0; epd = 0;
    for (int n = 0; n < 300; n++) begin
      enable = (n >= 100);
      th = (real'($urandom_range(0, 35999)) / 36000.0 - 0.5) * 2.0 * pi;
      a  = real'($urandom_range(1000, 50_000_000));
      me = a * real'($urandom_range(200, 1000)) / 1000.0;
      ml = a * real'($urandom_range(200, 1000)) / 1000.0;
      ph_e = real'($urandom_range(0, 6283)) / 1000.0;
      ph_l = real'($urandom_range(0, 6283)) / 1000.0;
      corr.ip = 32'($rtoi(a * $cos(th)));  corr.qp = 32'($rtoi(a * $sin(th)));
      corr.ie = 32'($rtoi(me * $cos(ph_e))); corr.qe = 32'($rtoi(me * $sin(ph_e)));
      corr.il = 32'($rtoi(ml * $cos(ph_l))); corr.ql = 32'($rtoi(ml * $sin(ph_l)));
      corr_valid = 1; @(negedge clk); corr_valid = 0;
      lat = 1;
      while (!upd && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat > 100) begin failures++; $display("FAIL latency %0d", lat); end
      exp_c = $atan(real'(corr.qp) / real'(corr.ip)) / (2.0 * pi) * 65536.0;
      exp_p = 1.646760258 * $sqrt(real'(corr.ip) ** 2 + real'(corr.qp) ** 2);
      me = $sqrt(real'(corr.ie) ** 2 + real'(corr.qe) ** 2);
      ml = $sqrt(real'(corr.il) ** 2 + real'(corr.ql) ** 2);
      exp_d = (me - ml) / (me + ml) * 32768.0;
      checks++;
      if (real'(carr_err) > exp_c + 4.0 || real'(carr_err) < exp_c - 4.0) begin
        failures++; $display("FAIL n=%0d carr_err %0d exp %f", n, carr_err, exp_c);
      end
      checks++;
      if (real'(p_env) > exp_p * 1.001 + 2.0 || real'(p_env) < exp_p * 0.999 - 2.0) begin
        failures++; $display("FAIL n=%0d p_env %0d exp %f", n, p_env, exp_p);
      end
      checks++;
      if (real'(code_err) > exp_d + 16.0 || real'(code_err) < exp_d - 16.0) begin
        failures++; $display("FAIL n=%0d code_err %0d exp %f", n, code_err, exp_d);
      end
      // filter model, driven by the discriminator outputs
      if (enable) begin
        stc  += longint'(k1p) * (longint'(carr_err) - epc) + longint'(k2p) * longint'(carr_err);
        std_ += longint'(k1d) * (longint'(code_err) - epd) + longint'(k2d) * longint'(code_err);
        epc = carr_err; epd = code_err;
      end
      @(negedge clk);
      checks++;
      if (carr_corr != 32'(stc >>> 16) || code_corr != 32'(std_ >>> 16)) begin
        failures++; $display("FAIL n=%0d corr %0d %0d exp %0d %0d", n, carr_corr, code_corr, stc >>> 16, std_ >>> 16);
      end
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    // disabling clears the filters
    enable = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (carr_corr != 0 || code_corr != 0) begin failures++; $display("FAIL filters not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
