// tb_epl_correlator: random baseband samples and replica chips with random
// integration lengths; at each dump the six sums must equal the model sums
// of x*(+-1) over the finished period, and the new period must start with
// the dump sample.
module tb_epl_correlator;
  import gal_pkg::*;
  logic clk = 0, rst = 1, en = 0, dump = 0, c_e, c_p, c_l, valid;
  logic signed [9:0] x_i, x_q;
  corr_t corr;
  int checks = 0, failures = 0;

  epl_correlator dut (.clk, .rst, .en, .dump, .x_i, .x_q, .c_e, .c_p, .c_l, .corr, .valid);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s [6];
    longint exp_s [6];
    bit pending;
    int dumps;
    x_i = 0; x_q = 0; c_e = 0; c_p = 0; c_l = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (s[j]) s[j] = 0;
    pending = 0; dumps = 0;
    for (int k = 0; k < 20000; k++) begin
      int len;
      en = ($urandom_range(0, 5) != 0);
      dump = en && (k > 0) && ($urandom_range(0, 300) == 0);
      x_i = 10'($urandom); x_q = 10'($urandom);
      if (k < 3000) begin x_i = 10'sd511; x_q = -10'sd512; end  // large sums
      c_e = 1'($urandom); c_p = 1'($urandom); c_l = 1'($urandom);
      if (en && dump) begin
        exp_s = s; pending = 1; dumps++;
        foreach (s[j]) s[j] = 0;
      end
      if (en) begin
        s[0] += c_e ? -longint'(x_i) : longint'(x_i);
        s[1] += c_p ? -longint'(x_i) : longint'(x_i);
        s[2] += c_l ? -longint'(x_i) : longint'(x_i);
        s[3] += c_e ? -longint'(x_q) : longint'(x_q);
        s[4] += c_p ? -longint'(x_q) : longint'(x_q);
        s[5] += c_l ? -longint'(x_q) : longint'(x_q);
      end
      len = 0;
      @(negedge clk);
      if (pending) begin
        checks++;
        if (!valid || corr.ie != 32'(exp_s[0]) || corr.ip != 32'(exp_s[1]) || corr.il != 32'(exp_s[2]) ||
            corr.qe != 32'(exp_s[3]) || corr.qp != 32'(exp_s[4]) || corr.ql != 32'(exp_s[5])) begin
          failures++; $display("FAIL dump %0d: ie=%0d exp %0d valid=%b", dumps, corr.ie, exp_s[0], valid);
        end
        pending = 0;
      end else begin
        checks++;
        if (valid) begin failures++; $display("FAIL spurious valid"); end
      end
    end
    checks++;
    if (dumps < 20) begin failures++; $display("FAIL only %0d dumps", dumps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
