// tb_resample6: random samples with random gaps in valid_i; every sixth
// accepted sample must produce one output equal to the sum of those six,
// and `clear` must restart the grouping.
module tb_resample6;
  logic clk = 0, rst = 1, clear = 0, valid_i = 0, valid_o;
  logic signed [9:0] x_i, x_q;
  logic signed [12:0] y_i, y_q;
  int checks = 0, failures = 0;
  int q_i[$], q_q[$];

  resample6 dut (.clk, .rst, .clear, .valid_i, .x_i, .x_q, .valid_o, .y_i, .y_q);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sums, pushed when the sixth sample is sent
  always @(posedge clk) if (!rst && valid_o) begin
    checks++;
    if (q_i.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      int ei, eq;
      ei = q_i.pop_front(); eq = q_q.pop_front();
      if (int'(y_i) != ei || int'(y_q) != eq) begin
        failures++; $display("FAIL y=(%0d,%0d) exp (%0d,%0d)", y_i, y_q, ei, eq);
      end
    end
  end

  initial begin
    int si, sq, n, outs;
    x_i = 0; x_q = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    si = 0; sq = 0; n = 0;
    for (int k = 0; k < 3000; k++) begin
      if (k == 1500) begin
        clear = 1; @(negedge clk); clear = 0; si = 0; sq = 0; n = 0;
      end
      valid_i = ($urandom_range(0, 3) != 0);
      x_i = 10'($urandom); x_q = 10'($urandom);
      if (k < 12) begin x_i = -512; x_q = 511; valid_i = 1; end
      if (valid_i) begin
        si += int'(x_i); sq += int'(x_q); n++;
        if (n == 6) begin q_i.push_back(si); q_q.push_back(sq); si = 0; sq = 0; n = 0; end
      end
      @(negedge clk);
    end
    valid_i = 0;
    repeat (3) @(negedge clk);
    outs = checks;
    checks++;
    if (q_i.size() != 0 || outs < 200) begin failures++; $display("FAIL %0d sums missing, %0d outputs", q_i.size(), outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
