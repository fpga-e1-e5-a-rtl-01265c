// tb_complex_mixer: random samples and oscillator values; the outputs must
// equal floor((x*conj(lo))/128) computed here, one cycle after valid_i.
module tb_complex_mixer;
  import gal_pkg::*;
  logic clk = 0, rst = 1, valid_i = 0, valid_o;
  logic signed [7:0] x_i, x_q;
  lo_t lo_cos, lo_sin;
  logic signed [9:0] y_i, y_q;
  int checks = 0, failures = 0;

  complex_mixer dut (.clk, .rst, .valid_i, .x_i, .x_q, .lo_cos, .lo_sin, .valid_o, .y_i, .y_q);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    x_i = 0; x_q = 0; lo_cos = 0; lo_sin = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      x_i = 8'($urandom); x_q = 8'($urandom);
      lo_cos = 8'($urandom_range(0, 254) - 127); lo_sin = 8'($urandom_range(0, 254) - 127);
      if (k < 4) begin x_i = -128; x_q = -128; lo_cos = 127; lo_sin = -127; end
      valid_i = 1;
      ei = int'(x_i) * int'(lo_cos) + int'(x_q) * int'(lo_sin);
      eq = int'(x_q) * int'(lo_cos) - int'(x_i) * int'(lo_sin);
      ei = (ei - ((ei % 128 + 128) % 128)) / 128;   // floor division
      eq = (eq - ((eq % 128 + 128) % 128)) / 128;
      @(negedge clk);
      checks++;
      if (!valid_o || int'(y_i) != ei || int'(y_q) != eq) begin
        failures++; $display("FAIL k=%0d y=(%0d,%0d) exp (%0d,%0d) v=%b", k, y_i, y_q, ei, eq, valid_o);
      end
    end
    valid_i = 0;
    @(negedge clk);
    checks++;
    if (valid_o) begin failures++; $display("FAIL valid_o stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
