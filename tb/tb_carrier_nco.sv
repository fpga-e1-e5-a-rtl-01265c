// tb_carrier_nco: drives the NCO with positive and negative frequency
// words and compares phase, whole-cycle count and the cos/sin outputs with
// a model: phase accumulated in 64-bit arithmetic, cycles = floor of the
// accumulated phase / 2^32, and 127*cos/sin of the phase-bin centre
// (tolerance one LSB).
module tb_carrier_nco;
  import gal_pkg::*;
  logic clk = 0, rst = 1, load = 0, en = 0;
  logic signed [31:0] fcw;
  logic [31:0] phase;
  logic signed [31:0] cycles;
  lo_t cos_o, sin_o;
  int checks = 0, failures = 0;

  carrier_nco dut (.clk, .rst, .load, .en, .fcw, .phase, .cycles, .cos_o, .sin_o);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [31:0] w, input int n);
    longint acc;   // model phase in units of 2^-32 cycle, unbounded
    longint prev_acc;
    real ang, ec, es;
    @(negedge clk); load = 1; en = 0; fcw = w;
    @(negedge clk); load = 0; en = 1;
    acc = 0;
    for (int k = 0; k < n; k++) begin
      prev_acc = acc;
      acc = acc + longint'(w);
      @(negedge clk);
      // after this edge: phase = acc mod 2^32, table output of prev_acc
      checks++;
      if (phase != 32'(acc)) begin failures++; $display("FAIL phase %h exp %h", phase, 32'(acc)); end
      checks++;
      if (cycles != 32'(acc >>> 32)) begin failures++; $display("FAIL cycles %0d exp %0d", cycles, acc >>> 32); end
      ang = 2.0 * 3.14159265358979 * (real'(longint'(32'(prev_acc)) >> 27) + 0.5) / 32.0;
      ec = 127.0 * $cos(ang); es = 127.0 * $sin(ang);
      checks++;
      if ((real'(cos_o) - ec) > 1.0 || (ec - real'(cos_o)) > 1.0 || (real'(sin_o) - es) > 1.0 || (es - real'(sin_o)) > 1.0) begin
        failures++; $display("FAIL lo %0d %0d exp %f %f", cos_o, sin_o, ec, es);
      end
    end
  endtask

  initial begin
    fcw = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    run(32'sd153_391_689, 200);     // +4 MHz
    run(-32'sd55_000_000, 300);     // about -1.43 MHz
    run(32'sd1_500_000_000, 100);   // fast, wraps often
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
