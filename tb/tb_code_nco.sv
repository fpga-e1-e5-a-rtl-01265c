// tb_code_nco: counts half-chip ticks at the nominal E5 word and at a
// shifted word; each tick must fall on the sample where the 64-bit model
// accumulator passes a multiple of 2^32, and the phase must match. After
// `load` the phase is -fcw, so the first enabled sample must tick.
module tb_code_nco;
  import gal_pkg::*;
  logic clk = 0, rst = 1, load = 0, en = 0, tick;
  logic [31:0] fcw, phase;
  int checks = 0, failures = 0;

  code_nco dut (.clk, .rst, .load, .en, .fcw, .phase, .tick);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] w, input int n);
    longint unsigned acc, prev;
    int ticks;
    @(negedge clk); load = 1; fcw = w;
    @(negedge clk); load = 0;
    acc = 64'h1_0000_0000 - longint'(w);   // load presets the phase to -fcw
    ticks = 0;
    for (int k = 0; k < n; k++) begin
      en = ($urandom_range(0, 7) != 0);
      prev = acc;
      if (en) acc = acc + longint'(w);
      @(negedge clk);
      checks++;
      if (tick != ((acc >> 32) != (prev >> 32)) || phase != 32'(acc)) begin
        failures++; $display("FAIL k=%0d tick=%b phase=%h", k, tick, phase);
      end
      if (tick) ticks++;
    end
    en = 0;
    checks++;
    if (ticks != int'(acc >> 32)) begin failures++; $display("FAIL ticks %0d", ticks); end
  endtask

  initial begin
    fcw = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // nominal word: 2 * 10.23 MHz / 112 MHz * 2^32
    checks++;
    if (CODE_FCW_NOM != 32'd784_598_489 && CODE_FCW_NOM != 32'd784_598_490) begin
      failures++; $display("FAIL CODE_FCW_NOM %0d", CODE_FCW_NOM);
    end
    run(CODE_FCW_NOM, 5000);
    // first enabled sample after load ticks
    @(negedge clk); load = 1; fcw = CODE_FCW_NOM;
    @(negedge clk); load = 0; en = 1;
    @(negedge clk); en = 0;
    checks++;
    if (!tick || phase != 0) begin failures++; $display("FAIL no tick on first sample after load"); end
    run(CODE_FCW_NOM + 32'd40_000, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
