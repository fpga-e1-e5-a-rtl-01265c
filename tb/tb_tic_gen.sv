// tb_tic_gen: checks the TIC divider at its default 112 MHz / 1250 Hz:
// the strobe spacing must be exactly 89600 clocks (800 us) and the TIC count
// must step by one on each strobe.
module tb_tic_gen;
  logic clk = 0, rst = 1;
  logic tic;
  logic [31:0] tic_count;
  int checks = 0, failures = 0;

  tic_gen dut (.clk, .rst, .tic, .tic_count);

  always #5 clk = ~clk;

  initial begin
    #2_000_000_0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cyc, last;
    int ntic;
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; last = 0; ntic = 0;
    while (ntic < 5) begin
      @(posedge clk);
      cyc++;
      if (tic) begin
        checks++;
        if (ntic > 0 && cyc - last != 89600) begin
          failures++; $display("FAIL: TIC spacing %0d", cyc - last);
        end
        if (ntic == 0 && cyc != 89600 + 1) begin
          // first strobe: one cycle after the 89600th count from reset
          failures++; $display("FAIL: first TIC after %0d cycles", cyc);
        end
        checks++;
        if (tic_count != 32'(ntic + 1)) begin
          failures++; $display("FAIL: count %0d expected %0d", tic_count, ntic + 1);
        end
        last = cyc; ntic++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
