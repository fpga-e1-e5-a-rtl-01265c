// tb_e5_prn_gen: compares the generator chip by chip with the reference
// code for E5a and E5b taps and two start values, over more than one code
// period, including the return to chip 0 after chip 10229 and `init` in
// the middle of a period. Also checks that the code is close to balanced.
module tb_e5_prn_gen;
  import e5_ref_pkg::*;
  logic clk = 0, rst = 1, init = 0, adv = 0, sel_b = 0, chip, last;
  logic [13:0] init2, idx;
  int checks = 0, failures = 0;

  e5_prn_gen dut (.clk, .rst, .init, .adv, .sel_b, .init2, .chip, .idx, .last);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit b, input bit [13:0] iv);
    code_t ref_c;
    int ones;
    ref_c = e5_code(b, iv);
    @(negedge clk); sel_b = b; init2 = iv; init = 1;
    @(negedge clk); init = 0;
    ones = 0;
    for (int n = 0; n < 10230 + 300; n++) begin
      checks++;
      if (chip !== ref_c[n % 10230] || idx != 14'(n % 10230) || last != (n % 10230 == 10229)) begin
        failures++;
        if (failures < 10) $display("FAIL b=%0d n=%0d chip=%b exp %b idx=%0d", b, n, chip, ref_c[n % 10230], idx);
      end
      if (n < 10230) ones += chip;
      adv = ($urandom_range(0, 3) != 0) || 1'b1;
      @(negedge clk);
    end
    adv = 0;
    checks++;
    if (ones < 5000 || ones > 5230) begin failures++; $display("FAIL unbalanced code: %0d ones", ones); end
    // init mid-period restarts at chip 0
    @(negedge clk); init = 1; adv = 0;
    @(negedge clk); init = 0;
    checks++;
    if (idx != 0 || chip !== ref_c[0]) begin failures++; $display("FAIL init"); end
  endtask

  initial begin
    init2 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(1'b0, 14'h1A2B);
    run(1'b0, 14'h0F0F);
    run(1'b1, 14'h2C5D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
