// tb_ssb_acq_unit: a 256-word snapshot unit (AW=8) fed with a complex tone
// 500 kHz above the NCO frequency (+15.345 MHz, the E5b offset). After
// the shift to zero and the 1/6 decimation each word must hold a sample of
// a 500 kHz tone: constant amplitude (about 6*100*127/128) and a phase step
// of 360*0.5/(112/6) = 9.64 degrees per word. Also checks that the capture
// waits for the TIC after start and writes exactly 256 words.
module tb_ssb_acq_unit;
  import gal_pkg::*;
  localparam int AW = 8;
  localparam real F_NCO = 15.345e6;
  localparam real F_SIG = F_NCO + 0.5e6;
  logic clk = 0, rst = 1, s_valid = 0, tic = 0, start = 0;
  iq8_t s_in;
  logic signed [31:0] nco_fcw;
  logic [31:0] mem_data;
  logic [AW-1:0] mem_addr;
  logic mem_we, busy, done;
  int checks = 0, failures = 0;

  ssb_acq_unit #(.AW(AW)) dut (.clk, .rst, .s_valid, .s_in, .nco_fcw, .tic, .start,
    .mem_data, .mem_addr, .mem_we, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tone source and TIC every 3000 cycles
  longint n = 0;
  int tic_cnt = 0, tic_seen = 0;
  always @(posedge clk) begin
    real ph;
    n <= n + 1;
    ph = 2.0 * 3.14159265358979 * F_SIG * real'(n) / FS_HZ;
    s_in.i <= 8'($rtoi($floor(100.0 * $cos(ph) + 0.5)));
    s_in.q <= 8'($rtoi($floor(100.0 * $sin(ph) + 0.5)));
    s_valid <= !rst;
    tic_cnt <= (tic_cnt == 2999) ? 0 : tic_cnt + 1;
    tic <= (tic_cnt == 2999);
    if (tic && busy) tic_seen++;
  end

  int words = 0;
  real prev_ph = 0.0;
  always @(posedge clk) if (!rst && mem_we) begin
    real wi, wq, mag, ph, d;
    wi = real'($signed(mem_data[31:16])); wq = real'($signed(mem_data[15:0]));
    mag = $sqrt(wi * wi + wq * wq);
    ph = $atan2(wq, wi) * 180.0 / 3.14159265358979;
    checks++;
    if (tic_seen == 0 || mem_addr != AW'(words)) begin failures++; $display("FAIL word %0d before TIC or addr %0d", words, mem_addr); end
    checks++;
    if (mag < 560.0 || mag > 620.0) begin failures++; $display("FAIL word %0d magnitude %f", words, mag); end
    if (words > 0) begin
      d = ph - prev_ph;
      if (d < -180.0) d += 360.0;
      if (d > 180.0) d -= 360.0;
      checks++;
      if (d < 9.64 - 3.0 || d > 9.64 + 3.0) begin failures++; $display("FAIL word %0d phase step %f", words, d); end
    end
    prev_ph = ph;
    words++;
  end

  initial begin
    int done_seen;
    nco_fcw = hz_to_fcw(F_NCO);
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (100) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    done_seen = 0;
    for (int k = 0; k < 6 * 256 + 4000 && done_seen == 0; k++) begin
      @(negedge clk);
      if (done) done_seen = 1;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (!done_seen || words != 256) begin failures++; $display("FAIL done=%0d words=%0d", done_seen, words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
