// tb_snapshot_ctrl: a 64-word controller (AW=6). Checks that nothing is
// written between start and the next TIC, that `align` pulses at that TIC,
// that each valid sample becomes one word {I, Q} at consecutive addresses,
// that exactly 2^AW words are written and `done` follows the last, and that
// a second capture works.
module tb_snapshot_ctrl;
  localparam int AW = 6;
  logic clk = 0, rst = 1, tic = 0, start = 0, din_valid = 0;
  logic signed [12:0] din_i, din_q;
  logic align, mem_we, busy, done;
  logic [31:0] mem_data;
  logic [AW-1:0] mem_addr;
  int checks = 0, failures = 0;

  snapshot_ctrl #(.AW(AW)) dut (.clk, .rst, .tic, .start, .din_valid, .din_i, .din_q,
    .align, .mem_data, .mem_addr, .mem_we, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q [$];
  int writes, dones;
  bit capturing;

  always @(posedge clk) if (!rst) begin
    if (mem_we) begin
      checks++;
      writes++;
      if (!capturing || exp_q.size() == 0) begin failures++; $display("FAIL write outside capture"); end
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (mem_data != e || mem_addr != AW'(writes - 1)) begin
          failures++; $display("FAIL word %0d data %h exp %h addr %0d", writes - 1, mem_data, e, mem_addr);
        end
      end
    end
    if (done) dones++;
  end

  task automatic capture();
    int sent;
    writes = 0; dones = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (20) begin
      din_valid = 1; din_i = 13'($urandom); din_q = 13'($urandom);
      @(negedge clk);
    end
    checks++;
    if (writes != 0 || !busy) begin failures++; $display("FAIL wrote before TIC"); end
    din_valid = 0;
    tic = 1; @(negedge clk); tic = 0;
    checks++;
    if (!align) begin failures++; $display("FAIL no align at TIC"); end
    // samples offered while align is high belong to the old decimation phase
    din_valid = 1; din_i = 13'($urandom); din_q = 13'($urandom);
    @(negedge clk);
    capturing = 1;
    sent = 0;
    while (sent < (1 << AW) + 10) begin
      din_valid = ($urandom_range(0, 2) != 0);
      din_i = 13'($urandom); din_q = 13'($urandom);
      if (din_valid && sent < (1 << AW)) exp_q.push_back({16'(din_i), 16'(din_q)});
      if (din_valid) sent++;
      @(negedge clk);
    end
    din_valid = 0;
    repeat (3) @(negedge clk);
    capturing = 0;
    checks++;
    if (writes != (1 << AW) || dones != 1 || busy) begin
      failures++; $display("FAIL writes=%0d dones=%0d busy=%b", writes, dones, busy);
    end
    exp_q.delete();
  endtask

  initial begin
    din_i = 0; din_q = 0; capturing = 0; writes = 0; dones = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    capture();
    capture();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
