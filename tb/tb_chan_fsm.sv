// tb_chan_fsm: walks the channel through every state and transition:
// INIT -> ACQ on a request, ACQ -> SSB on start, SSB -> PLL after SYNC_N
// good epochs (not before), a bad epoch resetting the good count, PLL ->
// ACQ after LOSS_N bad epochs with a `loss` pulse, start from INIT, and
// stop back to INIT. Small counts (SYNC_N=5, LOSS_N=3) keep it short.
module tb_chan_fsm;
  import gal_pkg::*;
  logic clk = 0, rst = 1, acq_req = 0, start = 0, stop = 0, upd = 0;
  logic signed [17:0] carr_err = 0;
  logic [33:0] p_env = 0;
  chan_status_e status;
  logic tracking, demod_on, loss;
  int checks = 0, failures = 0, losses = 0;

  chan_fsm #(.POW_THR(1000), .PHASE_THR(2000), .SYNC_N(5), .LOSS_N(3)) dut (
    .clk, .rst, .acq_req, .start, .stop, .upd, .carr_err, .p_env, .status, .tracking, .demod_on, .loss);

  always #5 clk = ~clk;
  always @(negedge clk) if (!rst && loss) losses++;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic epoch(input bit good_pow, input int err);
    @(negedge clk);
    p_env = good_pow ? 34'd5000 : 34'd10; carr_err = 18'(err); upd = 1;
    @(negedge clk); upd = 0;
  endtask

  task automatic expect_st(input chan_status_e e, input string what);
    checks++;
    if (status != e) begin failures++; $display("FAIL %s: status %0d expected %0d", what, status, e); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    expect_st(CHST_INIT, "reset");
    epoch(1, 0);
    expect_st(CHST_INIT, "epochs ignored in INIT");
    pulse(acq_req);
    expect_st(CHST_ACQ, "acq request");
    pulse(start);
    expect_st(CHST_SSB, "start");
    checks++; if (!tracking || demod_on) begin failures++; $display("FAIL SSB flags"); end
    repeat (3) epoch(1, 100);
    epoch(1, 3000);                   // phase error too large: count restarts
    repeat (4) epoch(1, -1500);
    expect_st(CHST_SSB, "4 good epochs after a bad one");
    epoch(1, 0);
    expect_st(CHST_PLL, "5th good epoch");
    checks++; if (!demod_on) begin failures++; $display("FAIL demod off in PLL"); end
    repeat (2) epoch(0, 0);
    epoch(1, 0);                      // lock holds, bad count restarts
    repeat (2) epoch(0, 0);
    expect_st(CHST_PLL, "2 bad epochs");
    epoch(0, 0);
    expect_st(CHST_ACQ, "loss of lock");
    @(negedge clk);
    checks++; if (losses != 1) begin failures++; $display("FAIL losses %0d", losses); end
    pulse(stop);
    expect_st(CHST_INIT, "stop");
    pulse(start);
    expect_st(CHST_SSB, "start from INIT");
    repeat (4) epoch(1, 5000);        // pulling in: strong but off in phase
    expect_st(CHST_SSB, "pull-in in SSB is not a loss");
    repeat (3) epoch(0, 0);
    expect_st(CHST_ACQ, "loss in SSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
