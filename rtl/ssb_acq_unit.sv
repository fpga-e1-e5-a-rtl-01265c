// ssb_acq_unit: snapshot acquisition unit of the E5 receiver.
//
// Captures a stretch of one E5 sideband (E5a or E5b) for the FFT code
// search done by the host. The complex input is shifted in frequency by
// the NCO so that the chosen sideband's carrier lands at zero, decimated
// by six (sum of six samples, 112 -> 18.667 MHz) and written to an
// external 32-bit memory of 2^16 words, beginning at the first TIC after
// `start`.
//
// Chain: carrier_nco -> complex_mixer -> resample6 -> snapshot_ctrl. The
// input sample is delayed one cycle to line up with the registered NCO
// output. `nco_fcw` selects the sideband (about -15.345 MHz for E5a and
// +15.345 MHz for E5b relative to the E5 centre, plus the IF offset);
// the chain, the factor six and the memory port follow the receiver
// description, the NCO widths and word format are this design's own.
// Latency from a sample to its word is about 10 cycles; a 64k-word capture
// takes 6*65536 samples (3.5 ms).
module ssb_acq_unit
  import gal_pkg::*;
#(
  parameter int AW = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    s_valid,
  input  iq8_t                    s_in,
  input  logic signed [NCO_W-1:0] nco_fcw,
  input  logic                    tic,
  input  logic                    start,
  output logic [31:0]             mem_data,
  output logic [AW-1:0]           mem_addr,
  output logic                    mem_we,
  output logic                    busy,
  output logic                    done
);
  lo_t  lo_cos, lo_sin;
  iq8_t s_d;
  logic s_valid_d;
  logic [NCO_W-1:0] nco_phase;
  logic signed [31:0] nco_cycles;
  logic unused_nco;                 // phase and cycle count are not needed here
  assign unused_nco = ^{nco_phase, nco_cycles};

  carrier_nco u_nco (
    .clk, .rst, .load(1'b0), .en(s_valid), .fcw(nco_fcw),
    .phase(nco_phase), .cycles(nco_cycles), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s_d       <= '0;
      s_valid_d <= 1'b0;
    end else begin
      s_d       <= s_in;
      s_valid_d <= s_valid;
    end
  end

  logic                   bb_valid;
  logic signed [BB_W-1:0] bb_i, bb_q;

  complex_mixer u_mix (
    .clk, .rst, .valid_i(s_valid_d), .x_i(s_d.i), .x_q(s_d.q),
    .lo_cos, .lo_sin, .valid_o(bb_valid), .y_i(bb_i), .y_q(bb_q)
  );

  logic                   align;
  logic                   ds_valid;
  logic signed [BB_W+2:0] ds_i, ds_q;

  resample6 #(.IN_W(BB_W)) u_dec (
    .clk, .rst, .clear(align), .valid_i(bb_valid), .x_i(bb_i), .x_q(bb_q),
    .valid_o(ds_valid), .y_i(ds_i), .y_q(ds_q)
  );

  snapshot_ctrl #(.AW(AW), .IN_W(BB_W + 3)) u_ctrl (
    .clk, .rst, .tic, .start, .din_valid(ds_valid), .din_i(ds_i), .din_q(ds_q),
    .align, .mem_data, .mem_addr, .mem_we, .busy, .done
  );
endmodule
