// complex_mixer: shifts a complex signal down in frequency by the local
// oscillator, y = x * (cos - j sin).
//
//   y_i = (x_i*cos + x_q*sin) >>> 7
//   y_q = (x_q*cos - x_i*sin) >>> 7
//
// The 8-bit products are summed at 17 bits and scaled back by the 7
// fractional bits of the oscillator, leaving a BB_W-bit signed result
// (|y| <= 2*128*127/128 < 512). The output is registered: `valid_o` follows
// `valid_i` by one cycle. The receiver description names the complex mixer
// (snapshot path) and Doppler removal (tracking path); the word widths are
// this design's choice.
module complex_mixer
  import gal_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid_i,
  input  logic signed [SAMPLE_W-1:0] x_i,
  input  logic signed [SAMPLE_W-1:0] x_q,
  input  lo_t                      lo_cos,
  input  lo_t                      lo_sin,
  output logic                     valid_o,
  output logic signed [BB_W-1:0]   y_i,
  output logic signed [BB_W-1:0]   y_q
);
  logic signed [2*SAMPLE_W:0] sum_i, sum_q;

  always_comb begin
    sum_i = (2*SAMPLE_W+1)'(x_i * lo_cos) + (2*SAMPLE_W+1)'(x_q * lo_sin);
    sum_q = (2*SAMPLE_W+1)'(x_q * lo_cos) - (2*SAMPLE_W+1)'(x_i * lo_sin);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      y_i     <= '0;
      y_q     <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        y_i <= BB_W'(sum_i >>> (SAMPLE_W - 1));
        y_q <= BB_W'(sum_q >>> (SAMPLE_W - 1));
      end
    end
  end
endmodule
