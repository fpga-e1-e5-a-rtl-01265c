// carrier_nco: numerically controlled oscillator for carrier wipe-off.
//
// A 32-bit phase accumulator advances by the signed frequency word `fcw`
// on every sample (`en`). Its top LUT_AW bits address a cosine and a sine
// table of 8-bit values (amplitude 127, computed at elaboration from
// cos/sin of the phase-bin centres). Whole cycles are counted up for a
// positive word and down for a negative one, so `cycles` plus `phase` is the
// accumulated carrier phase used for the carrier-phase measurement.
//
// Timing: `cos_o`/`sin_o` are registered and belong to the phase before the
// last update, i.e. one cycle of latency from `en`. `load` clears phase and
// cycle count. The receiver description only names the NCO; the widths and
// table size are this design's choice.
module carrier_nco
  import gal_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,    // clear phase and cycle count
  input  logic                    en,      // one sample
  input  logic signed [NCO_W-1:0] fcw,     // frequency word, f = fcw*FS/2^32
  output logic        [NCO_W-1:0] phase,   // current phase (fraction of a cycle)
  output logic signed [31:0]      cycles,  // whole cycles since load
  output lo_t                     cos_o,
  output lo_t                     sin_o
);
  localparam lo_tab_t COS_TAB = make_cos_tab();
  localparam lo_tab_t SIN_TAB = make_sin_tab();

  logic [NCO_W-1:0] next_phase;
  logic             carry;

  // Unsigned add with the sign-extended word: a carry out of the 32-bit sum
  // for a positive word means a wrap forward; its absence for a negative
  // word means a wrap backward.
  always_comb {carry, next_phase} = {1'b0, phase} + {1'b0, fcw};

  always_ff @(posedge clk) begin
    if (rst || load) begin
      phase  <= '0;
      cycles <= '0;
      cos_o  <= '0;
      sin_o  <= '0;
    end else if (en) begin
      phase <= next_phase;
      if (!fcw[NCO_W-1] && carry)      cycles <= cycles + 32'sd1;
      else if (fcw[NCO_W-1] && !carry) cycles <= cycles - 32'sd1;
      cos_o <= COS_TAB[phase[NCO_W-1 -: LUT_AW]];
      sin_o <= SIN_TAB[phase[NCO_W-1 -: LUT_AW]];
    end
  end
endmodule
