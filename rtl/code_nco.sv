// code_nco: code phase accumulator of a tracking channel.
//
// On every sample (`en`) the 32-bit phase advances by `fcw`; a wrap emits
// `tick`, one strobe per half chip, so fcw = 2*f_chip*2^32/FS (about
// 784.5e6 for 10.23 Mchip/s at 112 MHz). The code loop steers the code
// phase by changing `fcw`. `phase` is the fraction of the current half
// chip, read for the code-phase measurement. `load` clears the phase.
// Timing: `tick` is registered, high for one cycle after the wrapping
// sample. The receiver description says only that the code phase is
// adjusted from the discriminator output; the half-chip NCO is this
// design's choice.
module code_nco
  import gal_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             en,
  input  logic [NCO_W-1:0] fcw,
  output logic [NCO_W-1:0] phase,
  output logic             tick
);
  logic [NCO_W:0] sum;
  assign sum = {1'b0, phase} + {1'b0, fcw};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      tick  <= 1'b0;
    end else if (load) begin
      phase <= '0 - fcw;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        phase <= sum[NCO_W-1:0];
        tick  <= sum[NCO_W];
      end
    end
  end
endmodule
