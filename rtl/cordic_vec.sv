// cordic_vec: sequential CORDIC in vectoring mode, used for both tracking
// discriminators.
//
// Given (x, y) it returns the envelope K*sqrt(x^2+y^2) (K = 1.6468, the
// CORDIC gain, common to all envelopes and therefore harmless in a ratio)
// and the angle atan(y/x) folded into (-1/4, +1/4) cycle: a vector with
// x < 0 is first turned by half a cycle, which is the Costas behaviour
// (insensitive to a 180-degree data or secondary-code flip). The angle is in
// units of 2^-16 cycle. The arctangent table holds atan(2^-i)/(2*pi)*2^16,
// computed at elaboration.
//
// Timing: `start` loads the operands; ITER cycles later `done` pulses for
// one cycle with the results valid until the next start. Inputs are W-bit
// signed; the datapath carries two guard bits against the CORDIC gain.
// The CORDIC is this design's choice; the document only asks for an
// arctangent and envelopes.
module cordic_vec #(
  parameter int W    = 32,
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                done,
  output logic        [W+1:0] mag,
  output logic signed [17:0]  angle
);
  typedef logic signed [17:0] ang_t;
  typedef ang_t ang_tab_t [ITER];

  function automatic ang_tab_t make_atan_tab();
    ang_tab_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = ang_t'($rtoi($floor($atan(2.0 ** (-i)) / (2.0 * 3.14159265358979) * 65536.0 + 0.5)));
    return t;
  endfunction
  localparam ang_tab_t ATAN_TAB = make_atan_tab();

  logic signed [W+1:0] x, y;
  ang_t                z;
  logic [$clog2(ITER)-1:0] it;
  logic                busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; z <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // fold into the right half plane
        x    <= x_in[W-1] ? -(W+2)'(x_in) : (W+2)'(x_in);
        y    <= x_in[W-1] ? -(W+2)'(y_in) : (W+2)'(y_in);
        z    <= '0;
        it   <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + ATAN_TAB[it];
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - ATAN_TAB[it];
        end
        if (it == ($bits(it))'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;
      end
    end
  end

  // Outputs are taken from the settled registers.
  assign mag   = x;
  assign angle = z;
endmodule
