// e5_prn_gen: Galileo E5 primary code generator.
//
// Two 14-stage Fibonacci shift registers run in step; the chip is the XOR
// of their last stages. Register 1 starts at all ones, register 2 at
// `init2`, a per-satellite start value loaded by the host. The sequences
// are truncated to CODE_LEN = 10230 chips: after the last chip both
// registers return to their start values, so the code repeats every
// millisecond at 10.23 Mchip/s.
//
// Feedback taps are given as masks: bit k-1 set means stage k feeds the
// XOR. `sel_b` selects the E5b taps instead of the E5a ones. The default
// masks encode the base-register polynomials of the E5a-I (octal 40503 and
// 50661) and E5b-I (octal 64021 and 51445) primary codes; those and the
// start-value scheme are this design's choice, the code length is the
// receiver description's.
//
// Interface: `init` loads the start state (chip index 0); `adv` steps one
// chip. `chip` and `idx` show the current chip combinationally from the
// registers; `last` is high on chip CODE_LEN-1.
module e5_prn_gen #(
  parameter int          CODE_LEN = 10230,
  parameter logic [13:0] TAPS1_A  = 14'h20A1,  // x^14+x^8+x^6+x+1
  parameter logic [13:0] TAPS2_A  = 14'h28D8,  // x^14+x^12+x^8+x^7+x^5+x^4+1
  parameter logic [13:0] TAPS1_B  = 14'h3408,  // x^14+x^13+x^11+x^4+1
  parameter logic [13:0] TAPS2_B  = 14'h2992   // x^14+x^12+x^9+x^8+x^5+x^2+1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        adv,
  input  logic        sel_b,
  input  logic [13:0] init2,
  output logic        chip,
  output logic [13:0] idx,
  output logic        last
);
  logic [13:0] r1, r2, taps1, taps2;

  assign taps1 = sel_b ? TAPS1_B : TAPS1_A;
  assign taps2 = sel_b ? TAPS2_B : TAPS2_A;
  assign chip  = r1[13] ^ r2[13];
  assign last  = (idx == 14'(CODE_LEN - 1));

  always_ff @(posedge clk) begin
    if (rst || init || (adv && last)) begin
      r1  <= '1;
      r2  <= init2;
      idx <= '0;
    end else if (adv) begin
      r1  <= {r1[12:0], ^(r1 & taps1)};
      r2  <= {r2[12:0], ^(r2 & taps2)};
      idx <= idx + 14'd1;
    end
  end
endmodule
