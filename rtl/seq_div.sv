// seq_div: sequential restoring divider for a fraction below one.
//
// Computes q = floor(num * 2^FRAC / den) for num < den, one quotient bit
// per cycle, most significant first. `start` loads the operands; FRAC
// cycles later `done` pulses and `q` holds the result. A zero divisor, or
// num >= den, saturates q to all ones. Used for the normalisation of the
// early-minus-late discriminator; the algorithm is this design's choice.
module seq_div #(
  parameter int W    = 34,
  parameter int FRAC = 15
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [W-1:0]    num,
  input  logic [W-1:0]    den,
  output logic            done,
  output logic [FRAC-1:0] q
);
  logic [W-1:0] rem;
  logic [W-1:0] d;
  logic [$clog2(FRAC+1)-1:0] it;
  logic         busy, sat;
  logic [W:0]   shifted;

  assign shifted = {rem, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      rem <= '0; d <= '0; it <= '0; busy <= 1'b0; done <= 1'b0; q <= '0; sat <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= num;
        d    <= den;
        sat  <= (den == '0) || (num >= den);
        it   <= '0;
        q    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (shifted >= {1'b0, d}) begin
          rem <= W'(shifted - {1'b0, d});
          q   <= {q[FRAC-2:0], 1'b1};
        end else begin
          rem <= W'(shifted);
          q   <= {q[FRAC-2:0], 1'b0};
        end
        if (it == ($bits(it))'(FRAC - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (sat) q <= '1;
        end
        it <= it + 1'b1;
      end
    end
  end
endmodule
