// resample6: decimator of the snapshot path, "sum n=0..5, resample 1/6".
//
// Six consecutive complex input samples are added and the sum is emitted
// as one output sample, so the 112 MHz sample rate becomes 18.667 MHz.
// The sum is an integrate-and-dump (boxcar) low-pass ahead of the rate
// reduction and grows the word by 3 bits. `valid_o` pulses for one cycle,
// one cycle after the sixth accepted input; `clear` restarts the count so
// that the phase of the decimation can be aligned to a snapshot start.
// The sum of six and the factor six follow the receiver description; the
// widths are this design's choice.
module resample6 #(
  parameter int IN_W  = 10,
  parameter int RATIO = 6
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         clear,
  input  logic                         valid_i,
  input  logic signed [IN_W-1:0]       x_i,
  input  logic signed [IN_W-1:0]       x_q,
  output logic                         valid_o,
  output logic signed [IN_W+2:0]       y_i,
  output logic signed [IN_W+2:0]       y_q
);
  localparam int OW = IN_W + 3;
  logic [2:0]           cnt;
  logic signed [OW-1:0] acc_i, acc_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt     <= '0;
      acc_i   <= '0;
      acc_q   <= '0;
      valid_o <= 1'b0;
      y_i     <= '0;
      y_q     <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        if (cnt == 3'(RATIO - 1)) begin
          y_i     <= acc_i + OW'(x_i);
          y_q     <= acc_q + OW'(x_q);
          valid_o <= 1'b1;
          acc_i   <= '0;
          acc_q   <= '0;
          cnt     <= '0;
        end else begin
          acc_i <= acc_i + OW'(x_i);
          acc_q <= acc_q + OW'(x_q);
          cnt   <= cnt + 3'd1;
        end
      end
    end
  end

  initial assert (RATIO >= 1 && RATIO <= 8) else $error("RATIO must fit the 3-bit counter");
endmodule
