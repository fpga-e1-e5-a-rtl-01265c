// tic_gen: receiver time base. Divides the sample clock down to the TIC
// strobe, 1250 per second (one every 800 us), and counts TICs.
//
// A counter runs from 0 to DIV-1 with DIV = CLK_HZ / TIC_HZ (89600 at
// 112 MHz); `tic` is high for the one cycle in which it wraps, and
// `tic_count` increments in the same cycle. The TIC rate comes from the
// receiver description; the counter widths are this design's choice.
module tic_gen #(
  parameter int CLK_HZ = 112_000_000,
  parameter int TIC_HZ = 1250
) (
  input  logic        clk,
  input  logic        rst,
  output logic        tic,
  output logic [31:0] tic_count
);
  localparam int DIV = CLK_HZ / TIC_HZ;
  logic [$clog2(DIV)-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt   <= '0;
      tic       <= 1'b0;
      tic_count <= '0;
    end else begin
      tic <= 1'b0;
      if (div_cnt == $bits(div_cnt)'(DIV - 1)) begin
        div_cnt   <= '0;
        tic       <= 1'b1;
        tic_count <= tic_count + 32'd1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  initial assert (CLK_HZ % TIC_HZ == 0) else $error("CLK_HZ must be a multiple of TIC_HZ");
endmodule
