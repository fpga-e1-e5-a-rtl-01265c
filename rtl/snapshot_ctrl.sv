// snapshot_ctrl: controller of the snapshot acquisition block.
//
// A `start` pulse (Start_Bool) arms the controller; the capture begins on
// the next TIC (TIC_Bool) so that the snapshot is tied to receiver time.
// At that TIC `align` pulses to restart the decimator, and from then on
// each decimated sample is written as one 32-bit word (MemData_u32) to
// address MemAddr_u16 with MemWe_Bool high for one cycle. After 2^AW words
// the controller raises `done` for one cycle and returns to idle; `busy`
// is high while armed or capturing. A start while busy is ignored.
//
// Word format: bits 31:16 hold I and bits 15:0 hold Q, each sign-extended
// to 16 bits. Arming on start, TIC alignment, the 32-bit word and the
// 2^16-word depth follow the receiver description; the word format and
// handshake are this design's own.
module snapshot_ctrl #(
  parameter int AW   = 16,   // 2^16 = 64k words
  parameter int IN_W = 13
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   tic,
  input  logic                   start,
  input  logic                   din_valid,
  input  logic signed [IN_W-1:0] din_i,
  input  logic signed [IN_W-1:0] din_q,
  output logic                   align,
  output logic [31:0]            mem_data,
  output logic [AW-1:0]          mem_addr,
  output logic                   mem_we,
  output logic                   busy,
  output logic                   done
);
  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_CAPTURE} state_e;
  state_e        state;
  logic [AW-1:0] wr_addr;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      wr_addr  <= '0;
      mem_data <= '0;
      mem_addr <= '0;
      mem_we   <= 1'b0;
      align    <= 1'b0;
      done     <= 1'b0;
    end else begin
      mem_we <= 1'b0;
      align  <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) state <= S_ARMED;
        S_ARMED:
          if (tic) begin
            state   <= S_CAPTURE;
            wr_addr <= '0;
            align   <= 1'b1;
          end
        S_CAPTURE:
          if (din_valid && !align) begin
            mem_data <= {16'(din_i), 16'(din_q)};
            mem_addr <= wr_addr;
            mem_we   <= 1'b1;
            wr_addr  <= wr_addr + 1'b1;
            if (wr_addr == '1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
