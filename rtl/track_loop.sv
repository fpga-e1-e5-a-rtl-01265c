// track_loop: tracking-loop computation of one channel, run once per
// integration period (1 ms for E5).
//
// On `corr_valid` the six correlator sums are taken and processed in
// sequence by one shared CORDIC and one divider:
//   1. carrier discriminator  e_c = atan(Q_P / I_P)             (Costas, cycles)
//   2. envelopes              E = |I_E + jQ_E|,  L = |I_L + jQ_L|, P = |I_P + jQ_P|
//   3. code discriminator     e_d = (E - L) / (E + L)           (normalized
//                                 early-minus-late envelope, chips)
//   4. loop filters, second order (proportional-plus-integral form):
//        nco += C1*(e - e_prev) + C2*e,  C1 = tau2/tau1,  C2 = T/tau1,
//        wn = 8*zeta*BW/(4*zeta^2+1), tau1 = k/wn^2, tau2 = 2*zeta/wn.
// The filter outputs are kept as NCO-word corrections with 16 fraction
// bits; `carr_corr` is added to the channel's carrier word and `code_corr`
// to its code word. The coefficients are computed at elaboration from the
// real parameters below (Hz -> NCO word: 2^32/112 MHz).
//
// Discriminator types, loop order, 1 ms integration and the bandwidths
// (DLL 5 Hz, PLL 10 Hz for E5) follow the receiver's tracking settings; the
// damping 0.7, loop gains 0.25 (PLL) and 1 (DLL), the filter form and all
// fixed-point formats are this design's choice.
//
// Timing: `upd` pulses about 3*17+16+3 cycles after `corr_valid`, with
// `carr_err` (2^-16 cycle), `code_err` (2^-15 chip, signed), `p_env`
// and the new corrections. `enable` low holds both filters at zero.
module track_loop
  import gal_pkg::*;
#(
  parameter real PLL_BW = 10.0,   // Hz
  parameter real DLL_BW = 5.0,    // Hz
  parameter real ZETA   = 0.7,
  parameter real PLL_K  = 0.25,
  parameter real DLL_K  = 1.0,
  parameter real T_INT  = 0.001   // s, coherent integration
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  logic                     corr_valid,
  input  corr_t                    corr,
  output logic                     upd,
  output logic signed [17:0]       carr_err,
  output logic signed [16:0]       code_err,
  output logic        [ACC_W+1:0]  p_env,
  output logic signed [NCO_W-1:0]  carr_corr,
  output logic signed [NCO_W-1:0]  code_corr
);
  // ------------------------------------------------------------ coefficients
  localparam real HZ2FCW = (2.0 ** NCO_W) / FS_HZ;
  localparam real WN_P   = 8.0 * ZETA * PLL_BW / (4.0 * ZETA * ZETA + 1.0);
  localparam real WN_D   = 8.0 * ZETA * DLL_BW / (4.0 * ZETA * ZETA + 1.0);
  localparam real TAU1_P = PLL_K / (WN_P * WN_P);
  localparam real TAU2_P = 2.0 * ZETA / WN_P;
  localparam real TAU1_D = DLL_K / (WN_D * WN_D);
  localparam real TAU2_D = 2.0 * ZETA / WN_D;
  // carrier error unit 2^-16 cycle, state unit 2^-16 word: K = C * HZ2FCW
  localparam int K1_P = $rtoi(TAU2_P / TAU1_P * HZ2FCW + 0.5);
  localparam int K2_P = $rtoi(T_INT  / TAU1_P * HZ2FCW + 0.5);
  // code error unit 2^-15 chip, code word is 2x chip rate: K = 4 * C * HZ2FCW
  localparam int K1_D = $rtoi(4.0 * TAU2_D / TAU1_D * HZ2FCW + 0.5);
  localparam int K2_D = $rtoi(4.0 * T_INT  / TAU1_D * HZ2FCW + 0.5);

  localparam int ST_W = NCO_W + 16;

  typedef enum logic [2:0] {T_IDLE, T_CP, T_CE, T_CL, T_DIV, T_FILT} tstate_e;
  tstate_e st;

  corr_t                 c;
  logic                  cor_start, cor_done;
  logic signed [ACC_W-1:0] cor_x, cor_y;
  logic        [ACC_W+1:0] cor_mag;
  logic signed [17:0]    cor_ang;
  logic        [ACC_W+1:0] env_e, env_l;
  logic                  div_start, div_done;
  logic        [14:0]    div_q;
  logic                  e_lt_l;
  logic signed [17:0]    carr_err_prev;
  logic signed [16:0]    code_err_prev, code_err_new;
  logic signed [ST_W-1:0] carr_st, code_st;

  cordic_vec #(.W(ACC_W), .ITER(16)) u_cordic (
    .clk, .rst, .start(cor_start), .x_in(cor_x), .y_in(cor_y),
    .done(cor_done), .mag(cor_mag), .angle(cor_ang)
  );

  seq_div #(.W(ACC_W + 2), .FRAC(15)) u_div (
    .clk, .rst, .start(div_start),
    .num(e_lt_l ? env_l - env_e : env_e - env_l),
    .den(env_e + env_l),
    .done(div_done), .q(div_q)
  );

  always_comb begin
    unique case (st)
      T_CE:    begin cor_x = c.ie; cor_y = c.qe; end
      T_CL:    begin cor_x = c.il; cor_y = c.ql; end
      default: begin cor_x = c.ip; cor_y = c.qp; end
    endcase
    code_err_new = e_lt_l ? -17'(div_q) : 17'(div_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE; c <= '0; cor_start <= 1'b0; div_start <= 1'b0;
      env_e <= '0; env_l <= '0; e_lt_l <= 1'b0;
      upd <= 1'b0; carr_err <= '0; code_err <= '0; p_env <= '0;
      carr_err_prev <= '0; code_err_prev <= '0; carr_st <= '0; code_st <= '0;
    end else begin
      cor_start <= 1'b0;
      div_start <= 1'b0;
      upd       <= 1'b0;
      unique case (st)
        T_IDLE:
          if (corr_valid) begin
            c <= corr; cor_start <= 1'b1; st <= T_CP;
          end
        T_CP:
          if (cor_done) begin
            carr_err <= cor_ang; p_env <= cor_mag; cor_start <= 1'b1; st <= T_CE;
          end
        T_CE:
          if (cor_done) begin
            env_e <= cor_mag; cor_start <= 1'b1; st <= T_CL;
          end
        T_CL:
          if (cor_done) begin
            env_l <= cor_mag; e_lt_l <= (env_e < cor_mag); div_start <= 1'b1; st <= T_DIV;
          end
        T_DIV:
          if (div_done) begin
            code_err <= code_err_new; st <= T_FILT;
          end
        T_FILT: begin
          if (enable) begin
            carr_st <= carr_st + ST_W'(K1_P) * ST_W'(carr_err - carr_err_prev)
                               + ST_W'(K2_P) * ST_W'(carr_err);
            code_st <= code_st + ST_W'(K1_D) * ST_W'(code_err - code_err_prev)
                               + ST_W'(K2_D) * ST_W'(code_err);
            carr_err_prev <= carr_err;
            code_err_prev <= code_err;
          end
          upd <= 1'b1;
          st  <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
      if (!enable) begin
        carr_st <= '0; code_st <= '0; carr_err_prev <= '0; code_err_prev <= '0;
      end
    end
  end

  assign carr_corr = NCO_W'(carr_st >>> 16);
  assign code_corr = NCO_W'(code_st >>> 16);
endmodule
