// gal_pkg: types and constants shared by the Galileo E5 receiver blocks.
//
// The receiver runs on one clock, the 112 MHz sample clock of the RF/IF
// unit, and takes complex 8-bit samples (sI_8_7 + j*sQ_8_7: signed, 7
// fractional bits). From these figures follow the decimated snapshot rate
// (112/6 = 18.667 MHz, which is why a 10230-chip code spans 18667 snapshot
// samples per millisecond), the TIC divider (112 MHz / 1250 Hz) and the
// NCO frequency words. The E5 code length (10230 chips), the TIC rate and
// the channel status numbering come from the receiver description; the NCO
// word widths, the sine table size and the register map are this design's
// own choices.
package gal_pkg;

  // ---------------------------------------------------------------- clocking
  localparam real FS_HZ       = 112.0e6;   // sample clock
  localparam real E5_CHIP_HZ  = 10.23e6;   // E5a/E5b primary code rate
  localparam int  E5_CODE_LEN = 10230;     // chips per primary code period (1 ms)
  localparam int  TIC_HZ      = 1250;      // receiver time base

  // ---------------------------------------------------------------- samples
  localparam int SAMPLE_W = 8;   // ADC/IF sample width (I and Q)
  localparam int BB_W     = 10;  // mixer output width
  localparam int ACC_W    = 32;  // integrate-and-dump accumulator width

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } iq8_t;

  // ---------------------------------------------------------------- NCOs
  localparam int NCO_W   = 32;   // phase accumulator width of all NCOs
  localparam int LUT_AW  = 5;    // 32 carrier phases per cycle
  localparam int LUT_N   = 1 << LUT_AW;
  localparam int LO_AMP  = 127;  // local oscillator amplitude (8-bit signed)

  typedef logic signed [SAMPLE_W-1:0] lo_t;
  typedef lo_t lo_tab_t [LUT_N];

  // cos(2*pi*(k+0.5)/N) scaled by LO_AMP and rounded; the half-step offset
  // keeps the table free of a DC bias.
  function automatic lo_tab_t make_cos_tab();
    lo_tab_t t;
    for (int k = 0; k < LUT_N; k++)
      t[k] = lo_t'($rtoi($floor(real'(LO_AMP) *
                    $cos(2.0 * 3.14159265358979 * (real'(k) + 0.5) / real'(LUT_N)) + 0.5)));
    return t;
  endfunction

  function automatic lo_tab_t make_sin_tab();
    lo_tab_t t;
    for (int k = 0; k < LUT_N; k++)
      t[k] = lo_t'($rtoi($floor(real'(LO_AMP) *
                    $sin(2.0 * 3.14159265358979 * (real'(k) + 0.5) / real'(LUT_N)) + 0.5)));
    return t;
  endfunction

  // Frequency word of an NCO_W-bit accumulator clocked at FS_HZ.
  function automatic logic signed [NCO_W-1:0] hz_to_fcw(real hz);
    return NCO_W'($rtoi(hz * (2.0 ** NCO_W) / FS_HZ));
  endfunction

  // The code NCO runs at twice the chip rate: one strobe per half chip.
  localparam logic signed [NCO_W-1:0] CODE_FCW_NOM = hz_to_fcw(2.0 * E5_CHIP_HZ);

  // ---------------------------------------------------------------- correlator
  typedef struct packed {
    logic signed [ACC_W-1:0] ie, ip, il;
    logic signed [ACC_W-1:0] qe, qp, ql;
  } corr_t;

  // ---------------------------------------------------------------- channel
  // Status numbers as reported by the receiver (0..5).
  typedef enum logic [2:0] {
    CHST_INIT = 3'd0,   // initialisation
    CHST_CAL  = 3'd1,   // SNR calibration (not used)
    CHST_ACQ  = 3'd2,   // signal acquisition
    CHST_VER  = 3'd3,   // verification of acquisition (not used)
    CHST_SSB  = 3'd4,   // tracking on the single sideband signal
    CHST_PLL  = 3'd5    // final state: loops locked
  } chan_status_e;

  // Channel register map (word addresses on the host write bus).
  typedef enum logic [2:0] {
    REG_CARR_FCW = 3'd0,  // initial carrier NCO word (IF + Doppler)
    REG_CODE_FCW = 3'd1,  // initial code NCO word (2 x chip rate)
    REG_PRN_INIT = 3'd2,  // start value of LFSR 2 (14 bits, selects the satellite)
    REG_DELAY    = 3'd3,  // code start delay in samples (code phase from acquisition)
    REG_CTRL     = 3'd4,  // bit0 start, bit1 loops enable, bit2 stop, bit3 acquisition request
    REG_SAT_ID   = 3'd5   // satellite identifier reported with measurements
  } chan_reg_e;

  // Measurement set latched on every TIC.
  typedef struct packed {
    logic [2:0]        status;     // chan_status_e value
    logic [7:0]        sat_id;     // satellite identifier (e.g. 51, 52)
    logic [31:0]       epochs;     // whole code periods (ms) since start
    logic [13:0]       chip;       // prompt chip index 0..10229
    logic              half;       // prompt half-chip
    logic [NCO_W-1:0]  code_frac;  // code NCO phase (fraction of a half chip)
    logic signed [31:0] carr_cyc;  // whole carrier cycles (signed)
    logic [NCO_W-1:0]  carr_frac;  // carrier NCO phase (fraction of a cycle)
    logic signed [NCO_W-1:0] carr_fcw; // current carrier frequency word
    logic [ACC_W-1:0]  power;      // last prompt envelope
  } meas_t;

endpackage
