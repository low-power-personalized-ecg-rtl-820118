// ecg_pkg: constants and types shared by the ECG monitor.
//
// The frame size (4096 samples at ~1 kHz), the 8/12-bit ADC resolutions, the
// 60 % threshold, the 50-coefficient R-R gap, the +-10 minimum window and the
// 7-entry peak store are the figures of the boundary-detection method this
// design implements. Coefficient widths follow from dropping the 1/sqrt(2)
// Haar scaling: every level adds one bit. The capacitor-bank ladder (eight
// combinations of the 3, 4.5 and 6 Cg capacitors, ordered by total
// capacitance) and the record layouts are this design's own choices.
package ecg_pkg;

  // ---- frame and sample sizes ----
  localparam int unsigned ECG_W     = 12;            // high-resolution sample width
  localparam int unsigned ECG_LR_W  = 8;             // low-resolution sample width
  localparam int unsigned N_FRAME   = 4096;          // samples per analysis frame
  localparam int unsigned ADDR_W    = 12;            // $clog2(N_FRAME)
  localparam int unsigned CD3_W     = ECG_W + 3;     // level-3 detail width
  localparam int unsigned CD5_W     = ECG_W + 5;     // level-5 detail width
  localparam int unsigned MAX_PEAKS = 7;             // depth of the peak store
  localparam int unsigned NPK_W     = 3;             // width of a peak count/index
  localparam int unsigned CD3_AW    = ADDR_W - 3;    // cD_L3 address width
  localparam int unsigned CD5_AW    = ADDR_W - 5;    // cD_L5 address width

  // ---- shared search engine ----
  typedef enum logic [1:0] {
    SRCH_MAX    = 2'd0,   // largest signed value
    SRCH_MIN    = 2'd1,   // smallest signed value
    SRCH_ABSMAX = 2'd2    // largest magnitude
  } search_mode_e;

  // ---- AGC capacitor bank switches (Cg always connected) ----
  typedef struct packed {
    logic s3;   // adds 3   * Cg
    logic s4;   // adds 6   * Cg
    logic s5;   // adds 4.5 * Cg
  } cap_sw_t;

  // Gain code 0..7 -> switch set, ordered by total capacitance
  // 1, 4, 5.5, 7, 8.5, 10, 11.5, 14.5 (x Cg).
  function automatic cap_sw_t gain_switches(input logic [2:0] code);
    cap_sw_t sw;
    unique case (code)
      3'd0: sw = '{s3: 1'b0, s4: 1'b0, s5: 1'b0};
      3'd1: sw = '{s3: 1'b1, s4: 1'b0, s5: 1'b0};
      3'd2: sw = '{s3: 1'b0, s4: 1'b0, s5: 1'b1};
      3'd3: sw = '{s3: 1'b0, s4: 1'b1, s5: 1'b0};
      3'd4: sw = '{s3: 1'b1, s4: 1'b0, s5: 1'b1};
      3'd5: sw = '{s3: 1'b1, s4: 1'b1, s5: 1'b0};
      3'd6: sw = '{s3: 1'b0, s4: 1'b1, s5: 1'b1};
      default: sw = '{s3: 1'b1, s4: 1'b1, s5: 1'b1};
    endcase
    return sw;
  endfunction

  // ---- boundary-detection result ----
  typedef struct packed {
    logic [NPK_W-1:0]                   n_peaks;     // R-peaks found (0..7)
    logic [MAX_PEAKS-1:0][ADDR_W-1:0]   r_idx;       // R-peak sample index
    logic [MAX_PEAKS-1:0][ECG_W-1:0]    r_val;       // R-peak sample value (signed)
    logic [MAX_PEAKS-1:0][CD3_AW-1:0]   t1;          // earlier of the cD_L3 max/min pair
    logic [MAX_PEAKS-1:0][CD3_AW-1:0]   t2;          // later of the cD_L3 max/min pair
    logic [MAX_PEAKS:0][ADDR_W-1:0]     bound;       // B0 .. B(n_peaks)
    logic                               first_valid; // B0 lies inside the frame
    logic                               last_valid;  // last boundary lies inside the frame
    logic                               overflow;    // more candidates than MAX_PEAKS
    logic                               too_few;     // fewer than two R-peaks
  } bd_result_t;

  // ---- per-beat feature record (all sample indices) ----
  typedef struct packed {
    logic [NPK_W-1:0]  beat;
    logic [ADDR_W-1:0] b_start;
    logic [ADDR_W-1:0] b_end;
    logic [ADDR_W-1:0] r_idx;
    logic [ECG_W-1:0]  r_val;
    logic [ADDR_W-1:0] qrs_on;
    logic [ADDR_W-1:0] qrs_off;
    logic [ADDR_W-1:0] q_idx;
    logic [ADDR_W-1:0] s_idx;
    logic [ADDR_W-1:0] p_on;
    logic [ADDR_W-1:0] p_peak;
    logic [ADDR_W-1:0] p_off;
    logic [ADDR_W-1:0] t_on;
    logic [ADDR_W-1:0] t_peak;
    logic [ADDR_W-1:0] t_off;
  } feat_t;

endpackage
