// hep_pkg: constants, register map and helper functions shared by the
// Hough Evaluation Platform (HEP) modules.
//
// The default image size (1280x720), the rho step of one pixel and the theta
// step of one degree (180 orientations over [0, 180) degrees) are the sizes of
// the line Hough transform architecture that the platform was demonstrated
// with. Everything else here is this design's own choice: the fixed-point
// format of the trigonometric coefficients, the 16-bit vote word, the 8-bit
// pixel word, the origin of the image coordinates at the image centre and the
// AXI4-Lite register map.
//
// The cos/sin coefficients are computed at elaboration time from the formula
//   coef = floor(trig(pi * k / N_THETA) * 2^TRIG_FRAC + 0.5)
// so no table file is needed.
package hep_pkg;

  // Sizes of the demonstrated LHT design under test.
  localparam int unsigned IMG_W_DEF   = 1280;
  localparam int unsigned IMG_H_DEF   = 720;
  localparam int unsigned N_THETA_DEF = 180;   // delta_theta = 180 / N_THETA degrees

  // Word widths (own choice).
  localparam int unsigned PIX_W      = 8;      // one pixel per stream beat, non-zero = edge
  localparam int unsigned VOTE_W_DEF = 16;     // one HPS location per output beat
  localparam int unsigned COORD_W    = 12;     // signed, centred pixel coordinate
  localparam int unsigned TRIG_FRAC  = 16;     // fractional bits of cos/sin coefficients
  localparam int unsigned COEF_W     = TRIG_FRAC + 2;  // signed, range [-1.0, 1.0]
  localparam int unsigned CNT_W      = 32;     // analyser counters and register width

  // AXI4-Lite register map (byte addresses, 32-bit registers).
  typedef enum logic [5:0] {
    REG_CTRL      = 6'h00,  // R: {pmvr_done, time_done, time_busy}; W bit0: clear analyser
    REG_CYCLES    = 6'h04,  // processing time in clock cycles
    REG_IN_BEATS  = 6'h08,  // input beats seen while timing
    REG_OUT_BEATS = 6'h0C,  // output beats seen while timing
    REG_PEAK      = 6'h10,  // max(A(rho, theta))
    REG_TOTAL     = 6'h14,  // sum of all votes
    REG_NONZERO   = 6'h18,  // number of non-zero HPS locations
    REG_PMVR_Q16  = 6'h1C,  // R_f, unsigned Q16.16
    REG_PMVR_F32  = 6'h20,  // R_f, IEEE-754 single precision
    REG_CONFIG    = 6'h24   // {N_RHO[15:0], N_THETA[15:0]}
  } reg_addr_e;

  // Results of the Hough Performance Analyser as seen by the register block.
  typedef struct packed {
    logic             time_busy;
    logic             time_done;
    logic             pmvr_done;
    logic [CNT_W-1:0] cycles;
    logic [CNT_W-1:0] in_beats;
    logic [CNT_W-1:0] out_beats;
    logic [CNT_W-1:0] peak;
    logic [CNT_W-1:0] total;
    logic [CNT_W-1:0] nonzero;
    logic [CNT_W-1:0] pmvr_q16;
    logic [CNT_W-1:0] pmvr_f32;
    logic [CNT_W-1:0] config_word;
  } hpa_status_t;

  // Largest |rho| for an image with its origin at the centre, rounded up.
  function automatic int unsigned rho_max(int unsigned w, int unsigned h);
    real r;
    r = $sqrt(real'(w) * real'(w) / 4.0 + real'(h) * real'(h) / 4.0);
    return int'($rtoi($ceil(r)));
  endfunction

  // Fixed-point cos (is_sin = 0) or sin (is_sin = 1) of theta_k = pi * k / n.
  function automatic int trig_coef(int unsigned k, int unsigned n, bit is_sin);
    real ang;
    real v;
    ang = 3.14159265358979323846 * real'(k) / real'(n);
    v   = is_sin ? $sin(ang) : $cos(ang);
    return $rtoi($floor(v * real'(1 << TRIG_FRAC) + 0.5));
  endfunction

  // Unsigned Q16.16 to IEEE-754 single precision, mantissa truncated.
  function automatic logic [31:0] q16_to_f32(logic [31:0] q);
    int unsigned msb;
    logic [22:0] frac;
    logic [7:0]  expo;
    if (q == '0) return '0;
    msb = 0;
    for (int unsigned i = 0; i < 32; i++)
      if (q[i]) msb = i;
    // normalise so the leading one sits at bit 31; keep the 23 bits below it
    frac    = 23'((q << (31 - msb)) >> 8);
    expo    = 8'(127 + msb - 16);
    return {1'b0, expo, frac};
  endfunction

endpackage
