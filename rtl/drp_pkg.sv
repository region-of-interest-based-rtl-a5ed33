// drp_pkg - shared types, constants and table functions of the display
// rendering pipeline (tone mapping -> colour space conversion -> inverse EOTF).
//
// The pipeline carries one RGB pixel per clock, 12 bits per channel. This
// package holds the pixel type, the approximate-adder encoding, the default
// approximation parameters of the pipeline and the two reference transfer
// functions from which the sparse look-up tables are filled at elaboration.
//
// Follows the design description: 12-bit channels, the sigmoidal tone
// mapping curve with h = 9, k = 0.6, I_a = 0.4 and enc^-1(x) = 2^x, the sRGB
// inverse EOTF, the adder encoding LOA = 0 / LSA = 1, up to 32 table sections
// and the example parameter set used as the defaults below.
// Own choices: the log-encoding range of the tone-mapping input (16 stops,
// x = X_in/256 - 8), the output scaling u = 4095, v = 0, the conversion
// matrix (ITU-R BT.2020 to BT.709 primaries) and round-to-nearest when the
// tables are filled.
package drp_pkg;

  // Bits per colour channel.
  localparam int unsigned B = 12;
  localparam int unsigned CH_MAX = (1 << B) - 1;

  // Largest number of table sections (N_sec = 2^p, p in [0,5]).
  localparam int unsigned MAX_SEC = 32;

  // Reference number of fractional bits of the matrix coefficients.
  localparam int unsigned F_CO_REF = 13;
  // Integer bits of a coefficient, sign included: range [-4, 4).
  localparam int unsigned COEF_INT = 3;

  typedef logic [B-1:0] chan_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  // Approximate adder type, encoded as in the parameter genes.
  typedef enum logic [0:0] {
    ADD_LOA = 1'b0,  // lower-OR adder
    ADD_LSA = 1'b1   // lower-select adder
  } adder_e;

  // Transfer function held by a sparse table.
  typedef enum logic [0:0] {
    FN_TONE_MAP = 1'b0,
    FN_EOTF_INV = 1'b1
  } lut_fn_e;

  typedef int unsigned seg_list_t [MAX_SEC];

  // Colour-conversion parameter arrays, indexed [row i][column j] with
  // index 0 first, as packed arrays so that elements are constants.
  typedef logic [0:2][0:2][4:0]  f_co_arr_t;   // F_co(i,j), 0..31
  typedef logic [0:2][4:0]       f_in_arr_t;   // F_in(i),   0..31
  typedef logic [0:2][0:1]       add_bit_arr_t; // A_t(i,j) or A_s(i,j)
  typedef logic [0:2][0:1][5:0]  a_p_arr_t;    // A_p(i,j),  0..63
  typedef logic [0:2][0:2][15:0] coef_arr_t;   // m(i,j), signed, 13 frac bits

  // ---------------------------------------------------------------------
  // Default configuration (the example parameter set of the pipeline).
  // ---------------------------------------------------------------------
  // Tone mapping: 1 section of 512 sub-segments, linear interpolation.
  localparam bit TM_INTERP = 1'b1;
  localparam int unsigned TM_N_SEC = 1;
  localparam seg_list_t TM_N_SEG = '{512, 0, 0, 0, 0, 0, 0, 0,
                                     0, 0, 0, 0, 0, 0, 0, 0,
                                     0, 0, 0, 0, 0, 0, 0, 0,
                                     0, 0, 0, 0, 0, 0, 0, 0};

  // EOTF compensation: 4 sections of 64, 1, 64, 256 sub-segments, no
  // interpolation.
  localparam bit EOTF_INTERP = 1'b0;
  localparam int unsigned EOTF_N_SEC = 4;
  localparam seg_list_t EOTF_N_SEG = '{64, 1, 64, 256, 0, 0, 0, 0,
                                       0, 0, 0, 0, 0, 0, 0, 0,
                                       0, 0, 0, 0, 0, 0, 0, 0,
                                       0, 0, 0, 0, 0, 0, 0, 0};

  // Colour space conversion: fractional bits of the coefficients F_co(i,j),
  // of the intermediate results F_in(i), adder types A_t(i,j), LSB input
  // selects A_s(i,j) and split points A_p(i,j).
  localparam f_co_arr_t    CSC_F_CO = '{'{5'd7, 5'd1, 5'd3}, '{5'd8, 5'd0, 5'd13},
                                       '{5'd8, 5'd1, 5'd14}};
  localparam f_in_arr_t    CSC_F_IN = '{5'd4, 5'd0, 5'd2};
  localparam add_bit_arr_t CSC_A_T  = '{2'b10, 2'b10, 2'b01};
  localparam add_bit_arr_t CSC_A_S  = '{2'b10, 2'b10, 2'b00};
  localparam a_p_arr_t     CSC_A_P  = '{'{6'd10, 6'd0}, '{6'd1, 6'd16}, '{6'd6, 6'd0}};

  // Conversion matrix M with F_CO_REF fractional bits (value * 8192,
  // rounded): BT.2020 primaries to BT.709 primaries.
  //    1.6605 -0.5876 -0.0728
  //   -0.1246  1.1329 -0.0083
  //   -0.0182 -0.1006  1.1187
  localparam coef_arr_t CSC_M_REF = '{'{16'sd13603, -16'sd4814, -16'sd596},
                                     '{-16'sd1021,  16'sd9281,  -16'sd68},
                                     '{-16'sd149,   -16'sd824,  16'sd9164}};

  // ---------------------------------------------------------------------
  // Reference transfer functions, evaluated at elaboration to fill tables.
  // The argument is the input code; codes up to 2^B are accepted so that
  // an interpolating table can hold its end point.
  // ---------------------------------------------------------------------
  function automatic int unsigned clip_round(real v);
    real s;
    s = v * real'(CH_MAX);
    if (s <= 0.0) return 0;
    if (s >= real'(CH_MAX)) return CH_MAX;
    return int'($floor(s + 0.5));
  endfunction

  // Sigmoidal tone mapping: X_out = L / (L + (h*I_a)^k) * u + v,
  // L = enc^-1(X_in) = 2^x, x = X_in/256 - 8 (16 stops).
  function automatic int unsigned tone_map_ref(int unsigned code);
    real x, lin, sig;
    x   = real'(code) / 256.0 - 8.0;
    lin = $pow(2.0, x);
    sig = $pow(9.0 * 0.4, 0.6);
    return clip_round(lin / (lin + sig));
  endfunction

  // Inverse sRGB EOTF: 12.92*Y below 0.0031308, 1.055*Y^(1/2.4)-0.055 above.
  function automatic int unsigned eotf_inv_ref(int unsigned code);
    real y, o;
    y = real'(code) / real'(CH_MAX);
    if (y < 0.0031308) o = 12.92 * y;
    else               o = 1.055 * $pow(y, 1.0 / 2.4) - 0.055;
    return clip_round(o);
  endfunction

  function automatic int unsigned lut_ref(lut_fn_e fn, int unsigned code);
    if (fn == FN_TONE_MAP) return tone_map_ref(code);
    return eotf_inv_ref(code);
  endfunction

  function automatic int unsigned clog2_u(int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
