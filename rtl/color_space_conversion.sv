// color_space_conversion - second pipeline step: multiplies each RGB pixel
// by a 3x3 matrix M to move it into the colour space of the display,
// [R G B]_out = M * [R G B]_in.
//
// Each output channel i is one csc_channel (data flow: three
// multipliers, precision-scaling shifts, two chained approximate adders and
// a final shift). Row i of the parameter arrays configures channel i:
// F_CO[i][j] fractional bits of m(i,j), F_IN[i] fractional bits of the
// intermediate results, and for adder j of channel i its type A_T[i][j]
// (0 = LOA, 1 = LSA), LSB input select A_S[i][j] and split point A_P[i][j].
// M_REF holds M with 13 fractional bits.
//
// Timing: one pixel per clock, latency 4 clocks (that of csc_channel).
//
// Follows the design description: the matrix product, the per-channel
// approximation parameters and their default values from the example
// parameter set. Own choice: the matrix itself (BT.2020 to BT.709, see
// drp_pkg), which depends on the target display.
module color_space_conversion
  import drp_pkg::*;
#(
  parameter f_co_arr_t    F_CO  = CSC_F_CO,
  parameter f_in_arr_t    F_IN  = CSC_F_IN,
  parameter add_bit_arr_t A_T   = CSC_A_T,
  parameter add_bit_arr_t A_S   = CSC_A_S,
  parameter a_p_arr_t     A_P   = CSC_A_P,
  parameter coef_arr_t    M_REF = CSC_M_REF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_px,
  output logic out_valid,
  output rgb_t out_px
);

  chan_t out_ch [3];
  logic  vld [3];

  for (genvar i = 0; i < 3; i++) begin : g_row
    csc_channel #(
      .ROW(i), .F_CO(F_CO), .F_IN(F_IN),
      .A_T(A_T), .A_S(A_S), .A_P(A_P), .M_REF(M_REF)
    ) u_chan (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_px(in_px),
      .out_valid(vld[i]), .out_ch(out_ch[i])
    );
  end

  assign out_px    = '{r: out_ch[0], g: out_ch[1], b: out_ch[2]};
  assign out_valid = vld[0];

endmodule
