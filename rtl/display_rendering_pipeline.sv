// display_rendering_pipeline - approximate display rendering pipeline of a
// camera: adapts a scene-referred 12-bit RGB image for display on a monitor
// in three steps, tone mapping -> colour space conversion -> EOTF
// compensation, pixel by pixel with no spatial dependence.
//
// Every approximation knob is a parameter, so one parameter set (one point
// of the quality/power trade-off) is one build:
//   TM_*   segmentation and interpolation of the tone-mapping tables
//   CSC_*  precision scaling and approximate adders of the matrix product
//   EOTF_* segmentation and interpolation of the inverse-EOTF tables
// The defaults are the example parameter set of the design.
//
// Interface: a plain valid-qualified stream, one pixel per clock, no
// back-pressure. Timing: latency 8 clocks from in_valid to out_valid
// (2 tone mapping + 4 colour conversion + 2 EOTF). rst_n is an active-low
// synchronous reset of the valid bits only.
module display_rendering_pipeline
  import drp_pkg::*;
#(
  parameter bit          TM_INTERP_P   = TM_INTERP,
  parameter int unsigned TM_N_SEC_P    = TM_N_SEC,
  parameter seg_list_t   TM_N_SEG_P    = TM_N_SEG,
  parameter f_co_arr_t    CSC_F_CO_P    = CSC_F_CO,
  parameter f_in_arr_t    CSC_F_IN_P    = CSC_F_IN,
  parameter add_bit_arr_t CSC_A_T_P     = CSC_A_T,
  parameter add_bit_arr_t CSC_A_S_P     = CSC_A_S,
  parameter a_p_arr_t     CSC_A_P_P     = CSC_A_P,
  parameter coef_arr_t    CSC_M_REF_P   = CSC_M_REF,
  parameter bit          EOTF_INTERP_P = EOTF_INTERP,
  parameter int unsigned EOTF_N_SEC_P  = EOTF_N_SEC,
  parameter seg_list_t   EOTF_N_SEG_P  = EOTF_N_SEG
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_px,
  output logic out_valid,
  output rgb_t out_px
);

  logic tm_valid, csc_valid;
  rgb_t tm_px, csc_px;

  tone_mapping #(
    .INTERP(TM_INTERP_P), .N_SEC(TM_N_SEC_P), .N_SEG(TM_N_SEG_P)
  ) u_tm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_px(in_px),
    .out_valid(tm_valid), .out_px(tm_px)
  );

  color_space_conversion #(
    .F_CO(CSC_F_CO_P), .F_IN(CSC_F_IN_P),
    .A_T(CSC_A_T_P), .A_S(CSC_A_S_P), .A_P(CSC_A_P_P),
    .M_REF(CSC_M_REF_P)
  ) u_csc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(tm_valid), .in_px(tm_px),
    .out_valid(csc_valid), .out_px(csc_px)
  );

  eotf_compensation #(
    .INTERP(EOTF_INTERP_P), .N_SEC(EOTF_N_SEC_P), .N_SEG(EOTF_N_SEG_P)
  ) u_eotf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(csc_valid), .in_px(csc_px),
    .out_valid(out_valid), .out_px(out_px)
  );

endmodule
