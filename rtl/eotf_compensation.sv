// eotf_compensation - last pipeline step: compensates the display EOTF by
// applying the inverse sRGB transfer function to each colour channel:
// 12.92*Y below Y_th = 0.0031308, 1.055*Y^(1/2.4) - 0.055 above.
//
// The three channels use the same curve, each through its own sparse_lut so
// that one pixel passes per clock. The segmentation (N_SEC, N_SEG) and the
// interpolation switch are shared by the three channels.
//
// Timing: one pixel per clock, latency 2 clocks (that of sparse_lut).
//
// Follows the design description: the transfer function, the sparse table
// with hierarchical segmentation, and the default segmentation of 4
// sections of 64, 1, 64 and 256 sub-segments without interpolation. Own
// choice: input and output codes are scaled as Y = code/4095.
module eotf_compensation
  import drp_pkg::*;
#(
  parameter bit          INTERP = EOTF_INTERP,
  parameter int unsigned N_SEC  = EOTF_N_SEC,
  parameter seg_list_t   N_SEG  = EOTF_N_SEG
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_px,
  output logic out_valid,
  output rgb_t out_px
);

  chan_t in_ch [3];
  chan_t out_ch [3];
  logic  vld [3];

  assign in_ch[0] = in_px.r;
  assign in_ch[1] = in_px.g;
  assign in_ch[2] = in_px.b;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    sparse_lut #(
      .FN(FN_EOTF_INV), .INTERP(INTERP), .N_SEC(N_SEC), .N_SEG(N_SEG)
    ) u_lut (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_x(in_ch[c]),
      .out_valid(vld[c]), .out_y(out_ch[c])
    );
  end

  assign out_px    = '{r: out_ch[0], g: out_ch[1], b: out_ch[2]};
  assign out_valid = vld[0];

endmodule
