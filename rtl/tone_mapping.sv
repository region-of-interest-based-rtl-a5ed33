// tone_mapping - first pipeline step: global sigmoidal tone mapping of each
// colour channel, X_out = L/(L + (h*I_a)^k)*u + v with L = enc^-1(X_in).
//
// The three channels are mapped by the same curve, each through its own
// sparse_lut so that one pixel passes per clock (three parallel tables, as
// in the full-table reference design, which holds one 4096-word table per
// channel and step). The segmentation (N_SEC, N_SEG) and the interpolation
// switch are shared by the three channels.
//
// Timing: one pixel per clock, latency 2 clocks (that of sparse_lut).
//
// Follows the design description: the curve and its parameters h = 9,
// k = 0.6, I_a = 0.4, enc^-1(x) = 2^x, a sparse table with hierarchical
// segmentation per step, and the default segmentation of 1 section of 512
// sub-segments with linear interpolation. Own choices: the 16-stop input
// encoding and the output scaling (see drp_pkg).
module tone_mapping
  import drp_pkg::*;
#(
  parameter bit          INTERP = TM_INTERP,
  parameter int unsigned N_SEC  = TM_N_SEC,
  parameter seg_list_t   N_SEG  = TM_N_SEG
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
      .FN(FN_TONE_MAP), .INTERP(INTERP), .N_SEC(N_SEC), .N_SEG(N_SEG)
    ) u_lut (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_x(in_ch[c]),
      .out_valid(vld[c]), .out_y(out_ch[c])
    );
  end

  assign out_px    = '{r: out_ch[0], g: out_ch[1], b: out_ch[2]};
  assign out_valid = vld[0];

endmodule
