// sparse_lut - function table with two-level uniform hierarchical
// segmentation and optional linear interpolation, for one 12-bit channel.
//
// The 2^B input codes are split into N_SEC equal sections (N_SEC = 2^p,
// p in [0,5]); section s is split into N_SEG[s] equal sub-segments
// (a power of two, at most the section width). Only one word per sub-segment
// is stored, so the table holds N_total = sum N_SEG[s] words (plus one end
// point when interpolating). For an input x:
//   s    = x >> (B - log2 N_SEC)            section
//   off  = x mod 2^(B - log2 N_SEC)         offset in the section
//   L    = B - log2 N_SEC - log2 N_SEG[s]   log2 of the sub-segment width
//   addr = BASE[s] + (off >> L),  frac = off mod 2^L
// Without interpolation the word holds f at the sub-segment centre and is
// the output. With interpolation the word holds f at the sub-segment start,
// the next word holds f at the next start (the extra last word holds f(2^B)),
// and the output is y0 + round((y1 - y0) * frac / 2^L).
//
// The table content is computed at elaboration from the reference function
// FN (drp_pkg::lut_ref) and is read-only, like a ROM-initialised block RAM.
//
// Timing: one sample per clock; latency 2 clocks (registered table read,
// registered interpolation) whether or not INTERP is set. rst_n is an
// active-low synchronous reset of the valid bits only.
//
// Follows the design description: the two uniform segmentation levels, one
// stored value per sub-segment, the word count N_total, the optional linear
// interpolation and the parameter ranges. Own choices: which point of a
// sub-segment is stored, the extra end point word, the rounding and the
// two-stage pipeline.
module sparse_lut
  import drp_pkg::*;
#(
  parameter lut_fn_e     FN     = FN_TONE_MAP,
  parameter bit          INTERP = 1'b1,
  parameter int unsigned N_SEC  = 1,
  parameter seg_list_t   N_SEG  = TM_N_SEG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  chan_t in_x,
  output logic  out_valid,
  output chan_t out_y
);

  localparam int unsigned SEC_BITS = clog2_u(N_SEC);
  localparam int unsigned OB       = B - SEC_BITS;

  function automatic seg_list_t calc_l();
    seg_list_t l;
    for (int s = 0; s < MAX_SEC; s++)
      l[s] = (s < int'(N_SEC)) ? OB - clog2_u(N_SEG[s]) : 0;
    return l;
  endfunction

  function automatic seg_list_t calc_base();
    seg_list_t bs;
    int unsigned acc;
    acc = 0;
    for (int s = 0; s < MAX_SEC; s++) begin
      bs[s] = acc;
      if (s < int'(N_SEC)) acc += N_SEG[s];
    end
    return bs;
  endfunction

  function automatic int unsigned calc_total();
    int unsigned acc;
    acc = 0;
    for (int s = 0; s < int'(N_SEC); s++) acc += N_SEG[s];
    return acc;
  endfunction

  localparam seg_list_t   L_TAB    = calc_l();
  localparam seg_list_t   BASE_TAB = calc_base();
  localparam int unsigned N_TOTAL  = calc_total();
  localparam int unsigned N_WORDS  = N_TOTAL + (INTERP ? 1 : 0);
  localparam int unsigned AW       = (N_WORDS > 1) ? clog2_u(N_WORDS) : 1;

  // Parameter checks at elaboration.
  if (N_SEC == 0 || N_SEC > MAX_SEC || (1 << SEC_BITS) != N_SEC) begin : g_bad_sec
    $error("sparse_lut: N_SEC must be a power of two in [1, 32]");
  end
  for (genvar s = 0; s < N_SEC; s++) begin : g_chk
    if (N_SEG[s] == 0 || (1 << clog2_u(N_SEG[s])) != N_SEG[s] ||
        N_SEG[s] > (1 << OB)) begin : g_bad_seg
      $error("sparse_lut: N_SEG[%0d] must be a power of two in [1, section width]", s);
    end
  end

  // Table, filled from the reference function.
  chan_t rom [N_WORDS];

  initial begin
    for (int s = 0; s < int'(N_SEC); s++) begin
      for (int j = 0; j < int'(N_SEG[s]); j++) begin
        int unsigned x0;
        x0 = (s << OB) + (j << L_TAB[s]);
        if (INTERP || L_TAB[s] == 0) rom[BASE_TAB[s] + j] = chan_t'(lut_ref(FN, x0));
        else rom[BASE_TAB[s] + j] = chan_t'(lut_ref(FN, x0 + (1 << (L_TAB[s] - 1))));
      end
    end
    if (INTERP) rom[N_TOTAL] = chan_t'(lut_ref(FN, 1 << B));
  end

  // Address generation (combinational).
  logic [4:0]    sec;
  logic [B-1:0]  off;
  logic [3:0]    l_sh;
  logic [AW-1:0] addr;
  logic [B-1:0]  frac;

  always_comb begin
    sec  = (SEC_BITS == 0) ? 5'd0 : 5'(in_x >> OB);
    off  = in_x & B'((1 << OB) - 1);
    l_sh = 4'(L_TAB[sec]);
    addr = AW'(BASE_TAB[sec]) + AW'(off >> l_sh);
    frac = off & ((B'(1) << l_sh) - B'(1));
  end

  // Stage 1: table read.
  chan_t y0_q;

  always_ff @(posedge clk) y0_q <= rom[addr];

  // Stage 2: interpolation.
  chan_t y_next;

  if (INTERP) begin : g_interp
    chan_t                 y1_q;
    logic [B-1:0]          frac_q;
    logic [3:0]            l_q;
    logic signed [B:0]     diff;
    logic signed [2*B+1:0] prod;
    logic signed [2*B+1:0] shifted;
    logic signed [B+1:0]   step;
    logic signed [B+1:0]   y_sum;

    always_ff @(posedge clk) begin
      y1_q   <= rom[addr + AW'(1)];
      frac_q <= frac;
      l_q    <= l_sh;
    end

    always_comb begin
      diff  = $signed({1'b0, y1_q}) - $signed({1'b0, y0_q});
      prod  = diff * $signed({1'b0, frac_q});
      if (l_q == 0) shifted = prod;
      else          shifted = (prod + ((2*B+2)'(1) <<< (l_q - 1))) >>> l_q;
      // |shifted| <= |diff|, so B+2 bits hold it.
      step  = (B+2)'(shifted);
      y_sum = $signed({2'b00, y0_q}) + step;
      if (y_sum < 0)                           y_next = '0;
      else if (y_sum > $signed((B+2)'(CH_MAX))) y_next = chan_t'(CH_MAX);
      else                                     y_next = chan_t'(y_sum);
    end
  end else begin : g_direct
    assign y_next = y0_q;
  end

  always_ff @(posedge clk) out_y <= y_next;

  logic [1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[0], in_valid};
  end
  assign out_valid = vld[1];

endmodule
