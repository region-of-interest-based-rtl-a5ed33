// csc_channel - one output channel of the colour space conversion:
//   O = clamp( ( (R*m1 >> s1) + (G*m2 >> s2) ) + (B*m3 >> s3) ) >> F_IN )
//
// ROW selects which row i of the shared 3x3 parameter arrays configures
// this channel. Each coefficient m_j is the reference coefficient
// M_REF[i][j] (with F_CO_REF = 13 fractional bits) rounded to F_CO[i][j]
// fractional bits
// (precision scaling of the coefficient). Each product R*m_j then carries
// F_CO[i][j] fractional bits and is shifted to the common F_IN[i]
// fractional bits of the intermediate results (precision scaling of the
// products; the shift turns left where F_CO[i][j] < F_IN[i]). The first adder sums the R and G terms,
// the second adds the B term; each adder is an approx_adder whose type,
// LSB input select and split point are A_T/A_S/A_P[i][k]; a split point
// above b + F_IN[i] (12 + F_IN[i]) is clipped to that bound. The last shift
// drops the F_IN[i] fractional bits and is not approximated; the result is clamped to
// the 12-bit range [0, 4095] because the matrix has negative entries.
//
// Timing: fully pipelined, one pixel per clock, latency 4 clocks from
// in_valid to out_valid (products, first add, second add, shift/clamp).
// rst_n is an active-low synchronous reset of the valid bits only.
//
// Follows the design description: the data flow (three multipliers, three
// precision-scaling shifts, two chained approximate adders, final shift),
// the parameters F_co, F_in, A_t, A_s, A_p and the 12-bit output. Own
// choices: coefficient range [-4, 4), round-to-nearest of the coefficients,
// truncating shifts, clamping, the pipeline registers and the valid signal.
module csc_channel
  import drp_pkg::*;
#(
  parameter int unsigned ROW   = 0,
  parameter f_co_arr_t    F_CO  = CSC_F_CO,
  parameter f_in_arr_t    F_IN  = CSC_F_IN,
  parameter add_bit_arr_t A_T   = CSC_A_T,
  parameter add_bit_arr_t A_S   = CSC_A_S,
  parameter a_p_arr_t     A_P   = CSC_A_P,
  parameter coef_arr_t    M_REF = CSC_M_REF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rgb_t  in_px,
  output logic  out_valid,
  output chan_t out_ch
);

  // Width of the intermediate results: B integer bits of input, COEF_INT
  // coefficient bits, 2 bits of growth for a three-term sum, F_IN fraction.
  localparam int unsigned FI = F_IN[ROW];
  localparam int unsigned SW = B + COEF_INT + 2 + FI;
  localparam int unsigned OW = SW - FI;

  // Split points are bounded by b + F_in, the bits of the intermediate
  // result that carry information (larger values are clipped).
  localparam int unsigned AP_MAX = B + FI;
  localparam int unsigned SPLIT0 = (A_P[ROW][0] > AP_MAX) ? AP_MAX : int'(A_P[ROW][0]);
  localparam int unsigned SPLIT1 = (A_P[ROW][1] > AP_MAX) ? AP_MAX : int'(A_P[ROW][1]);

  // Coefficient rounded from F_CO_REF to f fractional bits.
  function automatic int coef_q(int c, int unsigned f);
    if (f >= F_CO_REF) return c <<< (f - F_CO_REF);
    return (c + (1 <<< (F_CO_REF - f - 1))) >>> (F_CO_REF - f);
  endfunction

  chan_t in_ch [3];
  assign in_ch[0] = in_px.r;
  assign in_ch[1] = in_px.g;
  assign in_ch[2] = in_px.b;

  // Stage 1: multiply and align to F_IN fractional bits.
  logic signed [SW-1:0] term_q [3];

  for (genvar j = 0; j < 3; j++) begin : g_term
    localparam int unsigned FC = F_CO[ROW][j];
    localparam int unsigned CW = COEF_INT + FC;
    localparam int unsigned PW = B + 1 + CW;
    localparam int          CQ = coef_q(int'($signed(M_REF[ROW][j])), FC);
    localparam logic signed [CW-1:0] COEF = CW'(CQ);

    logic signed [PW-1:0] prod;
    logic signed [SW-1:0] aligned;

    assign prod = $signed({1'b0, in_ch[j]}) * COEF;

    if (FC >= FI) begin : g_shr
      logic signed [PW-1:0] shr;
      assign shr     = prod >>> (FC - FI);
      assign aligned = SW'(shr);
    end else begin : g_shl
      logic signed [SW-1:0] ext;
      assign ext     = SW'(prod);
      assign aligned = ext <<< (FI - FC);
    end

    always_ff @(posedge clk) term_q[j] <= aligned;
  end

  // Stage 2: first approximate adder (R + G), B term delayed.
  logic [SW-1:0] sum1, sum1_q;
  logic signed [SW-1:0] term2_q;

  approx_adder #(
    .W(SW), .TYPE(adder_e'(A_T[ROW][0])),
    .SPLIT(SPLIT0), .LSB_SEL(A_S[ROW][0])
  ) u_add1 (
    .a(term_q[0]), .b(term_q[1]), .sum(sum1)
  );

  always_ff @(posedge clk) begin
    sum1_q  <= sum1;
    term2_q <= term_q[2];
  end

  // Stage 3: second approximate adder ((R + G) + B).
  logic [SW-1:0] sum2, sum2_q;

  approx_adder #(
    .W(SW), .TYPE(adder_e'(A_T[ROW][1])),
    .SPLIT(SPLIT1), .LSB_SEL(A_S[ROW][1])
  ) u_add2 (
    .a(sum1_q), .b(term2_q), .sum(sum2)
  );

  always_ff @(posedge clk) sum2_q <= sum2;

  // Stage 4: drop the fractional bits and clamp to the channel range.
  logic signed [OW-1:0] whole;
  chan_t                clamped;

  assign whole = OW'($signed(sum2_q) >>> FI);

  always_comb begin
    if (whole < 0)                          clamped = '0;
    else if (whole > $signed(OW'(CH_MAX)))  clamped = chan_t'(CH_MAX);
    else                                    clamped = chan_t'(whole);
  end

  always_ff @(posedge clk) out_ch <= clamped;

  // Valid pipeline.
  logic [3:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];

endmodule
