// approx_adder - combinational approximate adder with a split carry chain.
//
// The W-bit sum is cut at bit position SPLIT. The upper W-SPLIT bits are
// added exactly; the lower SPLIT bits are approximated in one of two ways:
//   ADD_LOA (lower-OR adder):  low = a_low | b_low. As in the original LOA,
//                              the upper part gets a carry-in of
//                              a[SPLIT-1] & b[SPLIT-1].
//   ADD_LSA (lower-select adder): low = the lower bits of one operand
//                              (LSB_SEL = 0: a, 1: b), forwarded unchanged;
//                              the upper part gets no carry-in.
// SPLIT = 0 gives an exact adder; a SPLIT larger than W is clipped to W.
// The operands are two's complement; the result wraps at W bits, so the
// caller sizes W for the largest sum. No clock: purely combinational.
//
// Follows the design description: the two adder types, the encoding
// LOA = 0 / LSA = 1, the LSB input select and the split point. The LOA
// carry-in follows the lower-OR adder as first published; the description
// itself only says that the lower part is an OR.
module approx_adder
  import drp_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter adder_e      TYPE    = ADD_LOA,
  parameter int unsigned SPLIT   = 4,
  parameter int unsigned LSB_SEL = 0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  localparam int unsigned P = (SPLIT > W) ? W : SPLIT;

  if (LSB_SEL > 1) begin : g_bad_sel
    $error("approx_adder: LSB_SEL must be 0 or 1");
  end

  if (P == 0) begin : g_exact
    assign sum = a + b;
  end else begin : g_approx
    logic [P-1:0] low;
    logic         cin;

    if (TYPE == ADD_LOA) begin : g_loa
      assign low = a[P-1:0] | b[P-1:0];
      assign cin = a[P-1] & b[P-1];
    end else begin : g_lsa
      assign low = (LSB_SEL == 1) ? b[P-1:0] : a[P-1:0];
      assign cin = 1'b0;
    end

    if (P == W) begin : g_all_low
      assign sum = low;
    end else begin : g_high
      logic [W-P-1:0] high;
      assign high = a[W-1:P] + b[W-1:P] + (W-P)'(cin);
      assign sum  = {high, low};
    end
  end

endmodule
