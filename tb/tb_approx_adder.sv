// tb_approx_adder - checks approx_adder in five configurations (LOA, LSA
// forwarding either operand, exact, and an all-approximate split) against
// a bit-by-bit model with an explicit ripple carry, on directed and random
// signed operands. The adder is combinational: results are sampled 1 ns
// after the operands change.
module tb_approx_adder;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  localparam int W = 16;

  logic [W-1:0] a, b;
  logic [W-1:0] s_loa, s_lsa0, s_lsa1, s_exact, s_full;
  int checks = 0, failures = 0;
  mech_t m;

  approx_adder #(.W(W), .TYPE(ADD_LOA), .SPLIT(5),  .LSB_SEL(0)) u_loa   (.a(a), .b(b), .sum(s_loa));
  approx_adder #(.W(W), .TYPE(ADD_LSA), .SPLIT(7),  .LSB_SEL(0)) u_lsa0  (.a(a), .b(b), .sum(s_lsa0));
  approx_adder #(.W(W), .TYPE(ADD_LSA), .SPLIT(3),  .LSB_SEL(1)) u_lsa1  (.a(a), .b(b), .sum(s_lsa1));
  approx_adder #(.W(W), .TYPE(ADD_LOA), .SPLIT(0),  .LSB_SEL(0)) u_exact (.a(a), .b(b), .sum(s_exact));
  approx_adder #(.W(W), .TYPE(ADD_LOA), .SPLIT(20), .LSB_SEL(0)) u_full  (.a(a), .b(b), .sum(s_full));

  function automatic longint sx(logic [W-1:0] v);
    return longint'($signed(v));
  endfunction

  task automatic check(string what, logic [W-1:0] got, longint exp);
    checks++;
    if (sx(got) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, sx(a), sx(b), sx(got), exp);
    end
  endtask

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb);
    a = va; b = vb;
    #1;
    check("loa",   s_loa,   ref_adder(1'b0, W, 5,  1'b0, sx(a), sx(b), m));
    check("lsa0",  s_lsa0,  ref_adder(1'b1, W, 7,  1'b0, sx(a), sx(b), m));
    check("lsa1",  s_lsa1,  ref_adder(1'b1, W, 3,  1'b1, sx(a), sx(b), m));
    check("exact", s_exact, sx(a) + sx(b) - ((sx(a) + sx(b) > 32767) ? 65536 :
                                             (sx(a) + sx(b) < -32768) ? -65536 : 0));
    check("full",  s_full,  sx(a | b));
  endtask

  initial begin
    m = '{default: 0};
    // Directed cases: the LOA carry-in, LSA forwarding, signs.
    apply(16'h0010, 16'h0010);   // a[4] & b[4] -> LOA carry-in
    apply(16'h000F, 16'h0001);   // exact carry lost by LOA and LSA
    apply(16'hFFFF, 16'h0001);   // -1 + 1
    apply(16'h1234, 16'h0F0F);
    apply(16'h8000, 16'h7FFF);
    for (int i = 0; i < 4000; i++) apply(16'($urandom), 16'($urandom));
    // Directed value check of the LOA definition: low = OR, carry = AND.
    a = 16'h0013; b = 16'h0011; #1;
    checks++;
    if (s_loa !== 16'h0033) begin
      failures++;
      $display("FAIL loa directed: got %h exp 0033", s_loa);
    end
    if (m.loa_diff == 0 || m.lsa_diff == 0) begin
      failures++;
      $display("FAIL approximation never changed a result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
