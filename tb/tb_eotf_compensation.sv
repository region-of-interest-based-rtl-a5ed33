// tb_eotf_compensation - checks eotf_compensation at its default configuration, the
// inverse EOTF (4 sections of 64/1/64/256 sub-segments, no interpolation), against the reference table model.
// The three channels get different codes (R counts up through all 4096
// codes, G counts down, B is random), one pixel per clock with idle gaps;
// each result must appear exactly 2 clocks after its input.
module tb_eotf_compensation;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rgb_t in_px = '0;
  logic ov;
  rgb_t op;
  int checks = 0, failures = 0, cycle = 0;
  mech_t m;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  eotf_compensation u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(ov), .out_px(op));

  rgb_t exp_q [$];
  int   due_q [$];

  function automatic chan_t f(chan_t x);
    return chan_t'(ref_lut(FN_EOTF_INV, EOTF_INTERP, EOTF_N_SEC, EOTF_N_SEG, int'(x), m));
  endfunction

  always @(posedge clk) begin
    if (in_valid) begin
      exp_q.push_back('{r: f(in_px.r), g: f(in_px.g), b: f(in_px.b)});
      due_q.push_back(cycle + 2);
    end
    if (rst_n && ov) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        rgb_t e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (op !== e) begin
          failures++;
          if (failures < 20) $display("FAIL got %p exp %p", op, e);
        end
        if (d != cycle) begin
          failures++;
          $display("FAIL latency: output at %0d, due %0d", cycle, d);
        end
      end
    end
  end

  initial begin
    m = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int x = 0; x < 4096; x++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      in_px    <= '{r: chan_t'(x), g: chan_t'(4095 - x), b: chan_t'($urandom)};
      if ($urandom_range(7) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
