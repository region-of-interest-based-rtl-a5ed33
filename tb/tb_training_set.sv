// tb_training_set - runs the quality-estimation training set through two
// builds of the pipeline and reports the colour error of the approximate
// build in CIELAB delta E.
//
// Training set: the colour cube sampled in 128 steps per channel (the 7 MSBs
// of each 12-bit channel), with uniform random noise below the step size
// (32 codes) added to every channel: 128^3 = 2,097,152 pixels, streamed one
// per clock.
//
//   u_apx  the default (approximate) parameter set;
//   u_ref  the reference parameter set: full 4096-word tables without
//          interpolation, 13 fractional bits everywhere, exact adders.
//
// Checks: every u_ref pixel equals the golden output of the reference
// model, every u_apx pixel equals the approximate model, both 8 clocks
// after the input. Reported: maximum and mean delta E (CIE76) between u_apx
// and u_ref. The outputs are taken as sRGB-encoded display values with
// BT.709 primaries and D65 white when they are converted to CIELAB.
module tb_training_set;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  localparam int STEPS = 128;
  localparam int LATENCY = 8;

  localparam seg_list_t FULL = '{4096, 0, 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0, 0, 0};
  localparam f_co_arr_t R_F_CO = '{'{5'd13, 5'd13, 5'd13}, '{5'd13, 5'd13, 5'd13},
                                   '{5'd13, 5'd13, 5'd13}};
  localparam f_in_arr_t R_F_IN = '{5'd13, 5'd13, 5'd13};
  localparam a_p_arr_t  R_A_P  = '0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rgb_t in_px = '0;
  logic va, vr;
  rgb_t oa, orf;
  int checks = 0, failures = 0, cycle = 0, pixels = 0;
  mech_t m;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  display_rendering_pipeline u_apx (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(va), .out_px(oa));

  display_rendering_pipeline #(
    .TM_INTERP_P(1'b0), .TM_N_SEC_P(1), .TM_N_SEG_P(FULL),
    .CSC_F_CO_P(R_F_CO), .CSC_F_IN_P(R_F_IN), .CSC_A_P_P(R_A_P),
    .EOTF_INTERP_P(1'b0), .EOTF_N_SEC_P(1), .EOTF_N_SEG_P(FULL)
  ) u_ref (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(vr), .out_px(orf));

  // Table look-ups of both builds, computed once.
  int tm_apx [4096], eo_apx [4096], tm_ref [4096], eo_ref [4096];
  real lin [4096];

  function automatic rgb_t run_apx(rgb_t p);
    rgb_t t, c;
    t = '{r: chan_t'(tm_apx[p.r]), g: chan_t'(tm_apx[p.g]), b: chan_t'(tm_apx[p.b])};
    c.r = chan_t'(ref_csc(0, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m));
    c.g = chan_t'(ref_csc(1, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m));
    c.b = chan_t'(ref_csc(2, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m));
    return '{r: chan_t'(eo_apx[c.r]), g: chan_t'(eo_apx[c.g]), b: chan_t'(eo_apx[c.b])};
  endfunction

  function automatic rgb_t run_ref(rgb_t p);
    rgb_t t, c;
    t = '{r: chan_t'(tm_ref[p.r]), g: chan_t'(tm_ref[p.g]), b: chan_t'(tm_ref[p.b])};
    c.r = chan_t'(ref_csc(0, R_F_CO, R_F_IN, CSC_A_T, CSC_A_S, R_A_P, CSC_M_REF, t, m));
    c.g = chan_t'(ref_csc(1, R_F_CO, R_F_IN, CSC_A_T, CSC_A_S, R_A_P, CSC_M_REF, t, m));
    c.b = chan_t'(ref_csc(2, R_F_CO, R_F_IN, CSC_A_T, CSC_A_S, R_A_P, CSC_M_REF, t, m));
    return '{r: chan_t'(eo_ref[c.r]), g: chan_t'(eo_ref[c.g]), b: chan_t'(eo_ref[c.b])};
  endfunction

  function automatic real lab_f(real t);
    if (t > 0.008856452) return $pow(t, 1.0 / 3.0);
    return t / 0.128418549 + 4.0 / 29.0;
  endfunction

  // sRGB code triple -> CIELAB (D65).
  task automatic to_lab(rgb_t p, output real l, output real a, output real b);
    real r, g, bl, x, y, z;
    r = lin[p.r]; g = lin[p.g]; bl = lin[p.b];
    x = (0.4124 * r + 0.3576 * g + 0.1805 * bl) / 0.95047;
    y =  0.2126 * r + 0.7152 * g + 0.0722 * bl;
    z = (0.0193 * r + 0.1192 * g + 0.9505 * bl) / 1.08883;
    l = 116.0 * lab_f(y) - 16.0;
    a = 500.0 * (lab_f(x) - lab_f(y));
    b = 200.0 * (lab_f(y) - lab_f(z));
  endtask

  rgb_t exp_a [$], exp_r [$];
  int   due_q [$];
  real  de_max = 0.0, de_sum = 0.0;

  always @(posedge clk) begin
    if (in_valid) begin
      exp_a.push_back(run_apx(in_px));
      exp_r.push_back(run_ref(in_px));
      due_q.push_back(cycle + LATENCY);
    end
    if (rst_n && va) begin
      rgb_t ea, er;
      int d;
      real l1, a1, b1, l2, a2, b2, de;
      checks += 4;
      pixels++;
      ea = exp_a.pop_front();
      er = exp_r.pop_front();
      d  = due_q.pop_front();
      if (oa !== ea) begin
        failures++;
        if (failures < 20) $display("FAIL approx pixel %0d: got %p exp %p", pixels, oa, ea);
      end
      if (orf !== er) begin
        failures++;
        if (failures < 20) $display("FAIL reference pixel %0d: got %p exp %p", pixels, orf, er);
      end
      if (d != cycle) begin
        failures++;
        $display("FAIL latency: output at %0d, due %0d", cycle, d);
      end
      if (!vr) begin
        failures++;
        $display("FAIL builds out of step");
      end
      to_lab(oa, l1, a1, b1);
      to_lab(orf, l2, a2, b2);
      de = $sqrt((l1 - l2) * (l1 - l2) + (a1 - a2) * (a1 - a2) + (b1 - b2) * (b1 - b2));
      de_sum += de;
      if (de > de_max) de_max = de;
    end
  end

  initial begin
    m = '{default: 0};
    for (int x = 0; x < 4096; x++) begin
      real v;
      tm_apx[x] = ref_lut(FN_TONE_MAP, TM_INTERP, TM_N_SEC, TM_N_SEG, x, m);
      eo_apx[x] = ref_lut(FN_EOTF_INV, EOTF_INTERP, EOTF_N_SEC, EOTF_N_SEG, x, m);
      tm_ref[x] = ref_lut(FN_TONE_MAP, 1'b0, 1, FULL, x, m);
      eo_ref[x] = ref_lut(FN_EOTF_INV, 1'b0, 1, FULL, x, m);
      v = real'(x) / 4095.0;
      lin[x] = (v <= 0.04045) ? v / 12.92 : $pow((v + 0.055) / 1.055, 2.4);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < STEPS; r++)
      for (int g = 0; g < STEPS; g++)
        for (int b = 0; b < STEPS; b++) begin
          @(posedge clk);
          in_valid <= 1'b1;
          in_px <= '{r: chan_t'(r * 32 + $urandom_range(31)),
                     g: chan_t'(g * 32 + $urandom_range(31)),
                     b: chan_t'(b * 32 + $urandom_range(31))};
        end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (pixels != STEPS * STEPS * STEPS || exp_a.size() != 0) begin
      failures++;
      $display("FAIL %0d pixels out, %0d missing", pixels, exp_a.size());
    end
    $display("training set: %0d pixels, max delta E %0.2f, mean delta E %0.2f",
             pixels, de_max, de_sum / real'(pixels));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS * STEPS * STEPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
