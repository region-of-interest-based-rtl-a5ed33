// tb_display_rendering_pipeline - end-to-end test of the pipeline at its
// default parameters (no parameter overrides).
//
// Pixels: black, white, the primaries, a grey ramp through all 4096 codes,
// then random pixels; first as one continuous burst (one pixel per clock,
// which must come out as an unbroken burst 8 clocks later), then with
// random idle cycles. Every output pixel is compared with the chained
// bit-accurate reference models (tone-mapping table, colour conversion,
// inverse-EOTF table) and must appear exactly 8 clocks after its input.
//
// The reference models count how often each approximation mechanism
// changed a result: interpolation in the tone-mapping table, a shared word
// of the sparse EOTF table, the lower-OR adder, the lower-select adder,
// precision-scaling truncation, and clamping at 0 and at 4095. A mechanism
// that never fired counts as a failure.
module tb_display_rendering_pipeline;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  localparam int LATENCY = 8;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rgb_t in_px = '0;
  logic ov;
  rgb_t op;
  int checks = 0, failures = 0, cycle = 0;
  int pixels = 0, longest_burst = 0, burst = 0;
  mech_t m_tm, m_csc, m_eotf;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  display_rendering_pipeline u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(ov), .out_px(op));

  function automatic rgb_t model(rgb_t p);
    rgb_t t, c, e;
    t.r = chan_t'(ref_lut(FN_TONE_MAP, TM_INTERP, TM_N_SEC, TM_N_SEG, int'(p.r), m_tm));
    t.g = chan_t'(ref_lut(FN_TONE_MAP, TM_INTERP, TM_N_SEC, TM_N_SEG, int'(p.g), m_tm));
    t.b = chan_t'(ref_lut(FN_TONE_MAP, TM_INTERP, TM_N_SEC, TM_N_SEG, int'(p.b), m_tm));
    c.r = chan_t'(ref_csc(0, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m_csc));
    c.g = chan_t'(ref_csc(1, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m_csc));
    c.b = chan_t'(ref_csc(2, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, t, m_csc));
    e.r = chan_t'(ref_lut(FN_EOTF_INV, EOTF_INTERP, EOTF_N_SEC, EOTF_N_SEG, int'(c.r), m_eotf));
    e.g = chan_t'(ref_lut(FN_EOTF_INV, EOTF_INTERP, EOTF_N_SEC, EOTF_N_SEG, int'(c.g), m_eotf));
    e.b = chan_t'(ref_lut(FN_EOTF_INV, EOTF_INTERP, EOTF_N_SEC, EOTF_N_SEG, int'(c.b), m_eotf));
    return e;
  endfunction

  rgb_t exp_q [$];
  int   due_q [$];

  always @(posedge clk) begin
    if (in_valid) begin
      exp_q.push_back(model(in_px));
      due_q.push_back(cycle + LATENCY);
    end
    if (rst_n && ov) begin
      burst++;
      if (burst > longest_burst) longest_burst = burst;
      checks += 2;
      pixels++;
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
          if (failures < 20) $display("FAIL pixel %0d: got %p exp %p", pixels, op, e);
        end
        if (d != cycle) begin
          failures++;
          $display("FAIL latency: output at %0d, due %0d", cycle, d);
        end
      end
    end else begin
      burst = 0;
    end
  end

  task automatic send(rgb_t p, bit gaps);
    @(posedge clk);
    in_valid <= 1'b1;
    in_px    <= p;
    if (gaps && $urandom_range(5) == 0) begin
      @(posedge clk);
      in_valid <= 1'b0;
    end
  endtask

  function automatic rgb_t rnd();
    return '{r: chan_t'($urandom), g: chan_t'($urandom), b: chan_t'($urandom)};
  endfunction

  int n_burst;

  initial begin
    m_tm = '{default: 0};
    m_csc = '{default: 0};
    m_eotf = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Continuous burst: corners and a grey ramp.
    send('{r: 12'd0,    g: 12'd0,    b: 12'd0},    1'b0);
    send('{r: 12'd4095, g: 12'd4095, b: 12'd4095}, 1'b0);
    send('{r: 12'd4095, g: 12'd0,    b: 12'd0},    1'b0);
    send('{r: 12'd0,    g: 12'd4095, b: 12'd0},    1'b0);
    send('{r: 12'd0,    g: 12'd0,    b: 12'd4095}, 1'b0);
    for (int x = 0; x < 4096; x++)
      send('{r: chan_t'(x), g: chan_t'(x), b: chan_t'(x)}, 1'b0);
    n_burst = 5 + 4096;
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (longest_burst != n_burst) begin
      failures++;
      $display("FAIL throughput: longest output burst %0d, expected %0d", longest_burst, n_burst);
    end
    // Random pixels with idle gaps.
    for (int n = 0; n < 20000; n++) send(rnd(), 1'b1);
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("pixels %0d, longest burst %0d", pixels, longest_burst);
    $display("mechanisms: tm-interpolation %0d, eotf-shared-word %0d, loa %0d, lsa %0d, scale-trunc %0d, clamp-0 %0d, clamp-4095 %0d",
             m_tm.interp_steps, m_eotf.sparse_shared, m_csc.loa_diff, m_csc.lsa_diff,
             m_csc.scale_trunc, m_csc.clamp_low, m_csc.clamp_high);
    checks += 7;
    if (m_tm.interp_steps == 0)   begin failures++; $display("FAIL no interpolation step"); end
    if (m_eotf.sparse_shared == 0) begin failures++; $display("FAIL no shared sparse word"); end
    if (m_csc.loa_diff == 0)      begin failures++; $display("FAIL LOA never approximated"); end
    if (m_csc.lsa_diff == 0)      begin failures++; $display("FAIL LSA never approximated"); end
    if (m_csc.scale_trunc == 0)   begin failures++; $display("FAIL no precision-scaling truncation"); end
    if (m_csc.clamp_low == 0)     begin failures++; $display("FAIL no clamp at 0"); end
    if (m_csc.clamp_high == 0)    begin failures++; $display("FAIL no clamp at 4095"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
