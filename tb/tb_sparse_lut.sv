// tb_sparse_lut - checks sparse_lut in four configurations against the
// reference table model, for every one of the 4096 input codes:
//   A: tone mapping, 1 section of 512 sub-segments, interpolation
//   B: inverse EOTF, 4 sections of 64/1/64/256, no interpolation
//   C: tone mapping, 8 sections of 1/2/4/16/4/8/4/2, interpolation
//   D: inverse EOTF, 32 sections, mixed sizes, interpolation
// Inputs stream one per clock with random idle cycles; each output must
// appear exactly 2 clocks after its input (the table's latency).
module tb_sparse_lut;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  localparam seg_list_t SEG_C = '{1, 2, 4, 16, 4, 8, 4, 2,
                                  0, 0, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0};
  localparam seg_list_t SEG_D = '{16, 8, 4, 4, 2, 2, 2, 1,
                                  1, 1, 1, 1, 1, 1, 1, 1,
                                  1, 1, 1, 1, 2, 1, 1, 1,
                                  1, 1, 1, 1, 1, 1, 1, 128};

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  chan_t in_x = '0;
  logic  v [4];
  chan_t y [4];
  int checks = 0, failures = 0, cycle = 0;
  mech_t m;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sparse_lut #(.FN(FN_TONE_MAP), .INTERP(1'b1), .N_SEC(1), .N_SEG(TM_N_SEG)) u_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v[0]), .out_y(y[0]));
  sparse_lut #(.FN(FN_EOTF_INV), .INTERP(1'b0), .N_SEC(4), .N_SEG(EOTF_N_SEG)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v[1]), .out_y(y[1]));
  sparse_lut #(.FN(FN_TONE_MAP), .INTERP(1'b1), .N_SEC(8), .N_SEG(SEG_C)) u_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v[2]), .out_y(y[2]));
  sparse_lut #(.FN(FN_EOTF_INV), .INTERP(1'b1), .N_SEC(32), .N_SEG(SEG_D)) u_d (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_x(in_x), .out_valid(v[3]), .out_y(y[3]));

  // Expected outputs with the cycle at which they are due.
  int exp_q [4][$];
  int due_q [$];

  always @(posedge clk) begin
    if (in_valid) begin
      exp_q[0].push_back(ref_lut(FN_TONE_MAP, 1'b1, 1,  TM_N_SEG,   int'(in_x), m));
      exp_q[1].push_back(ref_lut(FN_EOTF_INV, 1'b0, 4,  EOTF_N_SEG, int'(in_x), m));
      exp_q[2].push_back(ref_lut(FN_TONE_MAP, 1'b1, 8,  SEG_C,      int'(in_x), m));
      exp_q[3].push_back(ref_lut(FN_EOTF_INV, 1'b1, 32, SEG_D,      int'(in_x), m));
      due_q.push_back(cycle + 2);
    end
    for (int k = 0; k < 4; k++) begin
      if (rst_n && v[k]) begin
        checks++;
        if (exp_q[k].size() == 0) begin
          failures++;
          $display("FAIL table %0d: output without input", k);
        end else begin
          int e;
          e = exp_q[k].pop_front();
          if (int'(y[k]) != e) begin
            failures++;
            if (failures < 20) $display("FAIL table %0d: got %0d exp %0d", k, y[k], e);
          end
          if (k == 0) begin
            int d;
            d = due_q.pop_front();
            checks++;
            if (d != cycle) begin
              failures++;
              $display("FAIL latency: output at cycle %0d, due %0d", cycle, d);
            end
          end
        end
      end
    end
  end

  // Approximation quality: tone mapping with 512 interpolated sub-segments
  // must stay within a few codes of the exact curve.
  int max_err = 0;

  initial begin
    m = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int x = 0; x < 4096; x++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      in_x     <= chan_t'(x);
      if ($urandom_range(7) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin
        failures++;
        $display("FAIL table %0d: %0d outputs missing", k, exp_q[k].size());
      end
    end
    // Interpolation error of configuration A against the exact curve.
    for (int x = 0; x < 4096; x++) begin
      int e;
      e = ref_lut(FN_TONE_MAP, 1'b1, 1, TM_N_SEG, x, m) - ref_tone_map(x);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
    end
    checks++;
    if (max_err > 4) begin
      failures++;
      $display("FAIL interpolation error %0d codes", max_err);
    end
    checks++;
    if (m.interp_steps == 0 || m.sparse_shared == 0) begin
      failures++;
      $display("FAIL interpolation or sparse sharing never exercised");
    end
    $display("tone-map max interpolation error: %0d codes", max_err);
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
