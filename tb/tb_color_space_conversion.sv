// tb_color_space_conversion - checks color_space_conversion twice:
//   u_apx: the default approximate configuration, against the bit-accurate
//          reference model, all three output channels;
//   u_ref: an exact configuration (13 fractional bits everywhere, split
//          points 0), against the real-valued matrix product, within
//          2 codes (coefficient rounding only).
// Pixels stream one per clock with idle gaps; each result must appear
// exactly 4 clocks after its input.
module tb_color_space_conversion;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  localparam f_co_arr_t EX_F_CO = '{'{5'd13, 5'd13, 5'd13}, '{5'd13, 5'd13, 5'd13},
                                    '{5'd13, 5'd13, 5'd13}};
  localparam f_in_arr_t EX_F_IN = '{5'd13, 5'd13, 5'd13};
  localparam a_p_arr_t  EX_A_P  = '0;

  // The matrix as real numbers (BT.2020 to BT.709).
  real mreal [3][3] = '{'{ 1.6605, -0.5876, -0.0728},
                        '{-0.1246,  1.1329, -0.0083},
                        '{-0.0182, -0.1006,  1.1187}};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rgb_t in_px = '0;
  logic va, vr;
  rgb_t oa, orf;
  int checks = 0, failures = 0, cycle = 0;
  mech_t m;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  color_space_conversion u_apx (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(va), .out_px(oa));

  color_space_conversion #(.F_CO(EX_F_CO), .F_IN(EX_F_IN), .A_P(EX_A_P)) u_ref (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
    .out_valid(vr), .out_px(orf));

  rgb_t exp_q [$];
  rgb_t in_q [$];
  int   due_q [$];

  function automatic int ideal(int i, rgb_t p);
    real s;
    s = mreal[i][0] * p.r + mreal[i][1] * p.g + mreal[i][2] * p.b;
    if (s < 0.0) return 0;
    if (s > 4095.0) return 4095;
    return int'($floor(s));
  endfunction

  always @(posedge clk) begin
    if (in_valid) begin
      rgb_t e;
      e.r = chan_t'(ref_csc(0, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, in_px, m));
      e.g = chan_t'(ref_csc(1, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, in_px, m));
      e.b = chan_t'(ref_csc(2, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S, CSC_A_P, CSC_M_REF, in_px, m));
      exp_q.push_back(e);
      in_q.push_back(in_px);
      due_q.push_back(cycle + 4);
    end
    if (rst_n && va) begin
      checks += 3;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        rgb_t e, p;
        int d;
        int got [3];
        e = exp_q.pop_front();
        p = in_q.pop_front();
        d = due_q.pop_front();
        if (oa !== e) begin
          failures++;
          if (failures < 20) $display("FAIL approx: got %p exp %p", oa, e);
        end
        checks++;
        if (d != cycle) begin
          failures++;
          $display("FAIL latency: output at %0d, due %0d", cycle, d);
        end
        checks++;
        if (!vr) begin
          failures++;
          $display("FAIL exact instance out of step");
        end
        got = '{int'(orf.r), int'(orf.g), int'(orf.b)};
        for (int i = 0; i < 3; i++) begin
          int diff;
          checks++;
          diff = got[i] - ideal(i, p);
          if (diff > 2 || diff < -2) begin
            failures++;
            if (failures < 20)
              $display("FAIL exact row %0d: got %0d ideal %0d", i, got[i], ideal(i, p));
          end
        end
      end
    end
  end

  task automatic send(rgb_t p);
    @(posedge clk);
    in_valid <= 1'b1;
    in_px    <= p;
    if ($urandom_range(5) == 0) begin
      @(posedge clk);
      in_valid <= 1'b0;
    end
  endtask

  initial begin
    m = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send('{r: 12'd0,    g: 12'd0,    b: 12'd0});
    send('{r: 12'd4095, g: 12'd4095, b: 12'd4095});
    send('{r: 12'd4095, g: 12'd0,    b: 12'd0});
    send('{r: 12'd0,    g: 12'd4095, b: 12'd0});
    send('{r: 12'd0,    g: 12'd0,    b: 12'd4095});
    for (int n = 0; n < 4000; n++)
      send('{r: chan_t'($urandom), g: chan_t'($urandom), b: chan_t'($urandom)});
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
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
