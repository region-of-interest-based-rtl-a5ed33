// tb_csc_channel - checks the three rows of the default colour conversion
// (each row a csc_channel with its own precision-scaling and adder
// parameters) against the bit-accurate reference model, on corner pixels
// (black, white, saturated primaries, which drive the clamps) and random
// pixels streamed one per clock with idle gaps. Each result must appear
// exactly 4 clocks after its input.
module tb_csc_channel;
  import drp_pkg::*;
  import drp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rgb_t  in_px = '0;
  logic  v [3];
  chan_t o [3];
  int checks = 0, failures = 0, cycle = 0;
  mech_t m;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    csc_channel #(.ROW(i)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_px(in_px),
      .out_valid(v[i]), .out_ch(o[i]));
  end

  int exp_q [3][$];
  int due_q [$];

  always @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < 3; i++)
        exp_q[i].push_back(ref_csc(i, CSC_F_CO, CSC_F_IN, CSC_A_T, CSC_A_S,
                                   CSC_A_P, CSC_M_REF, in_px, m));
      due_q.push_back(cycle + 4);
    end
    for (int i = 0; i < 3; i++) begin
      if (rst_n && v[i]) begin
        checks++;
        if (exp_q[i].size() == 0) begin
          failures++;
          $display("FAIL row %0d: output without input", i);
        end else begin
          int e;
          e = exp_q[i].pop_front();
          if (int'(o[i]) != e) begin
            failures++;
            if (failures < 20) $display("FAIL row %0d: got %0d exp %0d", i, o[i], e);
          end
          if (i == 0) begin
            int d;
            d = due_q.pop_front();
            checks++;
            if (d != cycle) begin
              failures++;
              $display("FAIL latency: output at %0d, due %0d", cycle, d);
            end
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
    send('{r: 12'd2048, g: 12'd1024, b: 12'd512});
    for (int n = 0; n < 5000; n++)
      send('{r: chan_t'($urandom), g: chan_t'($urandom), b: chan_t'($urandom)});
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (exp_q[i].size() != 0) begin
        failures++;
        $display("FAIL row %0d: %0d outputs missing", i, exp_q[i].size());
      end
    end
    checks++;
    if (m.loa_diff == 0 || m.lsa_diff == 0 || m.clamp_low == 0 ||
        m.clamp_high == 0 || m.scale_trunc == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: loa %0d lsa %0d clamp %0d/%0d trunc %0d",
               m.loa_diff, m.lsa_diff, m.clamp_low, m.clamp_high, m.scale_trunc);
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
