// tb_upsample_filter: self-checking test of the FIR filter array.
// Random rows are pushed with random modes and residual edge flags; after every
// cycle with an output request the four outputs are compared with a model that
// keeps its own copy of the column shift registers and applies the SVC dyadic
// weights (1/32 scale) horizontally and vertically, rounds by (v+512)>>10 and
// clips intra results. Also checks the one-cycle output latency and that a push
// in the same cycle as an output does not disturb that output.
module tb_upsample_filter;
  import svc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  up_mode_e  mode;
  logic      push, h_clamp_l, h_clamp_r, out_en, v_clamp, out_valid;
  up_phase_e out_phase;
  sample_t   in_pix [6];
  sample_t   out_pix [4];

  upsample_filter dut (.*);

  int checks = 0, failures = 0;
  int sr [4][4];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void weights(int m, int ph, int cl, output int w[4]);
    if (m == 0) begin
      if (ph == 0) w = '{-3, 28, 8, -1}; else w = '{-1, 8, 28, -3};
    end else if (m == 2 && cl) begin
      if (ph == 0) w = '{0, 32, 0, 0}; else w = '{0, 0, 32, 0};
    end else begin
      if (ph == 0) w = '{0, 24, 8, 0}; else w = '{0, 8, 24, 0};
    end
  endfunction

  int exp_pix [4];
  int exp_valid;
  int m, h [4], w [4], wv [4], acc, r;
  int px [6];

  initial begin
    mode = UP_LUMA_INTRA; push = 0; h_clamp_l = 0; h_clamp_r = 0; out_en = 0;
    v_clamp = 0; out_phase = PH_Q1;
    foreach (in_pix[i]) in_pix[i] = '0;
    foreach (sr[c, k]) sr[c][k] = 0;
    exp_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      // mode changes only every 64 cycles, as between jobs
      if (it % 64 == 0) m = $urandom_range(0, 2);
      mode      = up_mode_e'(m);
      push      = $urandom_range(0, 1);
      out_en    = $urandom_range(0, 1);
      out_phase = up_phase_e'($urandom_range(0, 1));
      v_clamp   = $urandom_range(0, 1);
      h_clamp_l = $urandom_range(0, 1);
      h_clamp_r = $urandom_range(0, 1);
      for (int i = 0; i < 6; i++) begin
        px[i] = (m == 2) ? int'($urandom_range(0, 510)) - 255 : int'($urandom_range(0, 255));
        in_pix[i] = sample_t'(px[i]);
      end
      // model of the output requested now (uses the registers before the push)
      if (out_en) begin
        weights(m, int'(out_phase), v_clamp, wv);
        for (int c = 0; c < 4; c++) begin
          acc = 0;
          for (int k = 0; k < 4; k++) acc += wv[k] * sr[c][k];
          r = (acc + 512) >>> 10;
          if (m != 2) r = (r < 0) ? 0 : (r > 255) ? 255 : r;
          exp_pix[c] = r;
        end
      end
      exp_valid = out_en;
      // model of the push
      if (push) begin
        for (int c = 0; c < 4; c++) begin
          int base, ph, cl;
          base = (c == 0) ? 0 : (c == 3) ? 2 : 1;
          ph   = (c == 0 || c == 2) ? 1 : 0;
          cl   = (c == 0) ? h_clamp_l : (c == 3) ? h_clamp_r : 0;
          weights(m, ph, cl, w);
          h[c] = 0;
          for (int k = 0; k < 4; k++) h[c] += w[k] * px[base + k];
        end
      end
      @(posedge clk);
      #1;
      if (push)
        for (int c = 0; c < 4; c++) begin
          for (int k = 0; k < 3; k++) sr[c][k] = sr[c][k+1];
          sr[c][3] = h[c];
        end
      checks++;
      if (out_valid != exp_valid[0]) begin
        failures++;
        $display("cycle %0d: out_valid %0d expected %0d", it, out_valid, exp_valid);
      end
      if (exp_valid)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (out_pix[c] != exp_pix[c]) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d col %0d mode %0d: got %0d expected %0d", it, c, m, out_pix[c], exp_pix[c]);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
