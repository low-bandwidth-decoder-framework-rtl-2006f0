// tb_layer_interleave_ctrl: self-checking test of the MB-pipeline schedule.
// For interleaved frames with 1..4 layers and for layer-sequential frames, the
// jobs entering stage 1 are compared with the expected order (interleaved: every
// layer of a macroblock before the next macroblock; sequential: one layer in
// raster order); stage 2 and 3 must carry the job of the previous step and the
// one before. Stages answer ready after random delays; no step may happen while
// a stage with a job is not ready. Checks s1_ilp, s3_top, the number of steps
// (jobs + 3 to drain) and frame_done.
module tb_layer_interleave_ctrl;
  import svc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, interleave, s1_ilp, s3_top, step, busy, frame_done;
  logic [2:0]  num_layers, stage_ready;
  logic [1:0]  layer;
  logic [15:0] num_mbs;
  mb_job_t     s1_job, s2_job, s3_job;

  layer_interleave_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(bit ilv, int nl, int ly, int nmb);
    mb_job_t exp_q [$];
    mb_job_t h1, h2;
    int steps, njobs, idx, dones;
    for (int mb = 0; mb < nmb; mb++)
      if (ilv) for (int x = 0; x < nl; x++) exp_q.push_back('{1'b1, 16'(mb), 2'(x)});
      else exp_q.push_back('{1'b1, 16'(mb), 2'(ly)});
    njobs = exp_q.size();
    @(negedge clk);
    start = 1; interleave = ilv; num_layers = 3'(nl); layer = 2'(ly); num_mbs = 16'(nmb);
    @(negedge clk);
    start = 0;
    steps = 0; idx = 0; dones = 0;
    h1 = '0; h2 = '0;
    while (busy) begin
      stage_ready = 3'($urandom_range(0, 7));
      #1;
      checks++;
      if (step != ((stage_ready[0] || !s1_job.valid) && (stage_ready[1] || !s2_job.valid) &&
                   (stage_ready[2] || !s3_job.valid))) begin
        failures++; $display("step while a stage is busy, or no step when all ready");
      end
      @(posedge clk);
      #1;
      if (frame_done) dones++;
      if (step_q) begin
        steps++;
        checks += 3;
        if (idx < njobs) begin
          if (s1_job != exp_q[idx]) begin
            failures++;
            $display("stage 1 job %0d: mb %0d layer %0d, expected mb %0d layer %0d",
                     idx, s1_job.mb, s1_job.layer, exp_q[idx].mb, exp_q[idx].layer);
          end
          checks++;
          if (s1_ilp != (ilv && exp_q[idx].layer != 0)) begin failures++; $display("s1_ilp wrong"); end
          idx++;
        end else if (s1_job.valid) begin failures++; $display("extra job issued"); end
        if (s2_job != h1) begin failures++; $display("stage 2 does not hold the previous job"); end
        if (s3_job != h2) begin failures++; $display("stage 3 does not hold the job before"); end
        if (s3_job.valid) begin
          checks++;
          if (s3_top != (s3_job.layer == (ilv ? nl - 1 : ly))) begin failures++; $display("s3_top wrong"); end
        end
        h2 = h1; h1 = s1_job;
      end
      @(negedge clk);
    end
    checks += 3;
    if (idx != njobs) begin failures++; $display("%0d jobs issued, expected %0d", idx, njobs); end
    if (steps != njobs + 3) begin failures++; $display("%0d steps, expected %0d", steps, njobs + 3); end
    if (dones != 1) begin failures++; $display("frame_done seen %0d times", dones); end
  endtask

  logic step_q;
  always @(posedge clk) step_q <= step;

  initial begin
    start = 0; interleave = 0; num_layers = 1; layer = 0; num_mbs = 1; stage_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_frame(1, 4, 0, 5);
    run_frame(1, 2, 0, 7);
    run_frame(1, 1, 0, 3);
    run_frame(0, 1, 2, 6);
    run_frame(1, 3, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
