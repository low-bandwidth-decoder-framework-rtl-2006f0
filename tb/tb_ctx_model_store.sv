// tb_ctx_model_store: self-checking test of the N-layer context SRAM and cache.
// All contexts of all layers are first initialised by writes (as at slice start),
// then a random mix of reads and updates is issued, with a strong bias towards a
// few contexts of the current layer and frequent layer switches (as in layer-
// interleaved decoding). Each read is compared with a reference array; the ack
// latency must be 1 cycle on a hit and 3 on a miss; hits, misses and dirty
// write-backs must all occur.
module tb_ctx_model_store;

  localparam int NL = 4, NC = 460;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       req, we, ready, ack, hit;
  logic [1:0] layer;
  logic [8:0] ctx;
  logic [6:0] wdata, rdata;

  ctx_model_store dut (.*);

  int checks = 0, failures = 0;
  int model [NL][NC];
  int hits = 0, misses = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit w, int ly, int cx, int val);
    int lat;
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = 1; we = w; layer = 2'(ly); ctx = 9'(cx); wdata = 7'(val);
    @(negedge clk);
    req = 0;
    lat = 1;
    while (!ack) begin @(negedge clk); lat++; end
    if (!w) begin
      checks++;
      if (rdata != 7'(model[ly][cx])) begin
        failures++;
        $display("layer %0d ctx %0d: read %0d expected %0d", ly, cx, rdata, model[ly][cx]);
      end
    end
    checks++;
    if (lat != (hit ? 1 : 3)) begin failures++; $display("latency %0d, hit %0d", lat, hit); end
    if (hit) hits++; else misses++;
    if (w) model[ly][cx] = val;
  endtask

  initial begin
    req = 0; we = 0; layer = 0; ctx = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ly = 0; ly < NL; ly++)
      for (int cx = 0; cx < NC; cx++) access(1, ly, cx, $urandom_range(0, 127));
    for (int it = 0; it < 4000; it++) begin
      int ly, cx;
      ly = $urandom_range(0, NL - 1);
      cx = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 40) : $urandom_range(0, NC - 1);
      access($urandom_range(0, 1), ly, cx, $urandom_range(0, 127));
    end
    // final read-back of everything
    for (int ly = 0; ly < NL; ly++)
      for (int cx = 0; cx < NC; cx++) access(0, ly, cx, 0);
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("hits %0d misses %0d", hits, misses); end
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
