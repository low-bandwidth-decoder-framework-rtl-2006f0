// tb_recfg_buffer: self-checking test of the reconfigurable pipeline/ILP buffer.
// Each MB-pipeline step the producer writes a fresh random macroblock of words,
// while the consumer reads back, at random addresses, the macroblock written in
// the previous step; in the layer-interleaved configuration the producer also
// reads the previous step's macroblock through its inter-layer port while it is
// writing its own. Every read is compared with the reference copy of the step it
// belongs to. Checks the bank-select toggling on swap.
module tb_recfg_buffer;

  localparam int DW = 36, WORDS = 96, AW = 7;

  logic          clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ilp_mode, swap, p_we, ilp_re, c_re, wsel;
  logic [AW-1:0] p_addr, ilp_addr, c_addr;
  logic [DW-1:0] p_wdata, ilp_rdata, c_rdata;

  recfg_buffer dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] cur [WORDS], prev [WORDS];
  int ilp_reads = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_wsel;
    ilp_mode = 0; swap = 0; p_we = 0; ilp_re = 0; c_re = 0;
    p_addr = 0; ilp_addr = 0; c_addr = 0; p_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_wsel = 0;
    for (int st = 0; st < 24; st++) begin
      ilp_mode = (st >= 12);
      for (int a = 0; a < WORDS; a++) cur[a] = {$urandom, $urandom};
      for (int a = 0; a < WORDS; a++) begin
        int ca, ia;
        ca = $urandom_range(0, WORDS - 1);
        ia = $urandom_range(0, WORDS - 1);
        @(negedge clk);
        p_we = 1; p_addr = AW'(a); p_wdata = cur[a];
        c_re = (st > 0); c_addr = AW'(ca);
        ilp_re = ilp_mode && (st > 0); ilp_addr = AW'(ia);
        @(negedge clk);
        p_we = 0; c_re = 0; ilp_re = 0;
        if (st > 0) begin
          checks++;
          if (c_rdata != prev[ca]) begin
            failures++;
            $display("step %0d consumer addr %0d: got %h expected %h", st, ca, c_rdata, prev[ca]);
          end
          if (ilp_mode) begin
            checks++; ilp_reads++;
            if (ilp_rdata != prev[ia]) begin
              failures++;
              $display("step %0d ILP addr %0d: got %h expected %h", st, ia, ilp_rdata, prev[ia]);
            end
          end
        end
      end
      checks++;
      if (wsel != exp_wsel) begin failures++; $display("wsel %0d expected %0d", wsel, exp_wsel); end
      @(negedge clk);
      swap = 1;
      @(negedge clk);
      swap = 0;
      exp_wsel = !exp_wsel;
      prev = cur;
    end
    checks++;
    if (ilp_reads == 0) begin failures++; $display("no inter-layer reads happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
