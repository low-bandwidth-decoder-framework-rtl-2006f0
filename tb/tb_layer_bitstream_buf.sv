// tb_layer_bitstream_buf: self-checking test of the per-layer bitstream FIFOs.
// A queue per layer models the buffer. The test has three phases:
//   1. fill layer 2 to full, checking that the other layers stay empty;
//   2. drain layer 2 in order;
//   3. 20000 cycles of random writes and reads over all layers. A write goes to
//      a random layer that is not full, a read to a random layer that is not
//      empty, both in the same cycle at times.
// Every cycle the empty, full and refill flags of every layer are compared with
// the model. Every read word is compared one cycle after the read.
module tb_layer_bitstream_buf;
  localparam int NL = 4, LD = 32;

  logic          clk, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, rd_valid;
  logic [1:0]    wr_layer = 0, rd_layer = 0;
  logic [31:0]   wr_data = 0, rd_data;
  logic [NL-1:0] empty, full, refill;

  int checks = 0, failures = 0;

  layer_bitstream_buf dut (
    .clk, .rst_n, .wr_en, .wr_layer, .wr_data, .rd_en, .rd_layer,
    .rd_valid, .rd_data, .empty, .full, .refill
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q [NL][$];
  logic [31:0] exp_word;

  task automatic check_flags();
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (empty[l] !== (q[l].size() == 0) || full[l] !== (q[l].size() == LD) ||
          refill[l] !== (q[l].size() <= LD / 2)) begin
        failures++;
        if (failures < 10)
          $display("flags of layer %0d: empty %b full %b refill %b with %0d words",
                   l, empty[l], full[l], refill[l], q[l].size());
      end
    end
  endtask

  // drive one cycle: optional write and read, then check the read word
  task automatic cycle(bit w, int wl, bit r, int rl);
    logic [31:0] v;
    @(negedge clk);
    check_flags();
    v = $urandom;
    wr_en = w; wr_layer = 2'(wl); wr_data = v;
    rd_en = r; rd_layer = 2'(rl);
    if (r) begin exp_word = q[rl].pop_front(); end
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    if (w) q[wl].push_back(v);
    if (r) begin
      checks++;
      if (!rd_valid || rd_data !== exp_word) begin
        failures++;
        if (failures < 10)
          $display("read layer %0d: got %h (valid %b) expected %h", rl, rd_data, rd_valid, exp_word);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < LD; k++) cycle(1, 2, 0, 0);
    check_flags();
    for (int k = 0; k < LD; k++) cycle(0, 0, 1, 2);
    check_flags();
    for (int k = 0; k < 10000; k++) begin
      int  wl, rl;
      bit  w, r;
      wl = $urandom_range(0, NL - 1);
      rl = $urandom_range(0, NL - 1);
      w  = ($urandom_range(0, 99) < 55) && (q[wl].size() < LD);
      r  = ($urandom_range(0, 99) < 50) && (q[rl].size() > 0);
      cycle(w, wl, r, rl);
    end
    check_flags();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
