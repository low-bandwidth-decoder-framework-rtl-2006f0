// tb_el_side_info_buf: self-checking test of the per-layer side-information
// buffer. It decodes pictures in the layer-interleaved order (every layer of
// one MB, then the next MB). Before each (MB, layer) it reads the neighbours
// and compares them with a model that stores every written word by
// (layer, x, y):
//   left must be the word of (layer, x-1, y);
//   top must be the word of (layer, x, y-1).
// The pictures are a small one, a full-width (120 MB) one, and one with fewer
// layers. A last phase reads and writes the same entry in one cycle and
// expects the old word. Each read is checked to take exactly one cycle.
module tb_el_side_info_buf;
  localparam int NL = 4, MBW = 120, SIW = 16;

  logic            clk, rst_n = 0;
  logic            rd_req = 0, rd_valid, wr_req = 0;
  logic [1:0]      rd_layer = 0, wr_layer = 0;
  logic [6:0]      rd_mbx = 0, wr_mbx = 0;
  logic [SIW-1:0]  left_info, top_info, wdata = 0;

  int checks = 0, failures = 0;

  el_side_info_buf dut (
    .clk, .rst_n, .rd_req, .rd_layer, .rd_mbx, .rd_valid, .left_info, .top_info,
    .wr_req, .wr_layer, .wr_mbx, .wdata
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [SIW-1:0] model [NL][MBW][2];   // [layer][x][row parity]

  task automatic check(string what, logic [SIW-1:0] got, logic [SIW-1:0] exp,
                       int ly, int x, int y);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("%s layer %0d mb (%0d,%0d): got %h expected %h", what, ly, x, y, got, exp);
    end
  endtask

  task automatic picture(int w, int h, int nl);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int ly = 0; ly < nl; ly++) begin
          logic [SIW-1:0] v;
          @(negedge clk);
          rd_req = 1; rd_layer = 2'(ly); rd_mbx = 7'(x);
          @(negedge clk);
          rd_req = 0;
          checks++;
          if (!rd_valid) begin failures++; $display("rd_valid missing"); end
          if (x > 0) check("left", left_info, model[ly][x-1][y%2], ly, x, y);
          if (y > 0) check("top",  top_info,  model[ly][x][(y+1)%2], ly, x, y);
          v = SIW'($urandom);
          wr_req = 1; wr_layer = 2'(ly); wr_mbx = 7'(x); wdata = v;
          model[ly][x][y%2] = v;
          @(negedge clk);
          wr_req = 0;
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    picture(5, 4, 4);
    picture(MBW, 3, 4);
    picture(7, 3, 2);
    // same-cycle read and write of one entry: old word returned
    for (int k = 0; k < 20; k++) begin
      int ly, x;
      logic [SIW-1:0] old_top, old_left, v;
      ly = k % NL;
      x  = (k * 13) % MBW;
      @(negedge clk);
      wr_req = 1; wr_layer = 2'(ly); wr_mbx = 7'(x); wdata = SIW'($urandom);
      @(negedge clk);
      wr_req = 0;
      old_top = wdata; old_left = wdata;
      v = SIW'($urandom);
      rd_req = 1; rd_layer = 2'(ly); rd_mbx = 7'(x);
      wr_req = 1; wdata = v;
      @(negedge clk);
      rd_req = 0; wr_req = 0;
      check("rw top",  top_info,  old_top,  ly, x, -1);
      check("rw left", left_info, old_left, ly, x, -1);
      rd_req = 1;
      @(negedge clk);
      rd_req = 0;
      check("new top",  top_info,  v, ly, x, -1);
      check("new left", left_info, v, ly, x, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
