// tb_bl_data_sram: self-checking test of the two-bank BL data SRAM. Writes random
// rows into random banks and addresses while reading others, and compares every
// read (one-cycle latency, bank selected at the read) with a reference copy.
module tb_bl_data_sram;
  import svc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       we, wbank, re, rbank;
  logic [4:0] waddr, raddr;
  sample_t    wdata [12];
  sample_t    rdata [12];

  bl_data_sram dut (.*);

  int checks = 0, failures = 0;
  int ref_mem [2][28][12];
  int written [2][28];
  int exp_row [12];
  int exp_ok;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0;
    foreach (wdata[i]) wdata[i] = '0;
    foreach (written[b, a]) written[b][a] = 0;
    exp_ok = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      wbank = $urandom_range(0, 1);
      waddr = 5'($urandom_range(0, 27));
      re    = $urandom_range(0, 1);
      rbank = $urandom_range(0, 1);
      raddr = 5'($urandom_range(0, 27));
      for (int i = 0; i < 12; i++) wdata[i] = sample_t'($urandom_range(0, 511));
      exp_ok = 0;
      if (re && written[rbank][raddr]) begin
        exp_ok = 1;
        for (int i = 0; i < 12; i++) exp_row[i] = ref_mem[rbank][raddr][i];
      end
      @(posedge clk);
      #1;
      // the data must belong to the bank named at the read, not the current one
      rbank = $urandom_range(0, 1);
      raddr = 5'($urandom_range(0, 27));
      #1;
      if (we) begin
        written[wbank][waddr] = 1;
        for (int i = 0; i < 12; i++) ref_mem[wbank][waddr][i] = wdata[i];
      end
      if (exp_ok) begin
        checks++;
        for (int i = 0; i < 12; i++)
          if (rdata[i] != sample_t'(exp_row[i])) begin
            failures++;
            $display("read bank %0d addr %0d sample %0d: got %0d expected %0d",
                     rbank, raddr, i, rdata[i], exp_row[i]);
            break;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
