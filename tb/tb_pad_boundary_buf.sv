// tb_pad_boundary_buf: checks the boundary-line assignment against the mode table
// of the padding architecture, written out here cell by cell as text: for each
// (TL,T,L,C) intra pattern and each line, the source name ("-" = don't care, the
// line keeps its value; "V5A", "H4A", "H5A" = that line of the previous load).
// Random source lines are applied; after each load every line that is not a
// don't-care is compared with its named source, and don't-care lines must hold.
module tb_pad_boundary_buf;
  import svc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   load, tl_intra, t_intra, l_intra, c_intra;
  line4_t a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q, v0_ext;
  line4_t vl [6], hl [6];

  pad_boundary_buf dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows: V1 V2 V3 V4 V5 H0 H1 H2 H3 H4 H5 ; columns: patterns 0001 .. 1110
  string tbl [11][14] = '{
    '{"-","-","-","M","M","M","M","V5A","V5A","V5A","V5A","M","M","M"},
    '{"N","J","J","-","N","J","J","-","N","J","J","-","N","J"},
    '{"O","K","K","-","O","K","K","-","O","K","K","-","O","K"},
    '{"P","L","L","-","P","L","L","-","P","L","L","-","P","L"},
    '{"Q","Q","Q","Q","Q","Q","Q","Q","Q","Q","Q","Q","Q","Q"},
    '{"-","H4A","H4A","-","-","H4A","H4A","H4A","H4A","H4A","H4A","H4A","H4A","H4A"},
    '{"-","E","E","-","-","E","E","H5A","H5A","E","E","H5A","H5A","E"},
    '{"F","-","F","A","F","A","F","-","F","-","F","A","F","A"},
    '{"G","-","G","B","G","B","G","-","G","-","G","B","G","B"},
    '{"H","-","H","C","H","C","H","-","H","-","H","C","H","C"},
    '{"I","-","I","D","I","D","I","-","I","-","I","D","I","D"}
  };

  function automatic line4_t src(string s, line4_t v5a, line4_t h4a, line4_t h5a);
    case (s)
      "A": return a;  "B": return b;  "C": return c;  "D": return d;
      "E": return e;  "F": return f;  "G": return g;  "H": return h;
      "I": return i;  "J": return j;  "K": return k;  "L": return l;
      "M": return m;  "N": return n;  "O": return o;  "P": return p;
      "Q": return q;  "V5A": return v5a; "H4A": return h4a; "H5A": return h5a;
      default: return '0;
    endcase
  endfunction

  line4_t before_v [6], before_h [6], expv;

  initial begin
    load = 0; {tl_intra, t_intra, l_intra, c_intra} = '0;
    {a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q, v0_ext} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int pat;
      pat = $urandom_range(1, 14);
      {tl_intra, t_intra, l_intra, c_intra} = 4'(pat);
      {a, b, c, d, e, f, g, h} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      {i, j, k, l, m, n, o, p} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      {q, v0_ext} = {$urandom, $urandom};
      before_v = vl;
      before_h = hl;
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (vl[0] != v0_ext) begin failures++; $display("V0 not loaded from external memory"); end
      for (int r = 0; r < 11; r++) begin
        line4_t got, old;
        string s;
        s   = tbl[r][pat - 1];
        got = (r < 5) ? vl[r + 1] : hl[r - 5];
        old = (r < 5) ? before_v[r + 1] : before_h[r - 5];
        expv = (s == "-") ? old : src(s, before_v[5], before_h[4], before_h[5]);
        checks++;
        if (got != expv) begin
          failures++;
          $display("pattern %04b line %0d (%s): got %h expected %h", pat[3:0], r, s, got, expv);
        end
      end
      // idle cycle: nothing may change
      before_v = vl;
      @(negedge clk);
      checks++;
      if (vl != before_v) begin failures++; $display("lines changed without load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
