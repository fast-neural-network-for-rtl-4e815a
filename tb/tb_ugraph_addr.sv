// tb_ugraph_addr -- checks the U-transformation graph interconnect for
// N = 16 and N = 64 over every stage and PO: each stage's POs together
// used every data line exactly once; each PO stays inside one block of
// S = 2^(s+1) lines with two lines in each half; its lines pair mirror
// lines (k with L-k modulo L) of each half; the first stage joins
// consecutive groups of four. Also compares each line with the reference.
module tb_ugraph_addr;
  import tsu_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [3:0] st16, po16;
  logic [3:0] ln16 [4];
  logic [5:0] st64, po64;
  logic [5:0] ln64 [4];

  ugraph_addr #(.N(16)) dut16 (.stage(st16), .po(po16), .line(ln16));
  ugraph_addr #(.N(64)) dut64 (.stage(st64), .po(po64), .line(ln64));

  task automatic check_po(int nn, int s, int p, int l[4]);
    int S, L, b;
    S = 1 << (s + 1);
    L = S / 2;
    b = l[0] / S;
    for (int i = 0; i < 4; i++) begin
      check(l[i] / S == b, $sformatf("N=%0d s=%0d p=%0d line %0d leaves block", nn, s, p, i));
      check(l[i] == line_of(s, p, i), $sformatf("N=%0d s=%0d p=%0d line %0d = %0d", nn, s, p, i, l[i]));
    end
    // two lines in the lower half, two in the upper half
    check((l[0] % S) < L && (l[1] % S) < L && (l[2] % S) >= L && (l[3] % S) >= L,
          $sformatf("N=%0d s=%0d p=%0d halves", nn, s, p));
    // mirror pairing inside each half (mod L)
    check((((l[0] % S) + (l[1] % S)) % L == 0) || (l[1] % L) - (l[0] % L) == L / 2,
          $sformatf("N=%0d s=%0d p=%0d lower pair", nn, s, p));
    check((l[2] % L) == (l[0] % L) && (l[3] % L) == (l[1] % L),
          $sformatf("N=%0d s=%0d p=%0d upper pair matches lower", nn, s, p));
  endtask

  initial begin
    int used[];
    int l[4];
    // N = 16
    for (int s = 1; s <= 3; s++) begin
      used = new[16];
      foreach (used[i]) used[i] = 0;
      for (int p = 0; p < 4; p++) begin
        st16 = 4'(s); po16 = 4'(p);
        #1;
        for (int i = 0; i < 4; i++) begin
          l[i] = int'(ln16[i]);
          used[l[i]]++;
        end
        if (s == 1) check(l[0] == 4*p && l[1] == 4*p+1 && l[2] == 4*p+2 && l[3] == 4*p+3,
                          "first stage joins consecutive fours");
        check_po(16, s, p, l);
      end
      foreach (used[i]) check(used[i] == 1, $sformatf("N=16 s=%0d line %0d used %0d times", s, i, used[i]));
    end
    // N = 64
    for (int s = 1; s <= 5; s++) begin
      used = new[64];
      foreach (used[i]) used[i] = 0;
      for (int p = 0; p < 16; p++) begin
        st64 = 6'(s); po64 = 6'(p);
        #1;
        for (int i = 0; i < 4; i++) begin
          l[i] = int'(ln64[i]);
          used[l[i]]++;
        end
        check_po(64, s, p, l);
      end
      foreach (used[i]) check(used[i] == 1, $sformatf("N=64 s=%0d line %0d used %0d times", s, i, used[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
