// tb_acs_r2x2: random path metrics (a random base plus a spread of up to 120,
// wrapping modulo 512) and random branch metrics 0..21.  A reference works in
// plain integers: for every state it finds the best of the two first-stage
// candidates of each intermediate state, then the best of the two second-
// stage candidates (ties keep predecessor 0), using branch code words from
// its own encoder taps.  New metrics (mod 512) and both decision vectors
// must match.
module tb_acs_r2x2;
  logic [63:0][8:0] pm, pm_next;
  logic [1:0][7:0][5:0] bm;
  logic [63:0] d1, d2;
  int checks = 0, failures = 0;
  acs_r2x2 dut (.*);

  int tA[5] = '{0,2,3,5,6}, tB[5] = '{0,1,2,4,6}, tC[5] = '{0,1,2,3,6};
  function automatic bit par(bit [6:0] x, int t[5]);
    bit q = 0; foreach (t[k]) q ^= x[t[k]]; return q;
  endfunction
  // code word on the branch from state p (p[5] newest input) on input u
  function automatic int cw(int p, bit u);
    bit [6:0] x;
    x[0] = u;
    for (int j = 1; j <= 6; j++) x[j] = p[6 - j];
    return {29'd0, par(x, tA), par(x, tB), par(x, tC)};
  endfunction

  int ipm[64], mid[64], fin[64];
  bit ed1[64], ed2[64];

  initial begin
    for (int n = 0; n < 400; n++) begin
      int base;
      base = $urandom_range(0, 100000);
      for (int s = 0; s < 64; s++) begin
        ipm[s] = base + $urandom_range(0, 120);
        pm[s] = 9'(ipm[s]);
      end
      for (int k = 0; k < 2; k++) for (int c = 0; c < 8; c++) bm[k][c] = 6'($urandom_range(0, 21));
      if (n % 4 == 0) for (int c = 0; c < 8; c++) bm[0][c] = 6'd6;  // force ties
      for (int s = 0; s < 64; s++) begin
        int p0, p1, a, b;
        p0 = (s * 2) % 64; p1 = p0 + 1;
        a = ipm[p0] + int'(bm[0][cw(p0, s[5])]);
        b = ipm[p1] + int'(bm[0][cw(p1, s[5])]);
        ed1[s] = b < a;
        mid[s] = (b < a) ? b : a;
      end
      for (int s = 0; s < 64; s++) begin
        int p0, p1, a, b;
        p0 = (s * 2) % 64; p1 = p0 + 1;
        a = mid[p0] + int'(bm[1][cw(p0, s[5])]);
        b = mid[p1] + int'(bm[1][cw(p1, s[5])]);
        ed2[s] = b < a;
        fin[s] = (b < a) ? b : a;
      end
      #1;
      for (int s = 0; s < 64; s++) begin
        checks++;
        if (pm_next[s] !== 9'(fin[s]) || d1[s] !== ed1[s] || d2[s] !== ed2[s]) begin
          failures++;
          if (failures < 5) $display("ERROR: s=%0d pm %0d exp %0d d1 %b/%b d2 %b/%b", s,
                                     pm_next[s], fin[s] % 512, d1[s], ed1[s], d2[s], ed2[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end
endmodule
