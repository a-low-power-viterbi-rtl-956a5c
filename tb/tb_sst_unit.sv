// tb_sst_unit: random information bits are encoded by a reference encoder,
// given random soft values and random hard errors, and fed with random idle
// cycles.  One clock later y must equal r with every soft value inverted
// whose re-encoded bit is 1, where the re-encoded bits come from a reference
// pre-decoder (inverse taps A: 1,2,3,4; B: 1,2,3,4,5; C: 0,1,2,5) and a
// reference encoder; i must equal the reference pre-decoded bits.  On
// error-free stretches the hard decisions of y must all be 0.
module tb_sst_unit;
  import vd_pkg::sym_t;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sym_t [1:0] r = '0, y;
  logic y_valid;
  logic [1:0] i;
  int checks = 0, failures = 0;
  sst_unit dut (.*);
  always #5 clk = ~clk;

  int tA[5] = '{0,2,3,5,6}, tB[5] = '{0,1,2,4,6}, tC[5] = '{0,1,2,3,6};
  int sA[4] = '{1,2,3,4}, sB[5] = '{1,2,3,4,5}, sC[4] = '{0,1,2,5};
  function automatic bit par5(bit [6:0] x, int t[5]);
    bit q = 0; foreach (t[k]) q ^= x[t[k]]; return q;
  endfunction
  function automatic bit par4(bit [6:0] x, int t[4]);
    bit q = 0; foreach (t[k]) q ^= x[t[k]]; return q;
  endfunction

  bit [6:0] tx = '0, ha = '0, hb = '0, hc = '0, rx = '0;
  sym_t [1:0] ey;
  logic [1:0] ei;
  logic       ev = 0;
  int         n_clean_nz = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      bit noisy;
      bit [6:0] s_tx, s_ha, s_hb, s_hc, s_rx;
      @(negedge clk);
      s_tx = tx; s_ha = ha; s_hb = hb; s_hc = hc; s_rx = rx;
      // check the previous cycle's registered result
      checks++;
      if (y_valid !== ev || (ev && (y !== ey || i !== ei))) begin
        failures++;
        if (failures < 5) $display("ERROR: n=%0d y %h exp %h, i %b exp %b, v %b exp %b", n, y, ey, i, ei, y_valid, ev);
      end
      in_valid = 1'($urandom_range(0, 4) != 0);
      noisy = (n % 300) >= 150;
      ev = in_valid;
      for (int k = 0; k < 2; k++) begin
        bit u, a, b, c, ip, za, zb, zc;
        u = 1'($urandom);
        tx = {tx[5:0], u};
        a = par5(tx, tA); b = par5(tx, tB); c = par5(tx, tC);
        r[k][2] = a ? 3'(7 - $urandom_range(0, 3)) : 3'($urandom_range(0, 3));
        r[k][1] = b ? 3'(7 - $urandom_range(0, 3)) : 3'($urandom_range(0, 3));
        r[k][0] = c ? 3'(7 - $urandom_range(0, 3)) : 3'($urandom_range(0, 3));
        if (noisy && $urandom_range(0, 9) == 0) r[k][$urandom_range(0, 2)] ^= 3'b111;
        ha = {ha[5:0], r[k][2][2]}; hb = {hb[5:0], r[k][1][2]}; hc = {hc[5:0], r[k][0][2]};
        ip = par4(ha, sA) ^ par5(hb, sB) ^ par4(hc, sC);
        rx = {rx[5:0], ip};
        za = par5(rx, tA); zb = par5(rx, tB); zc = par5(rx, tC);
        ey[k][2] = r[k][2] ^ {3{za}}; ey[k][1] = r[k][1] ^ {3{zb}}; ey[k][0] = r[k][0] ^ {3{zc}};
        ei[k] = ip;
        if (!noisy && in_valid && (n % 300) >= 10 && (ey[k][2][2] | ey[k][1][2] | ey[k][0][2])) n_clean_nz++;
      end
      // symbols offered on an idle cycle are not taken: restore the histories
      if (!in_valid) begin
        tx = s_tx; ha = s_ha; hb = s_hb; hc = s_hc; rx = s_rx;
      end
    end
    checks++;
    if (n_clean_nz != 0) begin failures++; $display("ERROR: SST output not zero on clean input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
