// tb_pre_decoder: (1) error-free code words of random information bits must
// be pre-decoded back to the information bits with no delay; (2) arbitrary
// hard-decision streams must give the GF(2) convolution with the inverse
// polynomials S_A (taps 1,2,3,4), S_B (1,2,3,4,5), S_C (0,1,2,5).
module tb_pre_decoder;
  import vd_pkg::cw_t;
  logic clk = 0, rst_n = 0, en = 0;
  cw_t [1:0] h = '0;
  logic [1:0] i;
  int checks = 0, failures = 0;
  pre_decoder dut (.*);
  always #5 clk = ~clk;

  int tA[5] = '{0,2,3,5,6}, tB[5] = '{0,1,2,4,6}, tC[5] = '{0,1,2,3,6};
  int sA[4] = '{1,2,3,4}, sB[5] = '{1,2,3,4,5}, sC[4] = '{0,1,2,5};
  function automatic bit par5(bit [6:0] x, int t[5]);
    bit r = 0; foreach (t[k]) r ^= x[t[k]]; return r;
  endfunction
  function automatic bit par4(bit [6:0] x, int t[4]);
    bit r = 0; foreach (t[k]) r ^= x[t[k]]; return r;
  endfunction

  bit [6:0] eh = '0, ha = '0, hb = '0, hc = '0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      bit [1:0] u;
      bit [6:0] e2, a2, b2, c2;
      logic [1:0] ei;
      @(negedge clk);
      en = 1'($urandom_range(0, 4) != 0);
      u = 2'($urandom);
      e2 = eh; a2 = ha; b2 = hb; c2 = hc;
      for (int k = 0; k < 2; k++) begin
        if (n < 400) begin
          e2 = {e2[5:0], u[k]};
          h[k] = {par5(e2, tA), par5(e2, tB), par5(e2, tC)};
        end else begin
          h[k] = 3'($urandom);
        end
        a2 = {a2[5:0], h[k][2]}; b2 = {b2[5:0], h[k][1]}; c2 = {c2[5:0], h[k][0]};
        ei[k] = par4(a2, sA) ^ par5(b2, sB) ^ par4(c2, sC);
      end
      #1;
      checks++;
      if (i !== ei || (n < 400 && i !== u)) begin
        failures++;
        if (failures < 5) $display("ERROR: n=%0d got %b exp %b (u %b)", n, i, ei, u);
      end
      if (en) begin eh = e2; ha = a2; hb = b2; hc = c2; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
