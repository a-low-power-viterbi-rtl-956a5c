// tb_re_encoder: checks the two-bit-per-clock re-encoder against a bit-serial
// reference encoder built from the generator taps (A: 0,2,3,5,6;
// B: 0,1,2,4,6; C: 0,1,2,3,6), with random inputs and random enable gaps.
module tb_re_encoder;
  import vd_pkg::cw_t;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] u = '0;
  cw_t [1:0] c;
  int checks = 0, failures = 0;
  re_encoder dut (.*);
  always #5 clk = ~clk;

  int tA[5] = '{0,2,3,5,6}, tB[5] = '{0,1,2,4,6}, tC[5] = '{0,1,2,3,6};
  bit [6:0] h = '0;
  function automatic bit par(bit [6:0] x, int t[5]);
    bit r = 0; foreach (t[i]) r ^= x[t[i]]; return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (600) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      u  = 2'($urandom);
      #1;
      begin
        bit [6:0] hh;
        hh = h;
        for (int k = 0; k < 2; k++) begin
          cw_t e;
          hh = {hh[5:0], u[k]};
          e = {par(hh, tA), par(hh, tB), par(hh, tC)};
          checks++;
          if (c[k] !== e) begin
            failures++;
            if (failures < 5) $display("ERROR: step %0d got %b exp %b", k, c[k], e);
          end
        end
        if (en) h = hh;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
