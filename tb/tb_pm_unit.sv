// tb_pm_unit: after reset state 0 holds 0 and every other state 64; random
// metrics are loaded only when en is high.
module tb_pm_unit;
  logic clk = 0, rst_n = 0, en = 0;
  logic [63:0][8:0] pm_next = '0, pm, ref_pm;
  int checks = 0, failures = 0;
  pm_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    for (int s = 0; s < 64; s++) ref_pm[s] = (s == 0) ? 9'd0 : 9'd64;
    rst_n = 1;
    repeat (300) begin
      #1;
      checks++;
      if (pm !== ref_pm) begin
        failures++;
        if (failures < 5) $display("ERROR: pm[0]=%0d pm[1]=%0d exp %0d %0d", pm[0], pm[1], ref_pm[0], ref_pm[1]);
      end
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      for (int s = 0; s < 64; s++) pm_next[s] = 9'($urandom);
      @(posedge clk);
      if (en) ref_pm = pm_next;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
