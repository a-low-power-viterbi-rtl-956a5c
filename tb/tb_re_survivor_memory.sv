// tb_re_survivor_memory: random decisions, gate and select vectors (phases
// with all-ones gate and all-zero select, i.e. plain register exchange, and
// phases with random ones) and random enable.  A reference array is updated
// with the register-exchange rule: column 0 of row s gets {s[5], s[4]};
// column k gets column k-1 of q = {p[4:0], d1[p]}, p = {s[4:0], d2[s]}; rows
// 1..63 only where gate[k]; row 0 from itself where sel[k].  The whole
// memory and the output pair are compared every clock.
module tb_re_survivor_memory;
  localparam int COLS = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [63:0] d1 = '0, d2 = '0;
  logic [COLS-1:0] gate = '1, sel = '0;
  logic [63:0][COLS-1:0][1:0] mem;
  logic [1:0] dec;
  int checks = 0, failures = 0;
  re_survivor_memory dut (.*);
  always #5 clk = ~clk;

  logic [1:0] rm [64][COLS];
  logic [1:0] nm [64][COLS];

  initial begin
    for (int s = 0; s < 64; s++) for (int k = 0; k < COLS; k++) rm[s][k] = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      checks++;
      begin
        bit bad;
        bad = (dec !== rm[0][COLS-1]);
        for (int s = 0; s < 64; s++) for (int k = 0; k < COLS; k++)
          if (mem[s][k] !== rm[s][k]) bad = 1;
        if (bad) begin
          failures++;
          if (failures < 5) $display("ERROR: memory mismatch at step %0d", n);
        end
      end
      en = 1'($urandom_range(0, 4) != 0);
      d1 = {$urandom, $urandom}; d2 = {$urandom, $urandom};
      if ((n / 200) % 2 == 0) begin
        gate = '1; sel = '0;
      end else begin
        int pnt;
        pnt = $urandom_range(3, COLS - 1);
        for (int k = 0; k < COLS; k++) begin gate[k] = (k <= pnt); sel[k] = (k > pnt); end
        if (n % 7 == 0) begin gate = COLS'({$urandom}); sel = COLS'({$urandom}); end
      end
      if (en) begin
        for (int s = 0; s < 64; s++) begin
          int p, q;
          p = ((s * 2) % 64) + int'(d2[s]);
          q = ((p * 2) % 64) + int'(d1[p]);
          nm[s][0] = {s[5], s[4]};
          for (int k = 1; k < COLS; k++) begin
            if (s == 0) nm[s][k] = sel[k] ? rm[0][k-1] : rm[q][k-1];
            else        nm[s][k] = gate[k] ? rm[q][k-1] : rm[s][k];
          end
        end
        rm = nm;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
