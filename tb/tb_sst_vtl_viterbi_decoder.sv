// tb_sst_vtl_viterbi_decoder: end-to-end test of the decoder at its default
// size (64 states, 32 columns = 64 stages, 12 checked groups).
//
// The testbench draws random information bits, encodes them with its own
// model of the rate-1/3 code (generator taps listed below, independent of the
// RTL package), passes them through a channel and feeds the soft symbols to
// the decoder, two per clock, with random idle cycles.  Phases:
//   1. clean channel: output must equal the information bits, the hard decisions
//      of the SST output y must be all zero, latency must be COLS+1 clocks;
//   2. sparse errors (weak soft errors and isolated hard flips): exact output;
//   3. AWGN at Eb/N0 = 2 dB, 3-bit quantisation: bit errors are counted and
//      must stay below 2%; the truncation region must grow here;
//   4. clean again: exact output once the noisy pairs have left.
// Mechanisms counted (each must occur): idle input cycles, non-zero SST
// output, merged columns (shadow region with clock gating and direct shift),
// growth of the exchanged region, path-metric wrap-around.
module tb_sst_vtl_viterbi_decoder;
  import vd_pkg::sym_t;

  localparam int COLS = 32;
  localparam int LAT  = COLS + 1;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  sym_t [1:0] in_sym = '0;
  logic       out_valid;
  logic [1:0] out_bits;
  logic [4:0] merge_col, valid_col;

  sst_vtl_viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // ---- reference encoder (taps: A 0,2,3,5,6  B 0,1,2,4,6  C 0,1,2,3,6)
  int tapsA[5] = '{0, 2, 3, 5, 6};
  int tapsB[5] = '{0, 1, 2, 4, 6};
  int tapsC[5] = '{0, 1, 2, 3, 6};
  bit [6:0] enc_hist = '0;   // enc_hist[j] = u_{t-j} after insertion

  function automatic bit par(bit [6:0] h, int taps[5]);
    bit r = 0;
    foreach (taps[x]) r ^= h[taps[x]];
    return r;
  endfunction

  // ---- channel
  int   phase = 0;
  real  sigma;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic logic [2:0] quant(real x);
    int v;
    v = int'($floor(4.0 - 4.0 * x));
    if (v < 0) v = 0;
    if (v > 7) v = 7;
    return 3'(v);
  endfunction

  function automatic logic [2:0] chan(bit c);
    logic [2:0] v;
    case (phase)
      2: begin
        v = c ? 3'(7 - $urandom_range(0, 3)) : 3'($urandom_range(0, 3));
        if ($urandom_range(0, 99) == 0) v = ~v;           // isolated hard flip
      end
      3: v = quant((c ? -1.0 : 1.0) + sigma * gauss());
      default: v = c ? 3'(7 - $urandom_range(0, 1)) : 3'($urandom_range(0, 1));
    endcase
    return v;
  endfunction

  // ---- expected output queue
  typedef struct { bit [1:0] bits; int phase; int cyc; } exp_t;
  exp_t q[$];

  int n_idle = 0, n_ynz = 0, n_merge = 0, n_grow = 0, n_wrap = 0, n_out = 0;
  int n_err3 = 0, n_bits3 = 0, lat_bad = 0, y_bad = 0;
  int hard_since = 100;

  task automatic push_pair(input bit u0, input bit u1);
    sym_t [1:0] s;
    bit [1:0] u;
    u = {u1, u0};
    for (int k = 0; k < 2; k++) begin
      bit ca, cb, cc;
      enc_hist = {enc_hist[5:0], u[k]};
      ca = par(enc_hist, tapsA); cb = par(enc_hist, tapsB); cc = par(enc_hist, tapsC);
      s[k][2] = chan(ca); s[k][1] = chan(cb); s[k][0] = chan(cc);
    end
    in_sym   = s;
    in_valid = 1'b1;
    q.push_back('{bits: u, phase: phase, cyc: cyc});
  endtask

  // drive on negedge
  task automatic run_phase(input int ph, input int npairs, input int idle_pct);
    int sent = 0;
    phase = ph;
    while (sent < npairs) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < idle_pct) begin
        in_valid = 1'b0;
        n_idle++;
      end else begin
        bit u0, u1;
        u0 = ph == 4 && sent > npairs - 8 ? 1'b0 : 1'($urandom);
        u1 = ph == 4 && sent > npairs - 8 ? 1'b0 : 1'($urandom);
        push_pair(u0, u1);
        sent++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
  endtask

  // monitor on negedge (after the posedge updates)
  logic [8:0] pm0_prev = '0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.adv) begin
        if (dut.y != '0) n_ynz++;
        if (merge_col < 5'(COLS - 1)) n_merge++;
        if (merge_col == valid_col + 1) n_grow++;
      end
      if (pm0_prev[8] && !dut.pm[0][8]) n_wrap++;
      pm0_prev = dut.pm[0];
      if (dut.adv && phase == 1)
        for (int k = 0; k < 2; k++)
          for (int b = 0; b < 3; b++)
            if (dut.y[k][b][2]) y_bad++;
      if (out_valid) begin
        exp_t e;
        n_out++;
        if (q.size() == 0) begin
          failures++; $display("ERROR: output with empty queue");
        end else begin
          e = q.pop_front();
          if (n_out == 1) begin
            checks++;
            if (cyc - e.cyc != LAT) begin
              failures++; $display("ERROR: latency %0d, expected %0d", cyc - e.cyc, LAT);
            end
          end
          if (e.phase == 3) begin
            n_bits3 += 2;
            n_err3 += $countones(e.bits ^ out_bits);
          end else begin
            checks++;
            if (out_bits !== e.bits) begin
              failures++;
              if (failures < 10) $display("ERROR: phase %0d pair sent at %0d: got %b exp %b", e.phase, e.cyc, out_bits, e.bits);
            end
          end
        end
      end
    end
  end

  // latency check: continuous input, first output exactly LAT clocks later
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1a: continuous, measure latency of the first pair
    phase = 1;
    @(negedge clk);
    push_pair(1'b1, 1'b0);
    for (int j = 0; j < 60; j++) begin
      @(negedge clk);
      if (j < 50) push_pair(1'($urandom), 1'($urandom)); else in_valid = 1'b0;
    end
    run_phase(1, 400, 20);
    run_phase(2, 3000, 10);
    sigma = $sqrt(1.0 / (2.0 * (1.0/3.0) * $pow(10.0, 2.0/10.0)));
    run_phase(3, 3000, 5);
    run_phase(4, 600, 10);
    // drain
    repeat (200) @(negedge clk);
    checks++;
    if (q.size() > LAT) begin failures++; $display("ERROR: %0d pairs never came out", q.size()); end
    checks++; if (y_bad != 0) begin failures++; $display("ERROR: SST output non-zero on a clean channel %0d times", y_bad); end
    checks++;
    if (n_bits3 == 0 || n_err3 * 50 > n_bits3) begin
      failures++; $display("ERROR: AWGN phase BER %0d/%0d", n_err3, n_bits3);
    end
    $display("AWGN 2 dB: %0d errors in %0d bits", n_err3, n_bits3);
    $display("mechanisms: idle=%0d sst_nonzero=%0d merged=%0d grow=%0d pm_wrap=%0d outputs=%0d",
             n_idle, n_ynz, n_merge, n_grow, n_wrap, n_out);
    checks += 5;
    if (n_idle == 0)  begin failures++; $display("ERROR: no idle input cycle"); end
    if (n_ynz == 0)   begin failures++; $display("ERROR: SST output never non-zero"); end
    if (n_merge == 0) begin failures++; $display("ERROR: no merged column"); end
    if (n_grow == 0)  begin failures++; $display("ERROR: exchanged region never grew"); end
    if (n_wrap == 0)  begin failures++; $display("ERROR: path metric never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
