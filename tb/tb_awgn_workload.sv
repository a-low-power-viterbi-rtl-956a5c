// tb_awgn_workload: bit-error rate and survivor-memory activity of the decoder
// over an AWGN channel with BPSK and 3-bit soft decisions, at Eb/N0 = 2, 3, 4,
// 5 and 6 dB, 100000 information pairs per point, continuous input.
//
// Four decoders see the same symbols: the default one, which checks the first
// 12 groups (48 states) for path merging, and ones that check 4, 8 and all
// 16 groups (16, 32 and 64 states); the errors of all four are reported.
// Reported per point: bit errors of both, the average merged column (the
// effective truncation length is 2*(merged column + 1) stages), the share of
// survivor-memory columns of rows 1..63 left idle by clock gating, and the
// share of hard decisions that are 1 at the decoder input with and without
// the SST transformation.
// A software conventional decoder (register exchange on the received symbols,
// 64 stages, output from state 0, no SST, no variable truncation) decodes the
// same symbols for comparison.
// Checks: the proposed decoder has at most 10% + 3 more errors than the
// conventional one at every point; the 12-group decoder has at most 3 more errors than the 16-group
// one at every point; its BER stays below 1e-3 from 4 dB on; the effective
// truncation length does not grow as Eb/N0 rises; at 6 dB more than half of
// the survivor-memory columns are idle; at 5 and 6 dB SST lowers the share
// of 1s (below that the pre-decoder, which combines 13 hard decisions, is
// itself too often wrong for the transformed input to be sparser).
module tb_awgn_workload;
  import vd_pkg::sym_t;

  localparam int COLS   = 32;
  localparam int NPAIRS = 100000;
  localparam int NPTS   = 5;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  sym_t [1:0] in_sym = '0;
  logic       ov12, ov16;
  logic [1:0] ob12, ob16;
  logic [4:0] mc12, mc16, vc12, vc16;

  sst_vtl_viterbi_decoder dut12 (.clk, .rst_n, .in_valid, .in_sym, .out_valid(ov12),
    .out_bits(ob12), .merge_col(mc12), .valid_col(vc12));
  logic       ov4, ov8;
  logic [1:0] ob4, ob8;
  logic [4:0] mc4, mc8, vc4, vc8;
  sst_vtl_viterbi_decoder #(.CHECK_GROUPS(4)) dut4 (.clk, .rst_n, .in_valid, .in_sym,
    .out_valid(ov4), .out_bits(ob4), .merge_col(mc4), .valid_col(vc4));
  sst_vtl_viterbi_decoder #(.CHECK_GROUPS(8)) dut8 (.clk, .rst_n, .in_valid, .in_sym,
    .out_valid(ov8), .out_bits(ob8), .merge_col(mc8), .valid_col(vc8));
  sst_vtl_viterbi_decoder #(.CHECK_GROUPS(16)) dut16 (.clk, .rst_n, .in_valid, .in_sym,
    .out_valid(ov16), .out_bits(ob16), .merge_col(mc16), .valid_col(vc16));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  int tapsA[5] = '{0, 2, 3, 5, 6};
  int tapsB[5] = '{0, 1, 2, 4, 6};
  int tapsC[5] = '{0, 1, 2, 3, 6};
  bit [6:0] enc_hist = '0;

  function automatic bit par(bit [6:0] h, int taps[5]);
    bit r = 0;
    foreach (taps[x]) r ^= h[taps[x]];
    return r;
  endfunction

  real sigma;
  int  pt = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // uniform quantiser, 8 levels of width 0.5 over [-2, +2]; code bit 0 -> +1
  function automatic logic [2:0] quant(real x);
    int v;
    v = int'($floor(4.0 - 2.0 * x));
    if (v < 0) v = 0;
    if (v > 7) v = 7;
    return 3'(v);
  endfunction

  // ---- conventional reference: register exchange on r, 64 stages, state 0
  int          rpm[64], npm[64];
  longint unsigned rpath[64], npath[64];
  int          ref_stage = 0;
  bit          info[$];
  int          info_pt[$];
  int          errc[NPTS];

  function automatic bit [2:0] ref_cw(int p, bit u);
    bit [6:0] x;
    x[0] = u;
    for (int j = 1; j <= 6; j++) x[j] = p[6 - j];
    return {par(x, tapsA), par(x, tapsB), par(x, tapsC)};
  endfunction

  task automatic ref_stage_step(input logic [2:0] a, input logic [2:0] b, input logic [2:0] c);
    int bmv[8];
    int mn;
    for (int cw = 0; cw < 8; cw++)
      bmv[cw] = (cw[2] ? 7 - int'(a) : int'(a)) + (cw[1] ? 7 - int'(b) : int'(b)) +
                (cw[0] ? 7 - int'(c) : int'(c));
    mn = 1 << 30;
    for (int st = 0; st < 64; st++) begin
      int p0, p1, m0, m1;
      bit u;
      u  = st[5];
      p0 = (st * 2) % 64; p1 = p0 + 1;
      m0 = rpm[p0] + bmv[ref_cw(p0, u)];
      m1 = rpm[p1] + bmv[ref_cw(p1, u)];
      if (m1 < m0) begin npm[st] = m1; npath[st] = {rpath[p1][62:0], u}; end
      else         begin npm[st] = m0; npath[st] = {rpath[p0][62:0], u}; end
      if (npm[st] < mn) mn = npm[st];
    end
    for (int st = 0; st < 64; st++) begin rpm[st] = npm[st] - mn; rpath[st] = npath[st]; end
    if (ref_stage >= 63) begin
      int idx;
      idx = ref_stage - 63;
      if (info_pt[idx] >= 0) errc[info_pt[idx]] += int'(rpath[0][63] ^ info[idx]);
    end
    ref_stage++;
  endtask

  typedef struct { bit [1:0] bits; int pt; } exp_t;
  exp_t q[$];

  int err4[NPTS], err8[NPTS], err12[NPTS], err16[NPTS], nbits[NPTS];
  longint mc_sum[NPTS], idle_sum[NPTS], adv_n[NPTS];
  int r_ones[NPTS], y_ones[NPTS], sym_n[NPTS];

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut12.adv) begin
        adv_n[pt]    += 1;
        mc_sum[pt]   += longint'(mc12);
        idle_sum[pt] += longint'(COLS - 1 - int'(mc12));
        for (int k = 0; k < 2; k++)
          for (int b = 0; b < 3; b++) begin
            y_ones[pt] += int'(dut12.y[k][b][2]);
            sym_n[pt]  += 1;
          end
      end
      if (ov12 !== ov16 || ov12 !== ov4 || ov12 !== ov8) begin
        failures++; $display("ERROR: the two decoders disagree on out_valid");
      end
      if (ov12) begin
        exp_t e;
        e = q.pop_front();
        if (e.pt >= 0) begin
          nbits[e.pt] += 2;
          err12[e.pt] += $countones(e.bits ^ ob12);
          err16[e.pt] += $countones(e.bits ^ ob16);
          err4[e.pt]  += $countones(e.bits ^ ob4);
          err8[e.pt]  += $countones(e.bits ^ ob8);
        end
      end
    end
  end

  initial begin
    real ebn0;
    for (int st = 0; st < 64; st++) begin rpm[st] = (st == 0) ? 0 : 1000; rpath[st] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPTS; p++) begin
      ebn0  = 2.0 + real'(p);
      sigma = $sqrt(1.0 / (2.0 * (1.0 / 3.0) * $pow(10.0, ebn0 / 10.0)));
      pt    = p;
      for (int n = 0; n < NPAIRS; n++) begin
        sym_t [1:0] s;
        bit [1:0] u;
        @(negedge clk);
        u = 2'($urandom);
        for (int k = 0; k < 2; k++) begin
          bit [2:0] c;
          enc_hist = {enc_hist[5:0], u[k]};
          c = {par(enc_hist, tapsA), par(enc_hist, tapsB), par(enc_hist, tapsC)};
          for (int b = 0; b < 3; b++) begin
            s[k][b] = quant((c[b] ? -1.0 : 1.0) + sigma * gauss());
            r_ones[p] += int'(s[k][b][2]);
          end
          info.push_back(u[k]); info_pt.push_back(p);
          ref_stage_step(s[k][2], s[k][1], s[k][0]);
        end
        in_sym   = s;
        in_valid = 1'b1;
        q.push_back('{bits: u, pt: p});
      end
    end
    // flush: zero information bits, encoded and sent without noise (not scored)
    for (int n = 0; n < 2 * COLS; n++) begin
      sym_t [1:0] s;
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        bit [2:0] c;
        enc_hist = {enc_hist[5:0], 1'b0};
        c = {par(enc_hist, tapsA), par(enc_hist, tapsB), par(enc_hist, tapsC)};
        for (int b = 0; b < 3; b++) s[k][b] = c[b] ? 3'd7 : 3'd0;
        info.push_back(1'b0); info_pt.push_back(-1);
        ref_stage_step(s[k][2], s[k][1], s[k][0]);
      end
      in_sym   = s;
      in_valid = 1'b1;
      q.push_back('{bits: 2'b00, pt: -1});
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (COLS + 4) @(negedge clk);

    for (int p = 0; p < NPTS; p++) begin
      real avg_mc, idle_frac, ber12;
      avg_mc    = real'(mc_sum[p]) / real'(adv_n[p]);
      idle_frac = real'(idle_sum[p]) / (real'(adv_n[p]) * real'(COLS - 1));
      ber12     = real'(err12[p]) / real'(nbits[p]);
      $display("Eb/N0 %0d dB: conventional decoder errors %0d, 4 groups %0d, 8 groups %0d", 2 + p, errc[p], err4[p], err8[p]);
      checks++;
      if (err12[p] > errc[p] + errc[p] / 10 + 3) begin
        failures++; $display("ERROR: proposed decoder loses to the conventional one at %0d dB", 2 + p);
      end
      $display("Eb/N0 %0d dB: bits %0d errors(12 groups) %0d errors(16 groups) %0d BER %e avg truncation %0.1f stages idle columns %0.1f%% ones r %0.1f%% y %0.1f%%",
               2 + p, nbits[p], err12[p], err16[p], ber12, 2.0 * (avg_mc + 1.0), 100.0 * idle_frac,
               100.0 * real'(r_ones[p]) / real'(sym_n[p]), 100.0 * real'(y_ones[p]) / real'(sym_n[p]));
      checks++;
      if (err12[p] > err16[p] + 3) begin
        failures++; $display("ERROR: 48-state check loses to 64-state check at %0d dB", 2 + p);
      end
      checks++;
      if (p >= 2 && ber12 > 1.0e-3) begin
        failures++; $display("ERROR: BER too high at %0d dB", 2 + p);
      end
      checks++;
      if (p > 0 && mc_sum[p] * adv_n[p-1] > mc_sum[p-1] * adv_n[p] + adv_n[p] * adv_n[p-1] / 4) begin
        failures++; $display("ERROR: truncation length grew with Eb/N0 at %0d dB", 2 + p);
      end
      checks++;
      if (p >= 3 && y_ones[p] >= r_ones[p]) begin
        failures++; $display("ERROR: SST did not reduce the share of ones at %0d dB", 2 + p);
      end
    end
    checks++;
    if (idle_sum[NPTS-1] * 2 <= adv_n[NPTS-1] * (COLS - 1)) begin
      failures++; $display("ERROR: less than half of the survivor memory idle at 6 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * NPAIRS + 1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
