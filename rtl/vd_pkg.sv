// vd_pkg: constants, types and trellis helper functions shared by the
// low-power Viterbi decoder.
//
// The code is the rate-1/3, memory-6 (64-state) convolutional code of the
// MB-OFDM UWB system, generator polynomials
//   G_A = 1 + D^2 + D^3 + D^5 + D^6
//   G_B = 1 + D + D^2 + D^4 + D^6
//   G_C = 1 + D + D^2 + D^3 + D^6
// and its right inverse used by the scarce-state-transition pre-decoder,
//   S_A = D + D^2 + D^3 + D^4
//   S_B = D + D^2 + D^3 + D^4 + D^5
//   S_C = 1 + D + D^2 + D^5,   with G_A*S_A + G_B*S_B + G_C*S_C = 1 (mod 2).
// Polynomials are stored with bit j holding the coefficient of D^j.
//
// Trellis numbering: the newest information bit is the state MSB, so a
// transition from state p on input u leads to state {u, p[5:1]} and the two
// predecessors of state s are {s[4:0],0} and {s[4:0],1}.  Soft values are
// 3-bit: 0 is a confident code bit 0, 7 a confident code bit 1, and the hard
// decision is the MSB.  Two trellis stages are processed per clock (radix-2x2).
package vd_pkg;

  localparam int unsigned M       = 6;            // encoder memory
  localparam int unsigned NSTATES = 1 << M;       // 64 trellis states
  localparam int unsigned NOUT    = 3;            // code bits per information bit
  localparam int unsigned SOFT_W  = 3;            // 8-level soft decision
  localparam int unsigned STEPS   = 2;            // trellis stages per clock

  localparam logic [M:0] G_A = 7'b1101101;        // 1+D^2+D^3+D^5+D^6
  localparam logic [M:0] G_B = 7'b1010111;        // 1+D+D^2+D^4+D^6
  localparam logic [M:0] G_C = 7'b1001111;        // 1+D+D^2+D^3+D^6

  localparam logic [M:0] S_A = 7'b0011110;        // D+D^2+D^3+D^4
  localparam logic [M:0] S_B = 7'b0111110;        // D+D^2+D^3+D^4+D^5
  localparam logic [M:0] S_C = 7'b0100111;        // 1+D+D^2+D^5

  typedef logic [SOFT_W-1:0] soft_t;
  // One received symbol: the soft values of code bits A, B and C.
  typedef soft_t [NOUT-1:0]  sym_t;               // [2]=A, [1]=B, [0]=C
  typedef logic  [NOUT-1:0]  cw_t;                // code word {A,B,C}
  typedef logic  [M-1:0]     state_t;

  // Code word produced when the encoder, holding past inputs hist
  // (hist[j-1] = u_{t-j}), receives input u.
  function automatic cw_t encode_step(input logic u, input logic [M-1:0] hist);
    logic [M:0] taps;
    taps = {hist, u};                             // taps[j] = u_{t-j}
    return {^(taps & G_A), ^(taps & G_B), ^(taps & G_C)};
  endfunction

  // The encoder's past inputs for trellis state s: hist[j-1] = u_{t-j} = s[M-j].
  function automatic logic [M-1:0] state_hist(input state_t s);
    logic [M-1:0] h;
    for (int j = 0; j < M; j++) h[j] = s[M-1-j];
    return h;
  endfunction

  // Code word on the branch from state p to state {u, p[5:1]}.
  function automatic cw_t branch_cw(input state_t p, input logic u);
    return encode_step(u, state_hist(p));
  endfunction


endpackage
