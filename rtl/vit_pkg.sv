// vit_pkg: constants and helper functions shared by the Viterbi decoder blocks.
//
// Trellis convention used throughout: a state holds the last K-1 input bits,
// the oldest in the MSB and the newest in the LSB. The state after input u is
// {S[K-3:0], u}, so the predecessor of state S with decision bit d is
// {d, S[K-2:1]}, which is the trace-back rule S(n-1) = {D, S(n) >> 1}. The
// input bit that led into a state is its LSB.
//
// Code generators are written the usual octal way: bit K-1 of a generator taps
// the current input, bit 0 the oldest one. The default code is the rate-1/2,
// K = 7 code with generators 133 and 171 (octal).
package vit_pkg;

  localparam int MAXK = 16;

  // One encoder output bit. w holds {previous state, current input}: w[0] is the
  // current input, w[i] the input i steps back. g taps them from its MSB down.
  function automatic logic conv_bit(input logic [MAXK-1:0] g,
                                    input logic [MAXK-1:0] w, input int k);
    logic acc;
    acc = 1'b0;
    for (int i = 0; i < k; i++) acc ^= g[k-1-i] & w[i];
    return acc;
  endfunction

  // The n code bits of a rate-1/2 branch, bit 0 from g0 and bit 1 from g1.
  function automatic logic [1:0] branch_code2(input logic [MAXK-1:0] g0,
                                              input logic [MAXK-1:0] g1,
                                              input logic [MAXK-1:0] w, input int k);
    return {conv_bit(g1, w, k), conv_bit(g0, w, k)};
  endfunction

  // Modulo (wrap-around) comparison of two path metrics: true when a < b.
  // Valid as long as all metrics stay within half the metric range.
  function automatic logic pm_less(input logic [15:0] a, input logic [15:0] b,
                                   input int w);
    logic [15:0] d;
    d = (a - b) & ((16'd1 << w) - 16'd1);
    return d[w-1];
  endfunction

endpackage
