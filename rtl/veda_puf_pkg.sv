// veda_puf_pkg: types, constants and helper functions shared by the Veda-PUF
// controlled PUF.
//
// - ghana_len(n) gives the length of the Ghanapatham expansion of an n-bit
//   stream: every 3-bit window (n-2 of them) is recited as 13 bits, and the
//   final two bits as a 6-bit Jata group, so 13*(n-2)+6 bits (n >= 2).
// - expanded_len(n, rounds) applies ghana_len() repeatedly. With a 128-bit
//   first response and two rounds it gives 128 -> 1644 -> 21352 bits
//   (about 2.6 KB), the "128 bits to 2.5 kilobytes" growth of the key.
// - mix32() is a 32-bit integer hash. The behavioural arbiter PUF model uses
//   it to derive fixed per-multiplexer delays from a device seed, standing in
//   for manufacturing variation; it is not part of any real circuit.
package veda_puf_pkg;

  // Width of a PUF challenge chunk and of a PUF response word.
  localparam int unsigned KEY_W = 128;

  // Number of Ghanapatham expansion rounds after the first response
  // (pre-processing R1 -> PC1, post-processing R2 -> final challenge).
  localparam int unsigned ROUNDS = 2;

  // Bits emitted per 3-bit window (Eqn. 1) and for the final pair (Eqn. 2).
  localparam int unsigned GHANA_GROUP = 13;
  localparam int unsigned JATA_GROUP  = 6;

  function automatic int unsigned ghana_len(input int unsigned n);
    if (n < 2) return n;
    return GHANA_GROUP * (n - 2) + JATA_GROUP;
  endfunction

  function automatic int unsigned expanded_len(input int unsigned n, input int unsigned rounds);
    int unsigned l;
    l = n;
    for (int unsigned r = 0; r < rounds; r++) l = ghana_len(l);
    return l;
  endfunction

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

endpackage
