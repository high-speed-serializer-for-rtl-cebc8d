// serializer_pkg: constants and helpers shared by the 19-channel 16:1
// serializer.
//
// The serializer turns 19 parallel 16-bit words, delivered at 4 Gbit/s per
// bit, into 19 serial streams at 64 Gbit/s. Nineteen channels follow from an
// 8-bit DAC segmented into four unary bits (15 thermometer lines) and four
// binary bits. Every channel is a binary tree of four levels of 2:1 stages,
// and the tree is clocked by four clocks, 32, 16, 8 and 4 GHz, produced by a
// divide-by-two chain from the 32 GHz input clock.
//
// Level numbering used throughout: level 0 is the root stage of the tree,
// which runs on the fastest clock (clk[0] = 32 GHz); level MUX_LEVELS-1 holds
// the leaf stages on the slowest clock (clk[3] = 4 GHz).
package serializer_pkg;

  timeunit 1ps; timeprecision 1fs;

  // Channel count: 2^4 - 1 unary lines plus 4 binary lines.
  localparam int unsigned N_UNARY_BITS  = 4;
  localparam int unsigned N_BINARY_BITS = 4;
  localparam int unsigned N_CHANNELS    = (1 << N_UNARY_BITS) - 1 + N_BINARY_BITS; // 19

  // Tree depth of one channel: 4 levels of 2:1 stages give 16:1.
  localparam int unsigned MUX_LEVELS = 4;

  // Output unit intervals from the rising edge of the slowest clock that
  // captures a word to the start of that word's first serial bit. Each level
  // l (period T_l) adds 3/4 of T_l between its own capture edge and the next
  // level's capture edge; the root adds half a period of the fastest clock.
  // For four levels this is 22 unit intervals (343.75 ps at 64 Gbit/s).
  function automatic int unsigned first_bit_latency_ui(int unsigned levels);
    int unsigned ui;
    ui = 1;                                   // root: T_0 / 2 = 1 UI
    for (int unsigned l = 1; l < levels; l++)
      ui += 3 * (1 << (l + 1)) / 4;           // 3/4 * T_l, T_l = 2^(l+1) UI
    return ui;
  endfunction

  // Bit reversal of a tree path. The root stage emits its D0 input first, so
  // the serial position of a leaf input is its tree path read from the root
  // downwards: the leaf wiring reverses the bits of the input index.
  function automatic int unsigned bit_reverse(int unsigned value, int unsigned width);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < width; i++)
      if (((value >> i) & 1) != 0) r |= 1 << (width - 1 - i);
    return r;
  endfunction

endpackage
