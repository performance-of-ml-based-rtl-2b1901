// Shared constants of the autoencoder accelerator.
//
// Numbers are signed fixed point <W,I> in the integer-bits convention:
// W bits in all, I of them integer bits (sign included), F = W - I
// fractional bits. The default <19,10> is the precision the accelerator
// was built for: it stays just above the 18-bit port of a DSP slice,
// where DSP use does not yet double, and gave the smallest output error
// that the DSP budget allowed. The other constants here (stream word,
// configuration address width, layer count limit) are this design's own.
package baler_pkg;

  // Default fixed-point format <19,10>: 19 bits, 10 integer, 9 fractional.
  localparam int unsigned FX_W = 19;
  localparam int unsigned FX_I = 10;

  // Default reuse factor: every multiplier does this many products per vector.
  localparam int unsigned REUSE_DEFAULT = 22;

  // Width of one AXI-Stream word from the DMA; one fixed-point value per word.
  localparam int unsigned AXIS_W = 32;

  // Width of the word address on the weight/bias load port of a layer.
  localparam int unsigned CFG_AW = 16;
  // Width of the layer index on the load port (up to 8 layers).
  localparam int unsigned CFG_LW = 3;

  // Accumulator width for a layer with n_in inputs: a full-precision
  // W x W product is 2W bits, and a sum of n_in of them plus a bias needs
  // clog2(n_in)+1 bits more.
  function automatic int unsigned acc_width(int unsigned w, int unsigned n_in);
    return 2 * w + $clog2(n_in) + 1;
  endfunction

endpackage
