// mip_pkg: shared sizes of the multifunctional image processor.
//
// The sorting node works on ten channels: the nine pixels of a 3x3 window and
// one auxiliary channel held at the lowest level, so that rank 9 is always 0
// and the rank differences telescope to the reference level D.  Pixels are
// 8-bit (255 is the top of the range, as in the design's examples).  Control
// weights are signed fixed point with two fractional bits, which holds every
// weight used in the examples (0.25, 0.5, -1, integers up to 9).
package mip_pkg;
  parameter int unsigned PIX_W    = 8;   // pixel width
  parameter int unsigned N_CH     = 10;  // sorting channels (9 window + 1 aux)
  parameter int unsigned WIN_N    = 9;   // pixels of a 3x3 window
  parameter int unsigned IMG_W    = 64;  // image width
  parameter int unsigned IMG_H    = 64;  // image height
  parameter int unsigned WGT_W    = 8;   // weight width, signed
  parameter int unsigned WGT_FRAC = 2;   // fractional bits of a weight

  // accumulator width of a weighted sum over N channels of IN_W-bit signed inputs
  function automatic int unsigned acc_width(int unsigned in_w, int unsigned wgt_w,
                                            int unsigned n);
    return in_w + wgt_w + $clog2(n);
  endfunction
endpackage
