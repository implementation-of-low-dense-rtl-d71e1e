// dct_pkg: types shared by the reconfigurable approximate DCT engines.
//
// dct_size_e selects the transform length of the 32/16/8-point engine.
// With DCT_32 the engine computes one 32-point transform, with DCT_16 two
// independent 16-point transforms and with DCT_8 four independent 8-point
// transforms. The encoding is this design's own choice; the value 2'd3 is
// not a legal size and the engine treats it like DCT_16.
package dct_pkg;

  typedef enum logic [1:0] {
    DCT_8  = 2'd0,
    DCT_16 = 2'd1,
    DCT_32 = 2'd2
  } dct_size_e;

endpackage : dct_pkg
