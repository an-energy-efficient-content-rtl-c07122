// cam_pkg: shared constants of the pipelined hierarchical CAM.
//
// The array holds 1024 words of 144 bits. Each word's match-line is cut into
// five segments: a short 8-bit first segment that screens out almost every
// mismatching word, followed by four 34-bit segments. Search-lines are split
// into local blocks of 64 entries. These numbers are the defaults of the
// modules; the helper functions give the bit offset and width of a segment so
// that the top level can slice the search word for any segmentation.
package cam_pkg;

  localparam int unsigned CAM_ENTRIES     = 1024; // words in the array
  localparam int unsigned CAM_NSEG        = 5;    // match-line segments / pipeline stages
  localparam int unsigned CAM_FIRST_SEG_W = 8;    // bits in the first segment
  localparam int unsigned CAM_SEG_W       = 34;   // bits in each later segment
  localparam int unsigned CAM_BLOCK_ROWS  = 64;   // entries sharing one local search-line
  localparam int unsigned CAM_WIDTH       = CAM_FIRST_SEG_W + (CAM_NSEG - 1) * CAM_SEG_W; // 144

  // Width of segment k.
  function automatic int unsigned seg_width(int unsigned k, int unsigned first_w,
                                            int unsigned seg_w);
    return (k == 0) ? first_w : seg_w;
  endfunction

  // Lowest bit of segment k within the word (segment 0 holds the low bits).
  function automatic int unsigned seg_offset(int unsigned k, int unsigned first_w,
                                             int unsigned seg_w);
    return (k == 0) ? 0 : first_w + (k - 1) * seg_w;
  endfunction

endpackage
