// scn_cam_pkg: constants and helper functions shared by the SCN-CAM blocks.
//
// The default geometry is the 16-entry by 8-bit binary CAM of the design:
// 16 match lines (ML0..ML15) and 8 search-line pairs. The preset contents are
// the 16x8 table of the design, in which entry i holds its own 4-bit index in
// the upper half and the bitwise complement of that index in the lower half,
// e.g. entry 12 holds 1100_0011. preset_word() generates that table for any
// geometry where WIDTH = 2*log2(ENTRIES); for other geometries it returns the
// entry index zero-extended (a choice of this implementation, used only to give
// the smaller test configurations defined contents).
package scn_cam_pkg;

  // Default geometry (from the design's 16x8 array).
  localparam int unsigned CAM_ENTRIES = 16;
  localparam int unsigned CAM_WIDTH   = 8;

  // Classifier defaults (this implementation's choice): a 3-bit reduced tag
  // cut into clusters of 1 bit each, and 4 compare-enabled sub-blocks.
  localparam int unsigned CAM_Q       = 3;
  localparam int unsigned CAM_KAPPA   = 1;
  localparam int unsigned CAM_NSB     = 4;

  // Contents of entry idx after reset, for an array of the given geometry.
  function automatic logic [63:0] preset_word(int unsigned idx, int unsigned entries,
                                              int unsigned width);
    int unsigned aw;
    logic [63:0] w;
    aw = 1;
    while ((1 << aw) < entries) aw++;
    w  = '0;
    if (width == 2 * aw) begin
      for (int unsigned b = 0; b < aw; b++) begin
        w[aw + b] = idx[b];
        w[b]      = ~idx[b];
      end
    end else begin
      w[31:0] = idx;
    end
    return w;
  endfunction

endpackage
