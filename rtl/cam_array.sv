// cam_array: the ENTRIES x WIDTH binary CAM array, split into NSB sub-blocks.
//
// The array is NSB cam_subblock instances of ENTRIES/NSB consecutive words
// each: sub-block s holds entries s*ENTRIES/NSB .. (s+1)*ENTRIES/NSB-1. All
// sub-blocks share the differential search lines; each is compare-enabled by
// its own bit of `sb_en`, so a search only evaluates the enabled sub-blocks.
// A write decodes `wr_addr` into a one-hot word enable.
//
// Interface: wr_en/wr_addr/wr_data write one word; sl/sl_n/sb_en search; `ml`
// holds the sensed match lines ML0..ML(ENTRIES-1). Timing: `ml` is valid one
// clock after the search lines and compare-enables are applied; a write takes
// effect at the clock edge.
//
// The 16x8 geometry, the ML numbering and the preset contents follow the
// design's 16x8 array and its table; the sub-block count and the contiguous
// assignment of entries to sub-blocks are this implementation's choices.
module cam_array #(
  parameter int unsigned ENTRIES = scn_cam_pkg::CAM_ENTRIES,
  parameter int unsigned WIDTH   = scn_cam_pkg::CAM_WIDTH,
  parameter int unsigned NSB     = scn_cam_pkg::CAM_NSB,
  parameter bit          PRESET  = 1'b1,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  logic [WIDTH-1:0]   wr_data,
  input  logic [WIDTH-1:0]   sl,
  input  logic [WIDTH-1:0]   sl_n,
  input  logic [NSB-1:0]     sb_en,
  output logic [ENTRIES-1:0] ml
);

  localparam int unsigned RPS = ENTRIES / NSB;

  logic [ENTRIES-1:0] we;

  always_comb begin
    we = '0;
    if (wr_en) we[wr_addr] = 1'b1;
  end

  for (genvar s = 0; s < NSB; s++) begin : g_sb
    cam_subblock #(
      .ROWS   (RPS),
      .WIDTH  (WIDTH),
      .BASE   (s * RPS),
      .ENTRIES(ENTRIES),
      .PRESET (PRESET)
    ) u_sb (
      .clk    (clk),
      .rst_n  (rst_n),
      .we     (we[s*RPS +: RPS]),
      .wr_data(wr_data),
      .sl     (sl),
      .sl_n   (sl_n),
      .cmp_en (sb_en[s]),
      .ml_q   (ml[s*RPS +: RPS])
    );
  end

  initial begin
    assert (NSB > 0 && ENTRIES % NSB == 0)
      else $error("cam_array: ENTRIES must be a multiple of NSB");
  end

endmodule
