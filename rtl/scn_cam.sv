// scn_cam: low-power pipelined binary CAM with a clustered-neural-network
// (sparse clustered network, SCN) front end.
//
// A conventional CAM compares the search word against every stored word in
// parallel. Here the ENTRIES x WIDTH array (16 x 8 by default) is split into
// NSB compare-enabled sub-blocks, and a classifier trained on a short part of
// each stored tag predicts which sub-blocks can hold the search word. Only
// those sub-blocks are compared; the others are left idle, which is where a
// real array saves match-line and search-line energy. The classifier may
// enable more sub-blocks than needed, never fewer, so the result is the same
// as a full compare.
//
// Pipeline (one search accepted per cycle, latency 3 cycles):
//   cycle 0  `srch_tag` drives the classifier; at the edge the search data
//            register captures the tag and the classifier its sub-block enables.
//   cycle 1  the search lines are driven; the enabled sub-blocks compare; at
//            the edge the match lines are sensed into `ml` (`ml_valid`).
//   cycle 2  the match encoder resolves the match lines; at the edge
//            `res_valid`, `hit`, `multi` and `match_addr` are registered.
// A write (`wr_en`) stores `wr_data` at `wr_addr` in the array and trains the
// classifier with it in the same edge. A write must not be issued in the same
// cycle as a search (asserted in the classifier); a search sees every write
// issued in an earlier cycle. `sb_en` shows the enables that the search now on
// `ml` used. After reset the array holds the design's 16 x 8 table (entry i =
// {i, ~i}) with the classifier trained on it, when PRESET is set.
//
// The array size, the sub-block organisation, the classifier structure and the
// preset table follow the design; the stage boundaries of the pipeline, the
// write port and the values of Q, KAPPA and NSB are this implementation's.
module scn_cam #(
  parameter int unsigned ENTRIES = scn_cam_pkg::CAM_ENTRIES,
  parameter int unsigned WIDTH   = scn_cam_pkg::CAM_WIDTH,
  parameter int unsigned Q       = scn_cam_pkg::CAM_Q,
  parameter int unsigned KAPPA   = scn_cam_pkg::CAM_KAPPA,
  parameter int unsigned NSB     = scn_cam_pkg::CAM_NSB,
  parameter bit          PRESET  = 1'b1,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  logic [WIDTH-1:0]   wr_data,
  input  logic               srch_en,
  input  logic [WIDTH-1:0]   srch_tag,
  output logic [ENTRIES-1:0] ml,
  output logic               ml_valid,
  output logic [NSB-1:0]     sb_en,
  output logic               res_valid,
  output logic               hit,
  output logic               multi,
  output logic [AW-1:0]      match_addr
);

  logic [NSB-1:0]     sb_en_c;   // enables for the compare cycle
  logic [ENTRIES-1:0] pii_c;
  logic [WIDTH-1:0]   key;
  logic               key_valid;
  logic [WIDTH-1:0]   sl, sl_n;

  scn_classifier #(
    .ENTRIES(ENTRIES), .WIDTH(WIDTH), .Q(Q), .KAPPA(KAPPA), .NSB(NSB), .PRESET(PRESET)
  ) u_cls (
    .clk       (clk),
    .rst_n     (rst_n),
    .train_en  (wr_en),
    .train_addr(wr_addr),
    .train_tag (wr_data),
    .query_en  (srch_en),
    .query_tag (srch_tag),
    .sb_en     (sb_en_c),
    .pii       (pii_c)
  );

  search_data_register #(.WIDTH(WIDTH)) u_sdr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (srch_en),
    .d    (srch_tag),
    .word (key),
    .valid(key_valid),
    .sl   (sl),
    .sl_n (sl_n)
  );

  cam_array #(
    .ENTRIES(ENTRIES), .WIDTH(WIDTH), .NSB(NSB), .PRESET(PRESET)
  ) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(wr_data),
    .sl     (sl),
    .sl_n   (sl_n),
    .sb_en  (sb_en_c),
    .ml     (ml)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ml_valid <= 1'b0;
      sb_en    <= '0;
    end else begin
      ml_valid <= key_valid;
      sb_en    <= sb_en_c;
    end
  end

  match_encoder #(.ENTRIES(ENTRIES)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .ml_valid  (ml_valid),
    .ml        (ml),
    .res_valid (res_valid),
    .hit       (hit),
    .multi     (multi),
    .match_addr(match_addr)
  );

endmodule
