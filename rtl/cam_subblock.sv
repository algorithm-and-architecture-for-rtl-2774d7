// cam_subblock: one independently compare-enabled sub-block of the CAM array.
//
// The sub-block holds ROWS words of WIDTH cam_cell instances, each with a valid
// bit, and one match line per word. When `cmp_en` is high the match line of a
// valid word is high exactly when no cell of the word reports a mismatch
// against the search lines; when `cmp_en` is low the sub-block is not
// evaluated (its match lines are not precharged) and all its match lines read
// low. The match lines are sampled into `ml_q` on the rising clock edge, which
// stands in for the match-line sense amplifiers (MLSA) of the array.
//
// Interface: `we` writes `wr_data` into the selected words (one-hot) and marks
// them valid; sl/sl_n are the shared differential search lines; `cmp_en` is
// this sub-block's compare-enable from the classifier. Timing: compare in the
// cycle the search lines are driven, sensed result in `ml_q` one cycle later.
//
// Division of the array into compare-enabled sub-blocks follows the design;
// the valid bits, the preset contents (BASE is the global index of the first
// word) and the sensing register are this implementation's choices.
module cam_subblock #(
  parameter int unsigned ROWS    = 4,
  parameter int unsigned WIDTH   = scn_cam_pkg::CAM_WIDTH,
  parameter int unsigned BASE    = 0,
  parameter int unsigned ENTRIES = scn_cam_pkg::CAM_ENTRIES,
  parameter bit          PRESET  = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROWS-1:0]  we,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [WIDTH-1:0] sl,
  input  logic [WIDTH-1:0] sl_n,
  input  logic             cmp_en,
  output logic [ROWS-1:0]  ml_q
);

  logic [ROWS-1:0] row_valid;
  logic [ROWS-1:0] ml;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam logic [63:0] INITW = scn_cam_pkg::preset_word(BASE + r, ENTRIES, WIDTH);
    logic [WIDTH-1:0] mism;

    for (genvar b = 0; b < WIDTH; b++) begin : g_col
      cam_cell #(.INIT(PRESET ? INITW[b] : 1'b0)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .we      (we[r]),
        .d       (wr_data[b]),
        .sl      (sl[b]),
        .sl_n    (sl_n[b]),
        .q       (),
        .mismatch(mism[b])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     row_valid[r] <= PRESET;
      else if (we[r]) row_valid[r] <= 1'b1;
    end

    always_comb ml[r] = cmp_en & row_valid[r] & ~(|mism);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ml_q <= '0;
    else        ml_q <= ml;
  end

endmodule
