// search_data_register: the search (scan-line) data register of the CAM.
//
// It captures the search word on the rising clock edge when `en` is high and
// drives the differential search lines of every column: SL[b] = word[b] and
// SL'[b] = ~word[b] while a search is held, and both lines low otherwise, so an
// idle array sees no search-line activity. `valid` is high for the one cycle
// after a captured search, which is the compare cycle of the array.
//
// Interface: en/d in; word/valid/sl/sl_n out. Timing: one register stage.
// The register and the SL/SL' pairs follow the array drawings; the idle
// (both-low) state and the valid flag are this implementation's choice.
module search_data_register #(
  parameter int unsigned WIDTH = scn_cam_pkg::CAM_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] word,
  output logic             valid,
  output logic [WIDTH-1:0] sl,
  output logic [WIDTH-1:0] sl_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) word <= d;
    end
  end

  always_comb begin
    sl   = valid ? word  : '0;
    sl_n = valid ? ~word : '0;
  end

endmodule
