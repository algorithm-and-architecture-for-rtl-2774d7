// match_encoder: converts the sensed match lines into a search result.
//
// `hit` is high when any match line is high, `match_addr` is the lowest index
// of a high match line, and `multi` flags more than one high match line (it
// cannot happen while every stored tag is distinct). The result is
// registered: it appears the cycle after `ml_valid`, together with `res_valid`.
//
// Returning the address of the matching entry follows the design ("the
// address of the output data"); the lowest-index priority and the `multi` flag
// are this implementation's choices.
module match_encoder #(
  parameter int unsigned ENTRIES = scn_cam_pkg::CAM_ENTRIES,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ml_valid,
  input  logic [ENTRIES-1:0] ml,
  output logic               res_valid,
  output logic               hit,
  output logic               multi,
  output logic [AW-1:0]      match_addr
);

  logic          hit_d;
  logic          multi_d;
  logic [AW-1:0] addr_d;

  always_comb begin
    hit_d   = 1'b0;
    multi_d = 1'b0;
    addr_d  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ml[i]) begin
        multi_d = multi_d | hit_d;
        hit_d   = 1'b1;
        addr_d  = AW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid  <= 1'b0;
      hit        <= 1'b0;
      multi      <= 1'b0;
      match_addr <= '0;
    end else begin
      res_valid  <= ml_valid;
      hit        <= ml_valid & hit_d;
      multi      <= ml_valid & multi_d;
      match_addr <= ml_valid ? addr_d : '0;
    end
  end

endmodule
