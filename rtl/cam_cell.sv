// cam_cell: one binary CAM cell.
//
// The cell stores one bit and compares it with the differential search-line
// pair SL/SL'. It models a NOR-type cell: it signals a mismatch (it would pull
// its match line down) when it stores 1 and SL' is high (the search bit is 0),
// or when it stores 0 and SL is high (the search bit is 1). With both search
// lines low the cell never signals a mismatch, which is how an idle search
// bus is driven. The stored bit is written on the rising clock edge when `we`
// is high; reset loads the parameter INIT (the preset table of the array).
//
// Timing: `q` changes on the clock edge; `mismatch` is combinational from the
// stored bit and the search lines.
//
// The cell, its stored bit and the SL/SL' pair follow the array drawings of the
// design; the reset value and the write port are this implementation's choice.
module cam_cell #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic d,
  input  logic sl,
  input  logic sl_n,
  output logic q,
  output logic mismatch
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= INIT;
    else if (we) q <= d;
  end

  always_comb mismatch = (q & sl_n) | (~q & sl);

endmodule
