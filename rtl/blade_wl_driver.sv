// blade_wl_driver: wordline drivers of one BLADE subarray.
//
// Bitline computing activates two wordlines at once and senses the combined
// discharge, so the read decoder turns one or two row addresses into a one-
// or two-hot read wordline vector. A separate write decoder selects the row
// the write amplifiers store into. Both decoders are purely combinational;
// the caller registers nothing here.
//
// The drivers appear only by name in the subarray layout; decoding two
// addresses at once follows from the two-wordline operations. Keeping read
// and write wordlines apart (so a writeback and the next read can share a
// cycle) is this design's choice.
module blade_wl_driver #(
  parameter int unsigned ROWS  = 64,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             rd_en,
  input  logic             rd_dual,
  input  logic [ROW_W-1:0] rd_row_a,
  input  logic [ROW_W-1:0] rd_row_b,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  output logic [ROWS-1:0]  rd_wl,
  output logic [ROWS-1:0]  wr_wl
);
  always_comb begin
    rd_wl = '0;
    wr_wl = '0;
    if (rd_en) begin
      rd_wl[rd_row_a] = 1'b1;
      if (rd_dual) rd_wl[rd_row_b] = 1'b1;
    end
    if (wr_en) wr_wl[wr_row] = 1'b1;
  end
endmodule
