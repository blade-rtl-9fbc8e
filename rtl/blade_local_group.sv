// blade_local_group: one local group (LG) of a BLADE subarray.
//
// A local group holds LG_ROWS wordlines of 6T cells on local bitlines
// (LBL/LBLbar) with its own precharge, read and write periphery. The local
// bitlines are precharged high; an active wordline discharges LBL when its
// cell holds 0 and LBLbar when it holds 1. When Rd_EN is high the local
// inverters turn a discharged local bitline into a pull-down on the global
// read bitline GRBL or GRBLbar. The outputs here are those pull-down
// requests; the subarray combines the requests of all local groups, so GRBL
// stays high only if every active cell is 1 (AND) and GRBLbar only if every
// active cell is 0 (NOR).
//
// Writes come from the global write lines GWrL through the write
// transistors of the active write wordline, only on bitlines whose column
// the GWrL multiplexer enables. The write is synchronous (rising clk); the
// read pull-downs are combinational from the stored cells.
//
// Storage, the read/write scheme and the sizes follow the described array.
// The separate read and write wordline inputs are this design's choice.
module blade_local_group #(
  parameter int unsigned BLS     = 256,
  parameter int unsigned LG_ROWS = 32
) (
  input  logic               clk,
  input  logic               rd_en,      // Rd_EN
  input  logic [LG_ROWS-1:0] rd_wl,
  input  logic [LG_ROWS-1:0] wr_wl,
  input  logic [BLS-1:0]     gwrl,
  input  logic [BLS-1:0]     gwrl_en,
  output logic [BLS-1:0]     grbl_pd,
  output logic [BLS-1:0]     grblb_pd
);
  logic [BLS-1:0] cells [LG_ROWS];

  // Local bitlines: discharged by any active cell of the opposite value.
  logic [BLS-1:0] lbl_low, lblb_low;
  always_comb begin
    lbl_low  = '0;
    lblb_low = '0;
    for (int r = 0; r < LG_ROWS; r++) begin
      if (rd_wl[r]) begin
        lbl_low  |= ~cells[r];
        lblb_low |=  cells[r];
      end
    end
    grbl_pd  = rd_en ? lbl_low  : '0;
    grblb_pd = rd_en ? lblb_low : '0;
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < LG_ROWS; r++) begin
      if (wr_wl[r]) cells[r] <= (cells[r] & ~gwrl_en) | (gwrl & gwrl_en);
    end
  end
endmodule
