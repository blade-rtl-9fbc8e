// blade_subarray: one 256x64 BLADE SRAM subarray with its bitline logic.
//
// The array has ROWS wordlines split into two local groups (rows 0..31 and
// 32..63) that hang in parallel on the global read bitlines. Every group of
// MUX adjacent bitlines (bitline n*MUX+c is bit n of column c) shares one
// slice made of a GRBL multiplexer with sense amplifiers and latches, the
// bitline logic (ripple-carry adder and writeback multiplexer) and a write
// amplifier, so one operation works on a SLICES-bit word of one column.
//
// Each clock cycle has a read phase and a write phase, controlled by uop:
//  * read: one or two wordlines are activated, GRBL/GRBLbar of column
//    rd_col are sensed and latched (AND/NOR of the cells, or the cell and its
//    complement for one wordline);
//  * write: the slices compute from the values latched in an earlier cycle
//    and write the selected writeback source (or ext_data) into row wr_row,
//    column wr_col, at the rising edge.
// A plain operation is a read cycle followed by a write cycle (two cycles);
// the latches let the write of one operation share a cycle with the read of
// the next. A read sees the array contents before that cycle's write.
//
// The carry chain runs from slice 0 upwards and is cut at every lane
// boundary (8/16/32/64 bits, uop.lane); the lowest slice of each lane takes
// uop.cin_lsb as carry in and 0 as Add(n-1). wr_sel lets a host write target
// one subarray while BLADE operations write all of them. sa_data is the
// latched GRBL, i.e. the word read by a single-wordline read.
//
// Sizes, the local-group organisation and the slice contents follow the
// described array. Lane cutting, the per-cycle read/write overlap and the
// bit ordering of columns are this design's choices.
module blade_subarray #(
  parameter int unsigned BLS     = 256,
  parameter int unsigned ROWS    = 64,
  parameter int unsigned LG_ROWS = 32,
  parameter int unsigned MUX     = 4,
  localparam int unsigned SL     = BLS / MUX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  blade_pkg::blade_uop_t uop,
  input  logic       wr_sel,
  input  logic [SL-1:0] ext_data,
  output logic [SL-1:0] sa_data
);
  import blade_pkg::*;

  localparam int unsigned NLG = ROWS / LG_ROWS;

  // Wordline drivers.
  logic [ROWS-1:0] rd_wl, wr_wl;
  blade_wl_driver #(.ROWS(ROWS)) u_wl (
    .rd_en   (uop.rd_en),
    .rd_dual (uop.rd_dual),
    .rd_row_a(uop.rd_row_a[$clog2(ROWS)-1:0]),
    .rd_row_b(uop.rd_row_b[$clog2(ROWS)-1:0]),
    .wr_en   (uop.wr_en && wr_sel),
    .wr_row  (uop.wr_row[$clog2(ROWS)-1:0]),
    .rd_wl   (rd_wl),
    .wr_wl   (wr_wl)
  );

  // Local groups on shared global bitlines.
  logic [BLS-1:0] gwrl, gwrl_en;
  logic [BLS-1:0] pd  [NLG];
  logic [BLS-1:0] pdb [NLG];
  for (genvar g = 0; g < NLG; g++) begin : g_lg
    blade_local_group #(.BLS(BLS), .LG_ROWS(LG_ROWS)) u_lg (
      .clk     (clk),
      .rd_en   (uop.rd_en),
      .rd_wl   (rd_wl[g*LG_ROWS +: LG_ROWS]),
      .wr_wl   (wr_wl[g*LG_ROWS +: LG_ROWS]),
      .gwrl    (gwrl),
      .gwrl_en (gwrl_en),
      .grbl_pd (pd[g]),
      .grblb_pd(pdb[g])
    );
  end

  // Precharged global read bitlines, discharged by any local group.
  logic [BLS-1:0] grbl, grblb;
  always_comb begin
    grbl  = '1;
    grblb = '1;
    for (int g = 0; g < NLG; g++) begin
      grbl  &= ~pd[g];
      grblb &= ~pdb[g];
    end
  end

  // Lane boundaries of the carry chain.
  logic [SL-1:0] lane_lsb;
  always_comb begin
    for (int n = 0; n < SL; n++)
      lane_lsb[n] = ((n % lane_bits(uop.lane)) == 0);
  end

  logic [SL-1:0] and_q, nor_q, c_out, add, wb, c_in, add_prev;
  always_comb begin
    for (int n = 0; n < SL; n++) begin
      if (n == 0 || lane_lsb[n]) begin
        c_in[n]     = uop.cin_lsb;
        add_prev[n] = 1'b0;
      end else begin
        c_in[n]     = c_out[n-1];
        add_prev[n] = add[n-1];
      end
    end
  end

  for (genvar n = 0; n < SL; n++) begin : g_slice
    blade_mux_sa #(.MUX(MUX)) u_sa (
      .clk  (clk),
      .rst_n(rst_n),
      .sense(uop.rd_en),
      .sel  (uop.rd_col[$clog2(MUX)-1:0]),
      .grbl (grbl[n*MUX +: MUX]),
      .grblb(grblb[n*MUX +: MUX]),
      .and_q(and_q[n]),
      .nor_q(nor_q[n])
    );
    blade_bl_logic u_logic (
      .and_q   (and_q[n]),
      .nor_q   (nor_q[n]),
      .c_in    (c_in[n]),
      .add_prev(add_prev[n]),
      .src     (uop.wr_src),
      .c_out   (c_out[n]),
      .add     (add[n]),
      .wb      (wb[n])
    );
    blade_write_amp #(.MUX(MUX)) u_wra (
      .wr_en  (uop.wr_en && wr_sel),
      .use_ext(uop.wr_src == WB_EXT),
      .wb     (wb[n]),
      .ext    (ext_data[n]),
      .sel    (uop.wr_col[$clog2(MUX)-1:0]),
      .gwrl   (gwrl[n*MUX +: MUX]),
      .gwrl_en(gwrl_en[n*MUX +: MUX])
    );
  end

  assign sa_data = and_q;
endmodule
