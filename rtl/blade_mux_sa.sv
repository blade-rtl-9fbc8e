// blade_mux_sa: GRBL multiplexer, sense amplifiers and output latches of one
// BLADE bitline-logic slice.
//
// MUX pairs of global read bitlines (GRBL/GRBLbar) share one slice. The
// multiplexer passes the pair of column sel to two single-ended sense
// amplifiers; their outputs are captured in the latches L at the end of a
// sensing cycle. With two wordlines active the latched GRBL is the AND and
// the latched GRBLbar the NOR of the two cells; with one wordline they are
// the cell and its complement. The latched values hold until the next
// sensing cycle, which lets the following cycle's writeback overlap the next
// read.
//
// The structure (mux, SA, latch L) follows the described periphery; the
// latches are modelled as rising-edge registers and reset to the precharged
// state (both high).
module blade_mux_sa #(
  parameter int unsigned MUX = 4,
  localparam int unsigned SEL_W = $clog2(MUX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sense,
  input  logic [SEL_W-1:0] sel,
  input  logic [MUX-1:0]   grbl,
  input  logic [MUX-1:0]   grblb,
  output logic             and_q,
  output logic             nor_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      and_q <= 1'b1;
      nor_q <= 1'b1;
    end else if (sense) begin
      and_q <= grbl[sel];
      nor_q <= grblb[sel];
    end
  end
endmodule
