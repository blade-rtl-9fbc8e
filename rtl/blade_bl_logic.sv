// blade_bl_logic: bitline logic of one BLADE slice (carry ripple adder and
// writeback multiplexer).
//
// Inputs are the latched sense-amplifier outputs AND (GRBL) and NOR
// (GRBLbar) of the one or two cells read. XOR follows as NOR(AND, NOR). The
// slice is one stage of a ripple-carry adder: the carry out is
// AND | (~NOR & carry in), the sum is XOR ^ carry in. With a single wordline
// active the carry out equals the cell value, so the carry line into the
// next slice doubles as a one-bit left shift. The writeback multiplexer
// chooses Shift (the carry line from slice n-1), Add, NOR, XOR, AND or
// Add(n-1) (the sum of slice n-1, the add write-forward that gives add and
// shift in one operation). Purely combinational.
//
// The gate set (an XOR and two NORs on top of AND/NOR sensing), the carry
// and shift roles of the carry line and the writeback inputs follow the
// described slice; the carry equations are written functionally.
module blade_bl_logic
  import blade_pkg::*;
(
  input  logic    and_q,
  input  logic    nor_q,
  input  logic    c_in,      // Cn-1
  input  logic    add_prev,  // Add(n-1)
  input  wb_src_t src,
  output logic    c_out,     // Cn
  output logic    add,
  output logic    wb
);
  logic xor_v;
  always_comb begin
    xor_v = ~(and_q | nor_q);
    c_out = and_q | (~nor_q & c_in);
    add   = xor_v ^ c_in;
    case (src)
      WB_SHIFT: wb = c_in;
      WB_ADD:   wb = add;
      WB_NOR:   wb = nor_q;
      WB_XOR:   wb = xor_v;
      WB_AND:   wb = and_q;
      WB_ADDF:  wb = add_prev;
      default:  wb = 1'b0;
    endcase
  end
endmodule
