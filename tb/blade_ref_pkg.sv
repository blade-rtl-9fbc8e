// blade_ref_pkg: reference arithmetic for the BLADE testbenches.
//
// Computes what a BLADE command should leave in a 64-bit word, lane by lane,
// with ordinary integer arithmetic, independently of how the array does it.
// For compares only the top bit of each lane is defined; ref_mask returns the
// bits a testbench should compare.
package blade_ref_pkg;
  import blade_pkg::*;

  function automatic logic [63:0] lmask(int w);
    return (w == 64) ? '1 : ((64'd1 << w) - 1);
  endfunction

  function automatic logic [63:0] ref_op(blade_op_t op, logic [63:0] a,
                                         logic [63:0] b, int w, int shamt,
                                         logic [63:0] scalar);
    logic [63:0] r = '0;
    logic [63:0] m = lmask(w);
    for (int l = 0; l < 64 / w; l++) begin
      logic [63:0] x, y, v;
      x = (a >> (l * w)) & m;
      y = (b >> (l * w)) & m;
      case (op)
        OP_AND:  v = x & y;
        OP_NOR:  v = ~(x | y);
        OP_XOR:  v = x ^ y;
        OP_NOT:  v = ~x;
        OP_COPY: v = x;
        OP_SHL:  v = x << shamt;
        OP_ADD:  v = x + y;
        OP_SUB:  v = x - y;
        OP_MUL:  v = x * (scalar & m);
        OP_GT:   v = (x > y) ? (64'd1 << (w - 1)) : 64'd0;
        OP_LT:   v = (x < y) ? (64'd1 << (w - 1)) : 64'd0;
        default: v = x;
      endcase
      r |= (v & m) << (l * w);
    end
    return r;
  endfunction

  function automatic logic [63:0] ref_mask(blade_op_t op, int w);
    logic [63:0] r = '0;
    if (!(op inside {OP_GT, OP_LT})) return '1;
    for (int l = 0; l < 64 / w; l++) r[l * w + w - 1] = 1'b1;
    return r;
  endfunction

  // Cycle counts of the commands (operation table; MUL as built).
  function automatic int ref_cycles(blade_op_t op, int w, int shamt);
    case (op)
      OP_SHL:   return (shamt == 0) ? 2 : 2 * shamt;
      OP_SUB:   return 4;
      OP_GT,
      OP_LT:    return 10;
      OP_MUL:   return 1 + 2 * w;
      OP_WRITE: return 1;
      default:  return 2;
    endcase
  endfunction
endpackage
