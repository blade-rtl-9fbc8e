// blade_controller: sequencer that turns BLADE commands into array cycles.
//
// A command (valid/ready handshake) names an operation, a destination row,
// one or two source rows, the column (one of the MUX interleaved bitlines
// per slice), the lane width, and for shifts and multiplications a count or
// a scalar. The controller then drives one micro-op per cycle (uop), which
// all subarrays execute in lock step, and pulses done in the last cycle
// together with the command's cycle count.
//
// Every elementary step is a read (one or two wordlines sensed and latched)
// followed by a writeback one cycle later. Independent steps overlap: the
// writeback of one step shares a cycle with the read of the next. Cycle
// counts, from the cycle after the command is accepted to the done cycle:
//   AND, NOR, XOR, NOT, COPY, ADD ..... 2
//   SHL by n (n >= 1) ................. 2n   (n = 0 copies, 2 cycles)
//   SUB (A - B = A + ~B + 1) .......... 4
//   GT / LT (unsigned) ................ 10
//   MUL (lane of A times scalar) ...... 1 + 2W  (W = lane width)
//   host WRITE 1, host READ 2 (data on sa_data in the done cycle)
// Two operands read together must sit in different local groups, so they
// never share a local bitline; an assertion checks this when a command is
// accepted. Temporary results use two scratch rows at the top of each local
// group (rows LG_ROWS-2 and LG_ROWS-1 of the group), which commands must not
// use.
//
// GT writes S ^ ((A ^ B) & (S ^ A)) with S = B - A: the top bit of each lane
// is 1 where A > B, the lower bits are not meaningful. MUL uses Horner's
// scheme over the scalar's bits from the top: P = (P + b_i*A) << 1 with the
// add write-forward (or a plain shift when b_i = 0), the last bit without
// the shift, giving A*scalar modulo 2^W in every lane.
//
// The operation set and the 2/2n/4/10-cycle counts follow the described
// operation table; the step sequences, the scratch rows, the command
// encoding and the scalar form of multiplication are this design's own.
// The described multiplication takes 1 + 2W + 6 cycles; this sequence needs
// no final three steps and takes 1 + 2W.
module blade_controller #(
  parameter int unsigned ROWS    = 64,
  parameter int unsigned LG_ROWS = 32,
  parameter int unsigned SLICES  = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  blade_pkg::blade_cmd_t   cmd,
  output blade_pkg::blade_uop_t   uop,
  output logic [SLICES-1:0]       ext_data,
  output logic                    wr_all,     // write phase in every subarray
  output logic [5:0]              host_sub,   // else only in this one; read source
  output logic                    done,
  output logic [7:0]              cycles
);
  import blade_pkg::*;

  localparam int unsigned RW = $clog2(ROWS);

  blade_cmd_t c;
  logic       busy;
  logic [7:0] k;       // cycle index within the command
  logic [7:0] len;

  function automatic logic [7:0] cmd_len(blade_cmd_t x);
    case (x.op)
      OP_SHL:   return (x.shamt == 0) ? 8'd2 : {1'b0, x.shamt, 1'b0};
      OP_SUB:   return 8'd4;
      OP_GT,
      OP_LT:    return 8'd10;
      OP_MUL:   return 8'(1 + 2 * lane_bits(x.lane));
      OP_WRITE: return 8'd1;
      default:  return 8'd2;
    endcase
  endfunction

  function automatic logic [RW-1:0] scratch(logic lg, logic idx);
    return RW'(int'(lg) * LG_ROWS + LG_ROWS - 2 + int'(idx));
  endfunction

  function automatic logic lg_of(logic [RW-1:0] r);
    return r[RW-1];
  endfunction

  assign cmd_ready = !busy || done;
  assign done      = busy && (k == len - 8'd1);
  assign cycles    = k + 8'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      len  <= '0;
      c    <= '0;
    end else if (cmd_valid && cmd_ready) begin
      busy <= 1'b1;
      k    <= '0;
      len  <= cmd_len(cmd);
      c    <= cmd;
    end else if (done) begin
      busy <= 1'b0;
      k    <= '0;
    end else if (busy) begin
      k <= k + 8'd1;
    end
  end

  // Per-cycle micro-op.
  logic [RW-1:0] x, y, t_row, xs_row, s_row, ys_row, p_row;
  int unsigned   bit_i;
  logic          b_i;
  always_comb begin
    uop          = '0;
    uop.rd_col   = c.col;
    uop.wr_col   = c.col;
    uop.lane     = c.lane;
    ext_data     = '0;
    wr_all       = 1'b1;
    host_sub     = c.sub;
    // Compare operands: GT is x > y with x = A; LT swaps them.
    x      = (c.op == OP_LT) ? c.src_b : c.src_a;
    y      = (c.op == OP_LT) ? c.src_a : c.src_b;
    t_row  = scratch(lg_of(x), 1'b0);   // ~x, later reused for Z
    xs_row = scratch(lg_of(x), 1'b1);   // x ^ y
    s_row  = scratch(lg_of(y), 1'b0);   // y - x
    ys_row = scratch(lg_of(y), 1'b1);   // S ^ x
    p_row  = scratch(!lg_of(c.src_a), 1'b0);  // product accumulator
    bit_i  = (k >= 8'd1) ? lane_bits(c.lane) - 1 - int'(32'(k - 8'd1) >> 1) : 0;
    b_i    = c.scalar[bit_i[5:0]];
    if (busy) begin
      case (c.op)
        OP_AND, OP_NOR, OP_XOR, OP_ADD, OP_NOT, OP_COPY: begin
          if (k == 0) begin
            uop.rd_en    = 1'b1;
            uop.rd_dual  = !(c.op inside {OP_NOT, OP_COPY});
            uop.rd_row_a = c.src_a;
            uop.rd_row_b = c.src_b;
          end else begin
            uop.wr_en  = 1'b1;
            uop.wr_row = c.dst;
            case (c.op)
              OP_AND:  uop.wr_src = WB_AND;
              OP_NOR:  uop.wr_src = WB_NOR;
              OP_XOR:  uop.wr_src = WB_XOR;
              OP_ADD:  uop.wr_src = WB_ADD;
              OP_NOT:  uop.wr_src = WB_NOR;
              default: uop.wr_src = WB_AND;
            endcase
          end
        end
        OP_SHL: begin
          if (!k[0]) begin
            uop.rd_en    = 1'b1;
            uop.rd_row_a = (k == 0) ? c.src_a : c.dst;
          end else begin
            uop.wr_en  = 1'b1;
            uop.wr_row = c.dst;
            uop.wr_src = (c.shamt == 0) ? WB_AND : WB_SHIFT;
          end
        end
        OP_SUB: begin
          case (k)
            8'd0: begin
              uop.rd_en    = 1'b1;
              uop.rd_row_a = c.src_b;
            end
            8'd1: begin
              uop.wr_en  = 1'b1;
              uop.wr_row = scratch(lg_of(c.src_b), 1'b0);
              uop.wr_src = WB_NOR;
            end
            8'd2: begin
              uop.rd_en    = 1'b1;
              uop.rd_dual  = 1'b1;
              uop.rd_row_a = c.src_a;
              uop.rd_row_b = scratch(lg_of(c.src_b), 1'b0);
            end
            default: begin
              uop.wr_en   = 1'b1;
              uop.wr_row  = c.dst;
              uop.wr_src  = WB_ADD;
              uop.cin_lsb = 1'b1;
            end
          endcase
        end
        OP_GT, OP_LT: begin
          case (k)
            8'd0: begin                        // read x
              uop.rd_en = 1'b1; uop.rd_row_a = x;
            end
            8'd1: begin                        // T = ~x ; read x, y
              uop.wr_en = 1'b1; uop.wr_row = t_row; uop.wr_src = WB_NOR;
              uop.rd_en = 1'b1; uop.rd_dual = 1'b1;
              uop.rd_row_a = x; uop.rd_row_b = y;
            end
            8'd2: begin                        // X = x ^ y ; read y, T
              uop.wr_en = 1'b1; uop.wr_row = xs_row; uop.wr_src = WB_XOR;
              uop.rd_en = 1'b1; uop.rd_dual = 1'b1;
              uop.rd_row_a = y; uop.rd_row_b = t_row;
            end
            8'd3: begin                        // S = y + ~x + 1
              uop.wr_en = 1'b1; uop.wr_row = s_row; uop.wr_src = WB_ADD;
              uop.cin_lsb = 1'b1;
            end
            8'd4: begin                        // read S, x
              uop.rd_en = 1'b1; uop.rd_dual = 1'b1;
              uop.rd_row_a = s_row; uop.rd_row_b = x;
            end
            8'd5: begin                        // Y = S ^ x
              uop.wr_en = 1'b1; uop.wr_row = ys_row; uop.wr_src = WB_XOR;
            end
            8'd6: begin                        // read X, Y
              uop.rd_en = 1'b1; uop.rd_dual = 1'b1;
              uop.rd_row_a = xs_row; uop.rd_row_b = ys_row;
            end
            8'd7: begin                        // Z = X & Y
              uop.wr_en = 1'b1; uop.wr_row = t_row; uop.wr_src = WB_AND;
            end
            8'd8: begin                        // read S, Z
              uop.rd_en = 1'b1; uop.rd_dual = 1'b1;
              uop.rd_row_a = s_row; uop.rd_row_b = t_row;
            end
            default: begin                     // D = S ^ Z
              uop.wr_en = 1'b1; uop.wr_row = c.dst; uop.wr_src = WB_XOR;
            end
          endcase
        end
        OP_MUL: begin
          if (k == 0) begin                    // P = 0
            uop.wr_en = 1'b1; uop.wr_row = p_row; uop.wr_src = WB_EXT;
          end else if (k[0]) begin             // read P (and A if b_i)
            uop.rd_en    = 1'b1;
            uop.rd_dual  = b_i;
            uop.rd_row_a = p_row;
            uop.rd_row_b = c.src_a;
          end else if (bit_i != 0) begin      // P = (P + b_i*A) << 1
            uop.wr_en  = 1'b1;
            uop.wr_row = p_row;
            uop.wr_src = b_i ? WB_ADDF : WB_SHIFT;
          end else begin                       // D = P + b_0*A
            uop.wr_en  = 1'b1;
            uop.wr_row = c.dst;
            uop.wr_src = b_i ? WB_ADD : WB_AND;
          end
        end
        OP_READ: begin
          if (k == 0) begin
            uop.rd_en = 1'b1; uop.rd_row_a = c.src_a;
          end
        end
        OP_WRITE: begin
          uop.wr_en  = 1'b1;
          uop.wr_row = c.dst;
          uop.wr_src = WB_EXT;
          ext_data   = c.wdata[SLICES-1:0];
          wr_all     = 1'b0;
        end
        default: ;
      endcase
    end
  end

  // Operands read together must come from different local groups.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && cmd_ready &&
                   cmd.op inside {OP_AND, OP_NOR, OP_XOR, OP_ADD, OP_SUB, OP_GT, OP_LT}
                   |-> lg_of(cmd.src_a) != lg_of(cmd.src_b))
    else $error("operands %0d and %0d share a local group", cmd.src_a, cmd.src_b);

  // Handshake: a pending command is held stable until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));
endmodule
