// tb_blade_bl_logic: exhaustive check of one bitline-logic slice.
//
// Drives every combination of two cell values a, b (or one cell, giving
// AND = a, NOR = ~a), carry in, Add(n-1) and writeback source, and compares
// carry out, sum and writeback value with a full-adder reference written
// from the cell values rather than from the sensed AND/NOR.
module tb_blade_bl_logic;
  import blade_pkg::*;
  logic and_q, nor_q, c_in, add_prev, c_out, add, wb;
  wb_src_t src;
  int checks = 0, failures = 0;

  blade_bl_logic dut (.*);

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    for (int dual = 0; dual < 2; dual++)
    for (int a = 0; a < 2; a++)
    for (int b = 0; b < 2; b++)
    for (int ci = 0; ci < 2; ci++)
    for (int ap = 0; ap < 2; ap++)
    for (int s = 0; s <= 5; s++) begin
      logic bb, e_sum, e_co, e_wb;
      bb       = dual ? b[0] : a[0];       // one wordline: both "operands" are a
      and_q    = a[0] & bb;
      nor_q    = ~(a[0] | bb);
      c_in     = ci[0];
      add_prev = ap[0];
      src      = wb_src_t'(s);
      #1;
      if (dual) begin
        {e_co, e_sum} = 2'(a) + 2'(b) + 2'(ci);
      end else begin
        e_co  = a[0];                         // carry line carries the cell
        e_sum = ci[0];
      end
      case (src)
        WB_SHIFT: e_wb = ci[0];
        WB_ADD:   e_wb = e_sum;
        WB_NOR:   e_wb = ~(a[0] | bb);
        WB_XOR:   e_wb = a[0] ^ bb;
        WB_AND:   e_wb = a[0] & bb;
        default:  e_wb = ap[0];
      endcase
      chk("c_out", c_out, e_co);
      chk("add", add, e_sum);
      chk("wb", wb, e_wb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
