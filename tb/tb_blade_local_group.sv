// tb_blade_local_group: writes random rows through masked global write
// lines, then checks single-row reads (pull-down pattern of the cell and its
// complement), two-row reads (wired AND / NOR) and Rd_EN gating against a
// reference copy of the contents.
module tb_blade_local_group;
  localparam int BLS = 256, R = 32;
  logic clk = 0, rd_en;
  logic [R-1:0] rd_wl, wr_wl;
  logic [BLS-1:0] gwrl, gwrl_en, grbl_pd, grblb_pd;
  logic [BLS-1:0] ref_mem [R];
  int checks = 0, failures = 0;

  blade_local_group #(.BLS(BLS), .LG_ROWS(R)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [BLS-1:0] rnd();
    logic [BLS-1:0] v;
    for (int i = 0; i < BLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic wr(int r, logic [BLS-1:0] d, logic [BLS-1:0] m);
    @(negedge clk);
    rd_en = 0; rd_wl = 0; wr_wl = R'(1) << r; gwrl = d; gwrl_en = m;
    @(posedge clk); #1;
    wr_wl = 0; gwrl_en = 0;
    ref_mem[r] = (ref_mem[r] & ~m) | (d & m);
  endtask

  task automatic chk(string what, logic [BLS-1:0] got, logic [BLS-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rd_en = 0; rd_wl = 0; wr_wl = 0; gwrl = 0; gwrl_en = 0;
    for (int r = 0; r < R; r++) wr(r, rnd(), '1);
    for (int i = 0; i < 40; i++) wr($urandom_range(R - 1), rnd(), rnd());
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = $urandom_range(R - 1); b = $urandom_range(R - 1);
      @(negedge clk);
      rd_en = 1;
      rd_wl = (R'(1) << a) | ((i % 2) ? (R'(1) << b) : '0);
      #1;
      if (i % 2) begin
        chk("and", ~grbl_pd, ref_mem[a] & ref_mem[b]);
        chk("nor", ~grblb_pd, ~(ref_mem[a] | ref_mem[b]));
      end else begin
        chk("rd", ~grbl_pd, ref_mem[a]);
        chk("rdb", grblb_pd, ref_mem[a]);
      end
      rd_en = 0; #1;
      chk("rd_en", grbl_pd | grblb_pd, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
