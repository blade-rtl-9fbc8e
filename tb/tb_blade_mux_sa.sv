// tb_blade_mux_sa: checks that the sense latches capture the selected
// GRBL/GRBLbar pair only in sensing cycles, hold otherwise, and reset to the
// precharged state.
module tb_blade_mux_sa;
  logic clk = 0, rst_n = 0, sense;
  logic [1:0] sel;
  logic [3:0] grbl, grblb;
  logic and_q, nor_q;
  int checks = 0, failures = 0;
  logic ea, en;

  blade_mux_sa #(.MUX(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    sense = 0; sel = 0; grbl = 0; grblb = 0;
    @(negedge clk);
    checks++;
    if (!(and_q && nor_q)) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    ea = 1; en = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sense = 1'($urandom); sel = 2'($urandom);
      grbl = 4'($urandom); grblb = 4'($urandom);
      if (sense) begin ea = grbl[sel]; en = grblb[sel]; end
      @(posedge clk); #1;
      checks += 2;
      if (and_q !== ea) begin failures++; $display("FAIL and %0d", i); end
      if (nor_q !== en) begin failures++; $display("FAIL nor %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
