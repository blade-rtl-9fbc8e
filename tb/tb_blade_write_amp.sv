// tb_blade_write_amp: checks the write amplifier's data choice and the
// one-hot column enable of the GWrL multiplexer for all input combinations.
module tb_blade_write_amp;
  logic wr_en, use_ext, wb, ext;
  logic [1:0] sel;
  logic [3:0] gwrl, gwrl_en;
  int checks = 0, failures = 0;

  blade_write_amp #(.MUX(4)) dut (.*);

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic d;
      {wr_en, use_ext, wb, ext, sel} = 6'(i);
      #1;
      d = use_ext ? ext : wb;
      checks++;
      if (gwrl_en !== (wr_en ? 4'(1) << sel : 4'b0)) begin
        failures++; $display("FAIL en i=%0d got %b", i, gwrl_en);
      end
      checks++;
      if (gwrl[sel] !== d) begin
        failures++; $display("FAIL data i=%0d got %b", i, gwrl);
      end
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
