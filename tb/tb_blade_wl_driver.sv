// tb_blade_wl_driver: random and corner checks of the read and write
// wordline decoders (single, dual and same-row reads, disabled ports).
module tb_blade_wl_driver;
  logic rd_en, rd_dual, wr_en;
  logic [5:0] rd_row_a, rd_row_b, wr_row;
  logic [63:0] rd_wl, wr_wl;
  int checks = 0, failures = 0;

  blade_wl_driver #(.ROWS(64)) dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] er, ew;
      rd_en = 1'($urandom); rd_dual = 1'($urandom); wr_en = 1'($urandom);
      rd_row_a = 6'($urandom); rd_row_b = (i % 7 == 0) ? rd_row_a : 6'($urandom);
      wr_row = 6'($urandom);
      #1;
      er = 64'b0; ew = 64'b0;
      if (rd_en) begin
        er = er | (64'b1 << rd_row_a);
        if (rd_dual) er = er | (64'b1 << rd_row_b);
      end
      if (wr_en) ew = 64'b1 << wr_row;
      checks += 2;
      if (rd_wl !== er) begin failures++; $display("FAIL rd %h %h", rd_wl, er); end
      if (wr_wl !== ew) begin failures++; $display("FAIL wr %h %h", wr_wl, ew); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
