// tb_blade_subarray: drives micro-ops straight into one 256x64 subarray.
//
// Fills all rows and columns through the external-data write path, then runs
// random operations: a read cycle (two rows from different local groups, or
// one row) followed by a writeback cycle with a random source, lane width
// and carry in. The next operation's read overlaps that writeback cycle.
// Every result is read back through a single-wordline read and compared with
// a lane-by-lane reference computed in this testbench. Also counts that
// every writeback source and lane width was exercised.
module tb_blade_subarray;
  import blade_pkg::*;
  logic clk = 0, rst_n = 0;
  blade_uop_t uop;
  logic wr_sel;
  logic [63:0] ext_data, sa_data;
  logic [63:0] mem [64][4];
  int checks = 0, failures = 0;
  int src_seen [7];
  int lane_seen [4];

  blade_subarray #(.BLS(256), .ROWS(64), .LG_ROWS(32), .MUX(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  // Lane-wise a + b + cin, optionally shifted left by one inside the lane.
  function automatic logic [63:0] lane_add(logic [63:0] a, logic [63:0] b,
                                           logic cin, int w, bit fwd);
    logic [63:0] r = '0;
    for (int l = 0; l < 64 / w; l++) begin
      logic [64:0] s;
      logic [63:0] m;
      m = (w == 64) ? '1 : ((64'd1 << w) - 1);
      s = 65'((a >> (l * w)) & m) + 65'((b >> (l * w)) & m) + 65'(cin);
      if (fwd) s = s << 1;
      r |= (s[63:0] & m) << (l * w);
    end
    return r;
  endfunction

  function automatic logic [63:0] lane_shl(logic [63:0] a, logic cin, int w);
    logic [63:0] r = '0;
    for (int l = 0; l < 64 / w; l++) begin
      logic [63:0] m;
      m = (w == 64) ? '1 : ((64'd1 << w) - 1);
      r |= ((((a >> (l * w)) & m) << 1 | 64'(cin)) & m) << (l * w);
    end
    return r;
  endfunction

  task automatic idle_uop();
    uop = '0;
  endtask

  task automatic host_write(int row, int col, logic [63:0] d);
    @(negedge clk);
    idle_uop();
    uop.wr_en = 1; uop.wr_row = 6'(row); uop.wr_col = 2'(col); uop.wr_src = WB_EXT;
    ext_data = d; wr_sel = 1;
    @(posedge clk); #1;
    mem[row][col] = d;
  endtask

  task automatic host_check(int row, int col);
    @(negedge clk);
    idle_uop();
    uop.rd_en = 1; uop.rd_row_a = 6'(row); uop.rd_col = 2'(col);
    @(posedge clk); #1;
    checks++;
    if (sa_data !== mem[row][col]) begin
      failures++;
      $display("FAIL row %0d col %0d got %h exp %h", row, col, sa_data, mem[row][col]);
    end
  endtask

  initial begin
    idle_uop(); wr_sel = 1; ext_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 4; c++) host_write(r, c, rnd64());
    for (int c = 0; c < 4; c++) host_check(5, c);

    for (int i = 0; i < 400; i++) begin
      int ra, rb, rd, col, w;
      bit dual;
      wb_src_t src;
      logic cin;
      logic [63:0] a, b, exp;
      lane_t ln;
      ra   = $urandom_range(31);
      rb   = 32 + $urandom_range(31);
      if (i % 2) begin int t = ra; ra = rb; rb = t; end
      rd   = $urandom_range(63);
      col  = $urandom_range(3);
      ln   = lane_t'($urandom_range(3));
      w    = lane_bits(ln);
      src  = wb_src_t'($urandom_range(5));
      dual = !(src == WB_SHIFT);
      cin  = 1'($urandom);
      a    = mem[ra][col];
      b    = dual ? mem[rb][col] : a;
      case (src)
        WB_SHIFT: exp = lane_shl(a, cin, w);
        WB_ADD:   exp = lane_add(a, b, cin, w, 0);
        WB_NOR:   exp = ~(a | b);
        WB_XOR:   exp = a ^ b;
        WB_AND:   exp = a & b;
        default:  exp = lane_add(a, b, cin, w, 1);
      endcase
      src_seen[src]++;
      lane_seen[ln]++;
      // read cycle
      @(negedge clk);
      idle_uop();
      uop.rd_en = 1; uop.rd_dual = dual; uop.rd_row_a = 6'(ra); uop.rd_row_b = 6'(rb);
      uop.rd_col = 2'(col);
      @(posedge clk); #1;
      if (dual) begin
        checks++;
        if (sa_data !== (a & b)) begin failures++; $display("FAIL sensed AND"); end
      end
      // write cycle, overlapped with a read of another row
      @(negedge clk);
      idle_uop();
      uop.wr_en = 1; uop.wr_row = 6'(rd); uop.wr_col = 2'(col); uop.wr_src = src;
      uop.cin_lsb = cin; uop.lane = ln;
      uop.rd_en = 1; uop.rd_row_a = 6'((rd + 1) % 64); uop.rd_col = 2'(col);
      @(posedge clk); #1;
      checks++;
      if (sa_data !== mem[(rd + 1) % 64][col]) begin
        failures++; $display("FAIL overlapped read");
      end
      mem[rd][col] = exp;
      host_check(rd, col);
      // an unselected subarray must not write
      if (i % 50 == 0) begin
        @(negedge clk);
        idle_uop();
        uop.wr_en = 1; uop.wr_row = 6'(rd); uop.wr_col = 2'(col); uop.wr_src = WB_EXT;
        ext_data = ~exp; wr_sel = 0;
        @(posedge clk); #1;
        wr_sel = 1;
        host_check(rd, col);
      end
    end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (src_seen[s] == 0) begin failures++; $display("FAIL source %0d never used", s); end
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (lane_seen[l] == 0) begin failures++; $display("FAIL lane %0d never used", l); end
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
