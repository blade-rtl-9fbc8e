// tb_blade_top: end-to-end run of the full BLADE array at its default size
// (16 subarrays of 256x64).
//
// The host first writes random words into every user row and column of
// every subarray. Random BLADE commands then run on all subarrays at once;
// after each, the destination word is read back from every subarray and
// compared with blade_ref_pkg, and the command length with the operation
// table. The test counts the mechanisms of the design and fails if one never
// happened: every operation, every lane width, a carry stopped at a lane
// boundary, the add write-forward, the shift path, a writeback overlapping
// the next read, back-to-back command acceptance, and host writes that
// touched only the addressed subarray.
module tb_blade_top;
  import blade_pkg::*;
  import blade_ref_pkg::*;
  localparam int NS = 16;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, done;
  blade_cmd_t cmd;
  logic [7:0] cycles;
  logic [63:0] rd_data;
  logic [63:0] mem [NS][64][4];
  int checks = 0, failures = 0;
  int op_seen [13];
  int lane_seen [4];
  int n_lane_cut = 0, n_addf = 0, n_shift = 0, n_overlap = 0, n_b2b = 0, n_sel_wr = 0;

  blade_top dut (.*);
  always #5 clk = ~clk;

  // Mechanism counters observed on the broadcast micro-op.
  always @(posedge clk) begin
    if (dut.uop.wr_en && dut.uop.wr_src == WB_ADDF) n_addf++;
    if (dut.uop.wr_en && dut.uop.wr_src == WB_SHIFT) n_shift++;
    if (dut.uop.wr_en && dut.uop.rd_en) n_overlap++;
    if (cmd_valid && cmd_ready && done) n_b2b++;
  end

  task automatic issue(blade_cmd_t c, output int len, output logic [63:0] rd);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
    len = 1;
    while (!done) begin
      @(posedge clk); #1;
      len++;
    end
    rd = rd_data;
  endtask

  function automatic blade_cmd_t mk(blade_op_t op, int d, int a, int b, int col, int sub);
    blade_cmd_t c = '0;
    c.op = op; c.dst = 6'(d); c.src_a = 6'(a); c.src_b = 6'(b); c.col = 2'(col);
    c.sub = 6'(sub);
    return c;
  endfunction

  task automatic read_chk(int s, int row, int col, logic [63:0] exp, logic [63:0] m,
                          string what);
    blade_cmd_t c;
    int len;
    logic [63:0] rd;
    c = mk(OP_READ, 0, row, 0, col, s);
    issue(c, len, rd);
    checks++;
    if ((rd & m) !== (exp & m)) begin
      failures++;
      $display("FAIL %s sub %0d row %0d col %0d got %h exp %h", what, s, row, col, rd, exp);
    end
  endtask

  // Does some lane of a + b carry out of its top bit?
  function automatic bit lane_carry(logic [63:0] a, logic [63:0] b, int w);
    logic [63:0] m = lmask(w);
    for (int l = 0; l < 64 / w; l++) begin
      logic [64:0] s;
      s = 65'((a >> (l * w)) & m) + 65'((b >> (l * w)) & m);
      if (w < 64 ? s[w] : s[64]) return 1;
    end
    return 0;
  endfunction

  initial begin
    blade_cmd_t c;
    int len;
    logic [63:0] rd;
    cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < 64; r++) begin
        if (r % 32 >= 30) continue;
        for (int col = 0; col < 4; col++) begin
          c = mk(OP_WRITE, r, 0, 0, col, s);
          c.wdata = {$urandom, $urandom};
          mem[s][r][col] = c.wdata;
          issue(c, len, rd);
        end
      end
    // host writes reach only the addressed subarray
    for (int i = 0; i < 8; i++) begin
      int s = $urandom_range(NS - 1), r = $urandom_range(29), col = $urandom_range(3);
      c = mk(OP_WRITE, r, 0, 0, col, s);
      c.wdata = {$urandom, $urandom};
      mem[s][r][col] = c.wdata;
      issue(c, len, rd);
      checks++;
      if (len != 1) begin failures++; $display("FAIL write length"); end
      for (int t = 0; t < NS; t++) read_chk(t, r, col, mem[t][r][col], '1, "host write");
      n_sel_wr++;
    end

    for (int i = 0; i < 260; i++) begin
      blade_op_t op;
      int a, b, d, col, w, exp_len;
      logic [63:0] m;
      op  = blade_op_t'(i % (int'(OP_LT) + 1));
      col = $urandom_range(3);
      a   = $urandom_range(29) + 32 * $urandom_range(1);
      b   = $urandom_range(29) + ((a < 32) ? 32 : 0);
      d   = $urandom_range(29) + 32 * $urandom_range(1);
      c   = mk(op, d, a, b, col, 0);
      c.lane   = lane_t'($urandom_range(3));
      c.shamt  = 6'($urandom_range(1, 7));
      c.scalar = {$urandom, $urandom};
      w   = lane_bits(c.lane);
      m   = ref_mask(op, w);
      op_seen[op]++;
      lane_seen[c.lane]++;
      if (op == OP_ADD && w < 64 && lane_carry(mem[0][a][col], mem[0][b][col], w)) n_lane_cut++;
      issue(c, len, rd);
      exp_len = ref_cycles(op, w, c.shamt);
      checks++;
      if (len != exp_len) begin
        failures++; $display("FAIL %s length %0d exp %0d", op.name(), len, exp_len);
      end
      for (int s = 0; s < NS; s++) begin
        logic [63:0] exp;
        exp = ref_op(op, mem[s][a][col], mem[s][b][col], w, c.shamt, c.scalar);
        read_chk(s, d, col, exp, m, op.name());
        mem[s][d][col] = exp;
      end
      // lanes of a compare hold only their flag: take the array's word
      if (op inside {OP_GT, OP_LT})
        for (int s = 0; s < NS; s++) begin
          c = mk(OP_READ, 0, d, 0, col, s);
          issue(c, len, rd);
          mem[s][d][col] = rd;
        end
    end

    for (int o = 0; o <= int'(OP_LT); o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("FAIL op %0d never ran", o); end
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (lane_seen[l] == 0) begin failures++; $display("FAIL lane %0d never ran", l); end
    end
    checks += 6;
    if (n_lane_cut == 0) begin failures++; $display("FAIL no lane carry cut"); end
    if (n_addf == 0)     begin failures++; $display("FAIL no add write-forward"); end
    if (n_shift == 0)    begin failures++; $display("FAIL no shift writeback"); end
    if (n_overlap == 0)  begin failures++; $display("FAIL no overlapped read/write"); end
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back command"); end
    if (n_sel_wr == 0)   begin failures++; $display("FAIL no selective host write"); end
    $display("mechanisms: lane_cut=%0d addf=%0d shift=%0d overlap=%0d back_to_back=%0d sel_write=%0d",
             n_lane_cut, n_addf, n_shift, n_overlap, n_b2b, n_sel_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
