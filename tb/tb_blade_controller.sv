// tb_blade_controller: runs every BLADE command through the controller and
// one subarray.
//
// Loads random words into user rows of both local groups, then issues random
// commands (all operations, all lane widths, random columns, shift counts
// and scalars) and reads every result back with host READ commands. Results
// are compared with blade_ref_pkg, and each command's length (from the cycle
// after acceptance to done) with the operation table. Commands are issued
// back to back, so a new command is accepted in the done cycle of the last.
module tb_blade_controller;
  import blade_pkg::*;
  import blade_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, done, wr_all;
  blade_cmd_t cmd;
  blade_uop_t uop;
  logic [63:0] ext_data, sa_data;
  logic [5:0] host_sub;
  logic [7:0] cycles;
  logic [63:0] mem [64][4];
  int checks = 0, failures = 0;
  int op_seen [13];

  blade_controller #(.ROWS(64), .LG_ROWS(32), .SLICES(64)) dut (.*);
  blade_subarray #(.BLS(256), .ROWS(64), .LG_ROWS(32), .MUX(4)) u_arr (
    .clk(clk), .rst_n(rst_n), .uop(uop), .wr_sel(wr_all || host_sub == 0),
    .ext_data(ext_data), .sa_data(sa_data));
  always #5 clk = ~clk;

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
    rd  = sa_data;
    checks++;
    if (cycles != 8'(len)) begin failures++; $display("FAIL cycles output %0d vs %0d", cycles, len); end
  endtask

  function automatic blade_cmd_t mk(blade_op_t op, int d, int a, int b, int col);
    blade_cmd_t c = '0;
    c.op = op; c.dst = 6'(d); c.src_a = 6'(a); c.src_b = 6'(b); c.col = 2'(col);
    return c;
  endfunction

  initial begin
    blade_cmd_t c;
    int len;
    logic [63:0] rd;
    cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // user rows: 0..29 and 32..61 (the top two rows of each group are scratch)
    for (int r = 0; r < 64; r++) begin
      if (r % 32 >= 30) continue;
      for (int col = 0; col < 4; col++) begin
        c = mk(OP_WRITE, r, 0, 0, col);
        c.wdata = {$urandom, $urandom};
        mem[r][col] = c.wdata;
        issue(c, len, rd);
        checks++;
        if (len != 1) begin failures++; $display("FAIL write length %0d", len); end
      end
    end
    for (int i = 0; i < 600; i++) begin
      blade_op_t op;
      int a, b, d, col, w, exp_len;
      logic [63:0] exp, m;
      op  = blade_op_t'($urandom_range(int'(OP_LT)));
      col = $urandom_range(3);
      a   = $urandom_range(29) + 32 * $urandom_range(1);
      b   = $urandom_range(29) + ((a < 32) ? 32 : 0);
      d   = $urandom_range(29) + 32 * $urandom_range(1);
      c   = mk(op, d, a, b, col);
      c.lane   = lane_t'($urandom_range(3));
      c.shamt  = 6'($urandom_range(9));
      c.scalar = (i % 5 == 0) ? '1 : {$urandom, $urandom};
      w   = lane_bits(c.lane);
      exp = ref_op(op, mem[a][col], mem[b][col], w, c.shamt, c.scalar);
      m   = ref_mask(op, w);
      op_seen[op]++;
      issue(c, len, rd);
      exp_len = ref_cycles(op, w, c.shamt);
      checks++;
      if (len != exp_len) begin
        failures++; $display("FAIL %s length %0d exp %0d", op.name(), len, exp_len);
      end
      // read back
      c = mk(OP_READ, 0, d, 0, col);
      issue(c, len, rd);
      checks++;
      if ((rd & m) !== (exp & m)) begin
        failures++;
        $display("FAIL %s w=%0d a=%h b=%h got %h exp %h", op.name(), w,
                 mem[a][col], mem[b][col], rd, exp);
      end
      mem[d][col] = rd;
    end
    for (int o = 0; o <= int'(OP_LT); o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("FAIL op %0d never issued", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
