// tb_blade_kernels: the three benchmark kernels BLADE targets, run on the
// full 32 KiB array (16 subarrays, default parameters).
//
// Vectors are laid out pixel by pixel across lanes: pixel p of a vector with
// lane width w sits in lane p % L (L = 64/w lanes per word) of subarray
// (p / L) % 16, column (p / (16L)) % 4, and row base + p / (64L). The host
// places data with WRITE commands and reads results with READ commands;
// everything in between is BLADE commands, checked against integer
// references computed here.
//
//  1. Bitwise kernel (SHA-3 permutation style) on 4096 bytes: rounds of
//     a ^= (~b & c) and b <<= 1 on 64-bit lanes.
//  2. 8-tap FIR on a 16x16 tile of 8-bit pixels with 16-bit lanes, a
//     horizontal then a vertical pass. The host lays out the 8 shifted
//     copies of the input (BLADE has no cross-lane moves); BLADE multiplies
//     each by its coefficient and accumulates. Arithmetic is modulo 2^16.
//  3. 3x3 convolution, stride 1, zero padding 1, 32-bit data and 8-bit
//     signed weights, on 16x16 planes: 2 input planes into 2 output planes
//     (the benchmark layer has 32 of each; the others repeat the same steps).
// Every command's length is checked against the operation table, and the
// cycles spent in BLADE commands per kernel are printed.
module tb_blade_kernels;
  import blade_pkg::*;
  import blade_ref_pkg::*;
  localparam int NS = 16;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, done;
  blade_cmd_t cmd;
  logic [7:0] cycles;
  logic [63:0] rd_data;
  int checks = 0, failures = 0;
  longint blade_cycles;

  blade_top dut (.*);
  always #5 clk = ~clk;

  task automatic issue(blade_cmd_t c, output logic [63:0] rd);
    int len;
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
    if (!(c.op inside {OP_READ, OP_WRITE})) begin
      blade_cycles += len;
      checks++;
      if (len != ref_cycles(c.op, lane_bits(c.lane), int'(c.shamt))) begin
        failures++; $display("FAIL %s took %0d cycles", c.op.name(), len);
      end
    end
  endtask

  // One BLADE command on every column of a vector of nrs row-sets.
  task automatic vop(blade_op_t op, int d, int a, int b, lane_t ln, int nrs,
                     logic [63:0] scalar = 0, int shamt = 0);
    logic [63:0] rd;
    for (int rs = 0; rs < nrs; rs++)
      for (int col = 0; col < 4; col++) begin
        blade_cmd_t c = '0;
        c.op = op; c.dst = 6'(d + rs); c.src_a = 6'(a + rs); c.src_b = 6'(b + rs);
        c.col = 2'(col); c.lane = ln; c.scalar = scalar; c.shamt = 6'(shamt);
        issue(c, rd);
      end
  endtask

  // Host access to a vector of n pixels of lane width w starting at row base.
  task automatic put_vec(int base, int w, int n, ref longint v[]);
    int L = 64 / w;
    logic [63:0] m = lmask(w);
    logic [63:0] rd;
    for (int wd = 0; wd < n / L; wd++) begin
      blade_cmd_t c = '0;
      c.op = OP_WRITE;
      c.sub = 6'(wd % NS); c.col = 2'((wd / NS) % 4); c.dst = 6'(base + wd / (4 * NS));
      for (int l = 0; l < L; l++) c.wdata |= (64'(v[wd * L + l]) & m) << (l * w);
      issue(c, rd);
    end
  endtask

  task automatic get_vec(int base, int w, int n, ref longint v[]);
    int L = 64 / w;
    logic [63:0] m = lmask(w);
    logic [63:0] rd;
    for (int wd = 0; wd < n / L; wd++) begin
      blade_cmd_t c = '0;
      c.op = OP_READ;
      c.sub = 6'(wd % NS); c.col = 2'((wd / NS) % 4); c.src_a = 6'(base + wd / (4 * NS));
      issue(c, rd);
      for (int l = 0; l < L; l++) v[wd * L + l] = longint'((rd >> (l * w)) & m);
    end
  endtask

  task automatic cmp_vec(string what, longint got[], longint exp[], int w);
    logic [63:0] m = lmask(w);
    int bad = 0;
    for (int i = 0; i < got.size(); i++) begin
      checks++;
      if ((64'(got[i]) & m) != (64'(exp[i]) & m)) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s [%0d] got %h exp %h", what, i, got[i], 64'(exp[i]) & m);
      end
    end
  endtask

  // ---------------------------------------------------------------- kernels
  task automatic sha3_kernel(int rounds);
    // 4096 B = 512 lanes of 64 bits = 8 row-sets; a in rows 0-7, t in 8-15
    // (group 0); b in 32-39, c in 40-47, t2 in 48-55 (group 1).
    localparam int N = 512;
    longint a[] = new[N], b[] = new[N], c[] = new[N], got[] = new[N];
    for (int i = 0; i < N; i++) begin
      a[i] = {$urandom, $urandom}; b[i] = {$urandom, $urandom}; c[i] = {$urandom, $urandom};
    end
    put_vec(0, 64, N, a); put_vec(32, 64, N, b); put_vec(40, 64, N, c);
    blade_cycles = 0;
    for (int r = 0; r < rounds; r++) begin
      vop(OP_NOT, 8, 32, 0, LANE_64, 8);          // t  = ~b
      vop(OP_AND, 48, 8, 40, LANE_64, 8);         // t2 = t & c
      vop(OP_XOR, 0, 0, 48, LANE_64, 8);          // a ^= t2
      vop(OP_SHL, 32, 32, 0, LANE_64, 8, 0, 1);   // b <<= 1
      for (int i = 0; i < N; i++) begin
        a[i] = a[i] ^ (~b[i] & c[i]);
        b[i] = b[i] << 1;
      end
    end
    $display("bitwise kernel: 4096 B, %0d rounds, %0d BLADE cycles", rounds, blade_cycles);
    get_vec(0, 64, N, got);  cmp_vec("sha3 a", got, a, 64);
    get_vec(32, 64, N, got); cmp_vec("sha3 b", got, b, 64);
  endtask

  // acc(rows accr..) = sum_k coef[k] * copy_k(rows k*nrs..), 16- or 32-bit lanes
  task automatic mac_taps(int ntaps, longint coef[], lane_t ln, int nrs, int accr, int prodr);
    for (int k = 0; k < ntaps; k++) begin
      logic [63:0] s = 64'(coef[k]);
      if (k == 0) vop(OP_MUL, accr, 0, 0, ln, nrs, s);
      else begin
        vop(OP_MUL, prodr, k * nrs, 0, ln, nrs, s);
        vop(OP_ADD, accr, accr, prodr, ln, nrs);
      end
    end
  endtask

  task automatic fir_kernel();
    // 16x16 output tile, 8-bit input with a 7-pixel apron, 16-bit lanes:
    // 256 pixels = 1 row-set. Copies in rows 0-7, product row 10 (group 0),
    // accumulator row 32 (group 1).
    localparam int T = 16, N = 256;
    longint coef[] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    longint x[T + 7][T + 7];
    longint h[T + 7][T];
    longint cp[] = new[N], got[] = new[N], exp[] = new[N];
    longint cyc_h, cyc_v;
    for (int r = 0; r < T + 7; r++) for (int cc = 0; cc < T + 7; cc++) x[r][cc] = $urandom_range(255);
    // horizontal pass over the 16 rows of the tile (plus 7 apron rows, done
    // as a second 256-pixel vector holding rows 16..22 and padding)
    blade_cycles = 0;
    for (int part = 0; part < 2; part++) begin
      for (int k = 0; k < 8; k++) begin
        for (int p = 0; p < N; p++) begin
          int r = part * T + p / T, cc = p % T;
          cp[p] = (r < T + 7) ? x[r][cc + k] : 0;
        end
        put_vec(k, 16, N, cp);
      end
      mac_taps(8, coef, LANE_16, 1, 32, 10);
      get_vec(32, 16, N, got);
      for (int p = 0; p < N; p++) begin
        int r = part * T + p / T, cc = p % T;
        longint s = 0;
        if (r < T + 7) begin
          for (int k = 0; k < 8; k++) s += coef[k] * x[r][cc + k];
          h[r][cc] = got[p];
        end
        exp[p] = s;
      end
      cmp_vec("fir horizontal", got, exp, 16);
    end
    cyc_h = blade_cycles;
    // vertical pass on the horizontal results
    blade_cycles = 0;
    for (int k = 0; k < 8; k++) begin
      for (int p = 0; p < N; p++) cp[p] = h[p / T + k][p % T];
      put_vec(k, 16, N, cp);
    end
    mac_taps(8, coef, LANE_16, 1, 32, 10);
    get_vec(32, 16, N, got);
    for (int p = 0; p < N; p++) begin
      longint s = 0;
      for (int k = 0; k < 8; k++) s += coef[k] * h[p / T + k][p % T];
      exp[p] = s;
    end
    cmp_vec("fir vertical", got, exp, 16);
    cyc_v = blade_cycles;
    $display("FIR kernel: 16x16 tile, 8 taps, %0d + %0d BLADE cycles", cyc_h, cyc_v);
  endtask

  task automatic conv_kernel();
    // 16x16 planes, 32-bit lanes: 256 pixels = 2 row-sets. Shifted copies of
    // one input plane in rows 0-17, product rows 20-21 (group 0);
    // accumulators of the output planes in rows 32-35 (group 1).
    localparam int W = 16, N = 256, NI = 2, NO = 2;
    longint in_p[NI][W][W];
    longint wt[NO][NI][9];
    longint cp[] = new[N], got[] = new[N], exp[] = new[N];
    for (int i = 0; i < NI; i++) for (int y = 0; y < W; y++) for (int xx = 0; xx < W; xx++)
      in_p[i][y][xx] = longint'($urandom_range(2000)) - 1000;
    for (int o = 0; o < NO; o++) for (int i = 0; i < NI; i++) for (int k = 0; k < 9; k++)
      wt[o][i][k] = longint'($urandom_range(255)) - 128;
    blade_cycles = 0;
    for (int i = 0; i < NI; i++) begin
      for (int k = 0; k < 9; k++) begin
        for (int p = 0; p < N; p++) begin
          int y = p / W + k / 3 - 1, xx = p % W + k % 3 - 1;
          cp[p] = (y < 0 || y >= W || xx < 0 || xx >= W) ? 0 : in_p[i][y][xx];
        end
        put_vec(2 * k, 32, N, cp);
      end
      for (int o = 0; o < NO; o++) begin
        for (int k = 0; k < 9; k++) begin
          logic [63:0] s = 64'(wt[o][i][k]);
          if (i == 0 && k == 0) vop(OP_MUL, 32 + 2 * o, 0, 0, LANE_32, 2, s);
          else begin
            vop(OP_MUL, 20, 2 * k, 0, LANE_32, 2, s);
            vop(OP_ADD, 32 + 2 * o, 32 + 2 * o, 20, LANE_32, 2);
          end
        end
      end
    end
    for (int o = 0; o < NO; o++) begin
      get_vec(32 + 2 * o, 32, N, got);
      for (int p = 0; p < N; p++) begin
        longint s = 0;
        for (int i = 0; i < NI; i++) for (int k = 0; k < 9; k++) begin
          int y = p / W + k / 3 - 1, xx = p % W + k % 3 - 1;
          if (!(y < 0 || y >= W || xx < 0 || xx >= W)) s += wt[o][i][k] * in_p[i][y][xx];
        end
        exp[p] = s;
      end
      cmp_vec("conv", got, exp, 32);
    end
    $display("conv kernel: 16x16, %0d in / %0d out planes, %0d BLADE cycles", NI, NO, blade_cycles);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sha3_kernel(3);
    fir_kernel();
    conv_kernel();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
