// blade_top: L1 data array extended with BLADE bitline computing.
//
// NUM_SUB subarrays of 256 bitlines x 64 wordlines (2 kB each; 16 give the
// 32 kB L1 data cache) execute the same micro-op in lock step, driven by one
// BLADE controller. Each subarray has 64 bitline-logic slices, so one BLADE
// command works on 64 x NUM_SUB bits at once: 1024 bitwise or 128 8-bit lane
// operations with the default size.
//
// Interface: a command (blade_pkg::blade_cmd_t) is accepted when cmd_valid
// and cmd_ready are both high; it runs from the next cycle and done pulses in
// its last cycle, with cycles giving its length. Host WRITE stores a 64-bit
// word into (subarray, row, column); host READ returns the word on rd_data
// in its done cycle. All other commands act on the same rows and column of
// every subarray.
//
// NUM_SUB can be raised to 64 (a 128 KiB array); host access addresses
// subarrays with a 6-bit field.
//
// The subarray size, the number of subarrays and the shared controller
// follow the described cache; the cache controller, tags and the processor
// around it are outside this design, and host access here is by 64-bit word.
module blade_top #(
  parameter int unsigned NUM_SUB = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  blade_pkg::blade_cmd_t cmd,
  output logic                  done,
  output logic [7:0]            cycles,
  output logic [63:0]           rd_data
);
  import blade_pkg::*;

  blade_uop_t  uop;
  logic [63:0] ext_data;
  logic        wr_all;
  logic [5:0]  host_sub;
  logic [63:0] sa_data [NUM_SUB];

  blade_controller #(.ROWS(64), .LG_ROWS(32), .SLICES(64)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_valid(cmd_valid),
    .cmd_ready(cmd_ready),
    .cmd      (cmd),
    .uop      (uop),
    .ext_data (ext_data),
    .wr_all   (wr_all),
    .host_sub (host_sub),
    .done     (done),
    .cycles   (cycles)
  );

  for (genvar s = 0; s < NUM_SUB; s++) begin : g_sub
    blade_subarray #(.BLS(256), .ROWS(64), .LG_ROWS(32), .MUX(4)) u_sub (
      .clk     (clk),
      .rst_n   (rst_n),
      .uop     (uop),
      .wr_sel  (wr_all || (32'(host_sub) == s)),
      .ext_data(ext_data),
      .sa_data (sa_data[s])
    );
  end

  always_comb begin
    rd_data = '0;
    for (int s = 0; s < NUM_SUB; s++)
      if (32'(host_sub) == s) rd_data = sa_data[s];
  end
endmodule
