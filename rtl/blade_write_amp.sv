// blade_write_amp: write amplifier (WrA) and GWrL multiplexer of one BLADE
// slice.
//
// The write amplifier takes either the writeback value of the slice's
// bitline logic or external (host) data, and the GWrL multiplexer steers it
// onto the global write line pair of one of the MUX columns. Outputs are the
// data on each column's write line and a per-column write enable (only the
// selected column is written). Purely combinational; the cells capture the
// data on the clock edge.
//
// The choice between writeback and external data is described; the GWrL
// multiplexer is only named there, and its one-hot enable is this design's
// choice.
module blade_write_amp #(
  parameter int unsigned MUX = 4,
  localparam int unsigned SEL_W = $clog2(MUX)
) (
  input  logic             wr_en,
  input  logic             use_ext,
  input  logic             wb,
  input  logic             ext,
  input  logic [SEL_W-1:0] sel,
  output logic [MUX-1:0]   gwrl,
  output logic [MUX-1:0]   gwrl_en
);
  logic d;
  always_comb begin
    d       = use_ext ? ext : wb;
    gwrl    = {MUX{d}};
    gwrl_en = '0;
    if (wr_en) gwrl_en[sel] = 1'b1;
  end
endmodule
