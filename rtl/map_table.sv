// map_table: the reduced-size forward mapping table of ECC-Map.
//
// One entry per logical line address holds the compact mapping index
// cidx = i mod S (log2 S bits); together with the global base register the
// full index is recovered as i = base + ((cidx - base) mod S). Each entry
// also carries one "moved" bit used only while a catch-up is in progress: an
// entry counts as already moved when its bit equals the epoch the
// controller sets at the start of the catch-up, so no clearing pass is
// needed. The compact index per LLA follows the published architecture; the moved bit is
// this design's addition, needed because an LLA still at index base and one
// already moved to base+S have the same compact index.
//
// Interface: one combinational read port and one synchronous write port
// (written at the rising clock edge). The memory is not reset; the
// controller initialises every entry in its format pass.
module map_table #(
  parameter int unsigned K  = 819,   // number of logical lines
  parameter int unsigned S  = 32,    // window size
  parameter int unsigned AW = 10     // address width
) (
  input  logic                 clk,
  input  logic [AW-1:0]        rd_addr,
  output logic [$clog2(S)-1:0] rd_cidx,
  output logic                 rd_moved,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [$clog2(S)-1:0] wr_cidx,
  input  logic                 wr_moved
);

  localparam int unsigned SW = $clog2(S);

  logic [SW:0] mem [K];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < K)) mem[wr_addr] <= {wr_moved, wr_cidx};
  end

  logic [SW:0] rd_word;
  assign rd_word  = (32'(rd_addr) < K) ? mem[rd_addr] : '0;
  assign rd_cidx  = rd_word[SW-1:0];
  assign rd_moved = rd_word[SW];

endmodule
