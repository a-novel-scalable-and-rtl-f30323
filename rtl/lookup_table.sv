// lookup_table: the Bloomier filter's lookup table.
//
// DEPTH = 2n words of WIDTH = log2(n) bits. A string x hashes to two words
// h1(x), h2(x); the host fills the table so that the XOR of the two words is
// the pointer p(x) to x in the result table. Both hash functions read in the
// same clock, one per port, as on a dual-port block RAM.
//
// Timing: reads are synchronous; the address presented before an edge gives
// its word on rd_data_a / rd_data_b after that edge. The host writes through
// a third port (wr_en, wr_addr, wr_data); a read of a word written on the
// same edge returns the old contents. The memory has no reset.
//
// Size, two read ports and registered reads follow the published design;
// the separate write port is this design's choice.
module lookup_table #(
  parameter int unsigned DEPTH  = 2 * bsm_pkg::NUM_STRINGS_DEF,
  parameter int unsigned WIDTH  = bsm_pkg::ptr_width(bsm_pkg::NUM_STRINGS_DEF),
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr_a,
  input  logic [AW-1:0]    rd_addr_b,
  output logic [WIDTH-1:0] rd_data_a,
  output logic [WIDTH-1:0] rd_data_b,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data_a <= mem[rd_addr_a];
    rd_data_b <= mem[rd_addr_b];
  end

endmodule
