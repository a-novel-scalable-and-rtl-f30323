// result_table: the stored strings, one per pointer value.
//
// DEPTH = n entries of STR_BYTES*8 bits. The pointer decoded from the lookup
// table selects the one candidate string that the window could be; the
// matcher then compares it with the window, which removes every false
// positive of the Bloomier filter. Each entry also carries a `used` bit so
// that an entry the host never loaded cannot match.
//
// Timing: synchronous read, one word per clock (rd_data and rd_used valid
// after the edge that samples rd_addr). Host write port wr_en/wr_addr/
// wr_data/wr_used; wr_used = 0 retires an entry. Reset clears the used bits,
// not the strings.
//
// The table's size and its role follow the published design; the used bit
// and the separate write port are this design's choices.
module result_table #(
  parameter int unsigned DEPTH     = bsm_pkg::NUM_STRINGS_DEF,
  parameter int unsigned STR_BYTES = bsm_pkg::STR_BYTES_DEF,
  localparam int unsigned AW       = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [AW-1:0]          rd_addr,
  output logic [8*STR_BYTES-1:0] rd_data,
  output logic                   rd_used,
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic [8*STR_BYTES-1:0] wr_data,
  input  logic                   wr_used
);

  logic [8*STR_BYTES-1:0] mem  [DEPTH];
  logic [DEPTH-1:0]       used;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used    <= '0;
      rd_used <= 1'b0;
    end else begin
      if (wr_en) used[wr_addr] <= wr_used;
      rd_used <= used[rd_addr];
    end
  end

endmodule
