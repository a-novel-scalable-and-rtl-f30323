// pearson_hash: one hashing block (PH) of the matcher.
//
// A PH is two Pearson's hashing elements that see the same byte stream and
// hold the same permutation table, but start from different initial hash
// values (ihv_a, ihv_b); running Pearson's hash twice with different IHVs
// is the usual way to widen its one-byte result. The two bytes are joined as
// {first, second} and the low ADDR_W = log2(2n) bits address the lookup
// table.
//
// Timing is that of `phe`: the edge that accepts a byte leaves in `addr` the
// hash of the window that byte completes (this is register level 1 of the
// matcher). t_we writes the permutation table of both elements.
//
// Two PHEs per PH and the log2(2n)-bit address follow the published design;
// the byte order of the concatenation is this design's choice.
module pearson_hash #(
  parameter int unsigned STR_BYTES = bsm_pkg::STR_BYTES_DEF,
  parameter int unsigned ADDR_W    = bsm_pkg::lut_addr_width(bsm_pkg::NUM_STRINGS_DEF)
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic [7:0]        in_byte,
  input  logic [7:0]        ihv_a,
  input  logic [7:0]        ihv_b,
  input  logic              t_we,
  input  logic [7:0]        t_addr,
  input  logic [7:0]        t_data,
  output logic [ADDR_W-1:0] addr
);

  logic [7:0] hash_a, hash_b;
  logic [15:0] joined;

  phe #(.STR_BYTES(STR_BYTES)) u_phe_a (
    .clk, .in_valid, .in_byte, .ihv(ihv_a),
    .t_we, .t_addr, .t_data, .hash(hash_a)
  );

  phe #(.STR_BYTES(STR_BYTES)) u_phe_b (
    .clk, .in_valid, .in_byte, .ihv(ihv_b),
    .t_we, .t_addr, .t_data, .hash(hash_b)
  );

  assign joined = {hash_a, hash_b};
  assign addr   = joined[ADDR_W-1:0];

  initial begin
    assert (ADDR_W >= 1 && ADDR_W <= 16)
      else $error("pearson_hash: ADDR_W must be 1..16 (two hash bytes)");
  end

endmodule
