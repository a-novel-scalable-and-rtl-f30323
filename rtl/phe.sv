// phe: Pearson's hashing element, pipelined in STR_BYTES (L) stages.
//
// Pearson's hash of a message C[1..L] is h[0] = IHV, h[i] = T[h[i-1] ^ C[i]],
// result h[L]. Here stage i is one register h[i] with its own copy of the
// 256x8 permutation table T, exactly one XOR and one table lookup per stage.
//
// Streaming: C[1] is taken to be the oldest byte of the window. A window
// whose last byte arrives at clock t had its byte C[i] arrive at clock
// t-L+i, which is also the clock at which stage i computes it. So every
// stage consumes the byte entering right now, and on each accepted byte
// stage L finishes the hash of the window that this byte completes. No
// second copy of the window is needed.
//
// Interface and timing: with in_valid high, the edge that accepts byte b
// leaves in `hash` the hash of the last L accepted bytes (b newest).
// With in_valid low the pipeline holds. The tables are loaded by the host
// through t_we/t_addr/t_data; one write updates all L copies. Tables and
// stage registers have no reset: the host loads the tables before use and
// the hash is valid once L bytes have passed.
//
// The stage structure, per-stage tables and IHV follow the published
// element; the byte order, the broadcast write port and the in_valid hold
// are this design's choices.
module phe #(
  parameter int unsigned STR_BYTES = bsm_pkg::STR_BYTES_DEF
) (
  input  logic       clk,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  input  logic [7:0] ihv,
  input  logic       t_we,
  input  logic [7:0] t_addr,
  input  logic [7:0] t_data,
  output logic [7:0] hash
);

  // One permutation table copy per stage.
  logic [7:0] tbl [STR_BYTES][256];
  // Stage registers h[1..L], stored at index 0..L-1.
  logic [7:0] h   [STR_BYTES];

  for (genvar s = 0; s < STR_BYTES; s++) begin : g_stage
    logic [7:0] prev;
    if (s == 0) begin : g_first
      assign prev = ihv;
    end else begin : g_next
      assign prev = h[s-1];
    end

    always_ff @(posedge clk) begin
      if (t_we) tbl[s][t_addr] <= t_data;
      if (in_valid) h[s] <= tbl[s][prev ^ in_byte];
    end
  end

  assign hash = h[STR_BYTES-1];

endmodule
