// bloomier_matcher: exact multi-string matcher built on a Bloomier filter.
//
// The matcher scans a byte stream for any of up to n stored strings of
// exactly L bytes, one byte per clock. It keeps the last L bytes in a data
// window and hashes the window with two independent hash functions (PH1,
// PH2, Pearson hashes). Each hash addresses one port of the lookup table;
// the XOR of the two words read is a pointer p(x) into the result table.
// For a stored string x the host has filled the lookup table so that this
// XOR is exactly x's index; for any other window it is some index. The
// result table returns the one candidate string at that index, and a
// full-width compare with the window decides the match. So the filter's
// false positives are all removed, while only one string is ever compared.
//
// Pipeline (byte accepted on edge E0):
//   E0  window shifts, last Pearson stage done       (register level 1)
//   E1  both lookup-table words read
//   E2  pointer = word_a ^ word_b registered         (register level 2)
//   E3  candidate string read from the result table
//   E4  out_valid / match / string_id valid
// One decision per accepted byte, 4 clocks after it. in_valid low pauses the
// window and the hashes; the back end keeps draining. out_valid is raised
// only once L bytes have been accepted since reset. string_id is the pointer
// and is meaningful only when match is high.
//
// Host interface: t_we[0]/t_we[1] load PH1's/PH2's permutation table,
// lut_* writes lookup-table words, rt_* writes result-table strings (rt_used
// marks an entry live). ihv_a is the initial hash value of PHE1 and PHE3,
// ihv_b that of PHE2 and PHE4. Tables may be rewritten while the stream
// runs; windows evaluated during a rewrite may use a mix of old and new
// contents.
//
// The data path (window, two PHs, dual-port lookup table, XOR, result table,
// comparator, two register levels) follows the published architecture. The
// exact register placement, the in_valid pause, the used bits and the host
// ports are this design's choices.
module bloomier_matcher #(
  parameter int unsigned STR_BYTES   = bsm_pkg::STR_BYTES_DEF,
  parameter int unsigned NUM_STRINGS = bsm_pkg::NUM_STRINGS_DEF,
  localparam int unsigned PTR_W      = bsm_pkg::ptr_width(NUM_STRINGS),
  localparam int unsigned LUT_AW     = bsm_pkg::lut_addr_width(NUM_STRINGS),
  localparam int unsigned WIN_W      = 8 * STR_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  // stream
  input  logic              in_valid,
  input  logic [7:0]        in_byte,
  // hash configuration
  input  logic [7:0]        ihv_a,
  input  logic [7:0]        ihv_b,
  input  logic [1:0]        t_we,
  input  logic [7:0]        t_addr,
  input  logic [7:0]        t_data,
  // lookup table load
  input  logic              lut_we,
  input  logic [LUT_AW-1:0] lut_addr,
  input  logic [PTR_W-1:0]  lut_data,
  // result table load
  input  logic              rt_we,
  input  logic [PTR_W-1:0]  rt_addr,
  input  logic [WIN_W-1:0]  rt_data,
  input  logic              rt_used,
  // result
  output logic              out_valid,
  output logic              match,
  output logic [PTR_W-1:0]  string_id
);

  // The hashes address the full 2n-word lookup table with log2(2n) bits,
  // and two Pearson bytes give at most 16 address bits.
  if ((NUM_STRINGS & (NUM_STRINGS - 1)) != 0 || NUM_STRINGS < 2 || LUT_AW > 16) begin : g_bad_size
    $error("bloomier_matcher: NUM_STRINGS must be a power of two from 2 to 32768");
  end

  // ---------------------------------------------------------------- E0
  logic [WIN_W-1:0]  window;
  logic              win_full;
  logic [LUT_AW-1:0] h1_addr, h2_addr;
  logic              acc_q;

  data_window #(.STR_BYTES(STR_BYTES)) u_window (
    .clk, .rst_n, .in_valid, .in_byte, .window, .full(win_full)
  );

  pearson_hash #(.STR_BYTES(STR_BYTES), .ADDR_W(LUT_AW)) u_ph1 (
    .clk, .in_valid, .in_byte, .ihv_a, .ihv_b,
    .t_we(t_we[0]), .t_addr, .t_data, .addr(h1_addr)
  );

  pearson_hash #(.STR_BYTES(STR_BYTES), .ADDR_W(LUT_AW)) u_ph2 (
    .clk, .in_valid, .in_byte, .ihv_a, .ihv_b,
    .t_we(t_we[1]), .t_addr, .t_data, .addr(h2_addr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) acc_q <= 1'b0;
    else        acc_q <= in_valid;
  end

  // A new, complete window was formed on the last edge.
  logic v0;
  assign v0 = acc_q & win_full;

  // ---------------------------------------------------------------- E1
  logic [PTR_W-1:0] lut_a, lut_b;

  lookup_table #(.DEPTH(2 * NUM_STRINGS), .WIDTH(PTR_W)) u_lut (
    .clk,
    .rd_addr_a(h1_addr), .rd_addr_b(h2_addr),
    .rd_data_a(lut_a),   .rd_data_b(lut_b),
    .wr_en(lut_we), .wr_addr(lut_addr), .wr_data(lut_data)
  );

  // ---------------------------------------------------------------- E2, E3
  logic [PTR_W-1:0] ptr_q, id_q;
  logic [WIN_W-1:0] win1_q, win2_q, win3_q;
  logic             v1_q, v2_q, v3_q;
  logic [WIN_W-1:0] cand;
  logic             cand_used;

  always_ff @(posedge clk) begin
    win1_q <= window;
    win2_q <= win1_q;
    win3_q <= win2_q;
    ptr_q  <= lut_a ^ lut_b;   // register level 2: the pointer p(x)
    id_q   <= ptr_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
      v3_q <= 1'b0;
    end else begin
      v1_q <= v0;
      v2_q <= v1_q;
      v3_q <= v2_q;
    end
  end

  result_table #(.DEPTH(NUM_STRINGS), .STR_BYTES(STR_BYTES)) u_rt (
    .clk, .rst_n,
    .rd_addr(ptr_q), .rd_data(cand), .rd_used(cand_used),
    .wr_en(rt_we), .wr_addr(rt_addr), .wr_data(rt_data), .wr_used(rt_used)
  );

  // ---------------------------------------------------------------- E4
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match     <= 1'b0;
      string_id <= '0;
    end else begin
      out_valid <= v3_q;
      match     <= v3_q & cand_used & (cand == win3_q);
      string_id <= id_q;
    end
  end

  // A match is only ever reported together with a valid decision.
  a_match_valid : assert property (@(posedge clk) disable iff (!rst_n) match |-> out_valid);

endmodule
