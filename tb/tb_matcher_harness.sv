// tb_matcher_harness: the end-to-end stimulus of tb_bloomier_matcher as a
// parameterised harness, so that the matcher can be run at other string
// lengths (STR_BYTES) and string-set sizes (NUM_STRINGS). It does the same
// host setup (peeling, Eq. D[tau] = D[other] ^ p), streams STREAM_BYTES
// bytes and checks every decision, its latency and string_id; it raises
// `done` with its own check and failure counts instead of ending the run.
module tb_matcher_harness #(
  parameter int unsigned L = 16,
  parameter int unsigned N = 4096,
  parameter int unsigned STREAM_BYTES = 20000
) (
  output bit done,
  output int checks,
  output int failures
);
  import tb_bsm_pkg::*;

  localparam int unsigned PTR_W  = bsm_pkg::ptr_width(N);
  localparam int unsigned LUT_AW = bsm_pkg::lut_addr_width(N);
  localparam int unsigned M      = 2 * N;
  localparam int unsigned W      = 8 * L;
  localparam int unsigned LAT    = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_byte = 0;
  logic [7:0] ihv_a = 0, ihv_b = 0;
  logic [1:0] t_we = 0;
  logic [7:0] t_addr = 0, t_data = 0;
  logic lut_we = 0;
  logic [LUT_AW-1:0] lut_addr = 0;
  logic [PTR_W-1:0] lut_data = 0;
  logic rt_we = 0, rt_used = 0;
  logic [PTR_W-1:0] rt_addr = 0;
  logic [W-1:0] rt_data = 0;
  logic out_valid, match;
  logic [PTR_W-1:0] string_id;

  bloomier_matcher #(.STR_BYTES(L), .NUM_STRINGS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin done = 0; checks = 0; failures = 0; end
  int n_match = 0, n_fp_removed = 0, n_unused_ptr = 0, n_pause = 0, n_live_update = 0;
  int n_unencoded = 0;


  // ------------------------------------------------------------ host model
  perm_t p1, p2;
  logic [W-1:0]        strs  [N];
  logic [LUT_AW-1:0]   ha    [N];
  logic [LUT_AW-1:0]   hb    [N];
  logic [PTR_W-1:0]    dmem  [M];
  int                  deg   [M];
  int                  exor  [M];
  bit                  peeled[N];
  int                  tau   [N];
  int                  order [$];
  int                  ptr_of[N];      // result-table index, -1 if not loaded
  int                  loaded_idx [logic [W-1:0]];  // string -> index
  bit                  live  [N];      // index still used
  int                  n_loaded;

  function automatic logic [LUT_AW-1:0] hash_addr(input logic [W-1:0] s, input perm_t p);
    logic [15:0] j;
    j = {pearson_ref({{(512-W){1'b0}}, s}, L, p, ihv_a),
         pearson_ref({{(512-W){1'b0}}, s}, L, p, ihv_b)};
    return j[LUT_AW-1:0];
  endfunction

  // Returns the number of strings that could not be peeled.
  function automatic int try_setup();
    int q[$];
    int bad;
    for (int v = 0; v < M; v++) begin deg[v] = 0; exor[v] = 0; end
    order.delete();
    for (int e = 0; e < N; e++) begin
      ha[e] = hash_addr(strs[e], p1);
      hb[e] = hash_addr(strs[e], p2);
      peeled[e] = 0;
      if (ha[e] != hb[e]) begin
        deg[ha[e]]++; exor[ha[e]] ^= e;
        deg[hb[e]]++; exor[hb[e]] ^= e;
      end
    end
    for (int v = 0; v < M; v++) if (deg[v] == 1) q.push_back(v);
    while (q.size() > 0) begin
      int v, e, o;
      v = q.pop_front();
      if (deg[v] != 1) continue;
      e = exor[v];
      o = (int'(ha[e]) == v) ? int'(hb[e]) : int'(ha[e]);
      tau[e] = v; peeled[e] = 1; order.push_back(e);
      deg[v]--; exor[v] ^= e;
      deg[o]--; exor[o] ^= e;
      if (deg[o] == 1) q.push_back(o);
    end
    bad = N - order.size();
    return bad;
  endfunction

  task automatic host_setup();
    int bad;
    for (int e = 0; e < N; e++)
      for (int b = 0; b < L; b += 4) strs[e][8*b +: 32] = $urandom;
    make_perm(p1);
    make_perm(p2);
    for (int tries = 0; tries < 6; tries++) begin
      ihv_a = 8'($urandom); ihv_b = 8'($urandom);
      if (ihv_a == ihv_b) ihv_b = ~ihv_a;
      bad = try_setup();
      $display("L=%0d n=%0d setup try %0d: ihv %h/%h, %0d strings not encodable", L, N, tries, ihv_a, ihv_b, bad);
      if (bad <= N / 256) break;
    end
    n_unencoded = bad;
    // result-table indices in peel order, lookup words in reverse peel order
    n_loaded = 0;
    for (int e = 0; e < N; e++) ptr_of[e] = -1;
    foreach (order[i]) begin ptr_of[order[i]] = n_loaded; n_loaded++; end
    for (int v = 0; v < M; v++) dmem[v] = '0;
    for (int i = order.size() - 1; i >= 0; i--) begin
      int e, o;
      e = order[i];
      o = (int'(ha[e]) == tau[e]) ? int'(hb[e]) : int'(ha[e]);
      dmem[tau[e]] = dmem[o] ^ PTR_W'(ptr_of[e]);
    end
    for (int e = 0; e < N; e++) if (ptr_of[e] >= 0) begin
      loaded_idx[strs[e]] = ptr_of[e];
      live[ptr_of[e]] = 1;
    end
    // write the hardware
    for (int a = 0; a < 256; a++) begin
      t_we <= 2'b11; t_addr <= 8'(a); t_data <= p1[a];
      @(posedge clk);
      t_we <= 2'b10; t_data <= p2[a];
      @(posedge clk);
    end
    t_we <= 0;
    for (int v = 0; v < M; v++) begin
      lut_we <= 1; lut_addr <= LUT_AW'(v); lut_data <= dmem[v];
      @(posedge clk);
    end
    lut_we <= 0;
    for (int e = 0; e < N; e++) if (ptr_of[e] >= 0) begin
      rt_we <= 1; rt_addr <= PTR_W'(ptr_of[e]); rt_data <= strs[e]; rt_used <= 1;
      @(posedge clk);
    end
    rt_we <= 0;
    @(posedge clk);
  endtask

  // ------------------------------------------------------------ stream
  typedef struct { bit m; int id; int cyc; } exp_t;
  exp_t expq[$];
  int cyc = 0;
  int n_acc = 0;
  logic [W-1:0] hist = '0;
  byte unsigned src[$];

  // Pointer the filter decodes for a window (reference, from the host's D).
  function automatic int model_ptr(input logic [W-1:0] w);
    return int'(dmem[hash_addr(w, p1)] ^ dmem[hash_addr(w, p2)]);
  endfunction

  task automatic push_string(input logic [W-1:0] s);
    for (int b = L - 1; b >= 0; b--) src.push_back(s[8*b +: 8]);
  endtask

  initial begin
    int retired;
    logic [W-1:0] retired_str;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    host_setup();
    $display("L=%0d n=%0d: loaded %0d strings", L, N, n_loaded);

    // build the stream: filler, loaded strings, unloaded and corrupted ones
    while (src.size() < STREAM_BYTES) begin
      int kind, e;
      kind = $urandom_range(9, 0);
      repeat ($urandom_range(40, 0)) src.push_back(8'($urandom));
      e = $urandom_range(N - 1, 0);
      if (kind < 6 && ptr_of[e] >= 0) push_string(strs[e]);
      else if (kind < 8) begin
        logic [W-1:0] s;
        s = strs[e];
        s[8 * $urandom_range(L - 1, 0) +: 8] ^= 8'h01 << $urandom_range(7, 0);
        push_string(s);
      end else begin
        foreach (strs[x]) if (ptr_of[x] < 0) begin push_string(strs[x]); break; end
      end
    end
    // the string retired midway is placed after the retire point too
    retired = -1;
    for (int e = 0; e < N; e++) if (ptr_of[e] >= 0) begin retired = e; break; end
    retired_str = strs[retired];

    while (src.size() > 0 || expq.size() > 0) begin
      bit v;
      v = (src.size() > 0) && ($urandom_range(15, 0) != 0);
      if (v) in_byte <= src.pop_front();
      in_valid <= v;
      if (!v && src.size() > 0 && n_acc >= L) n_pause++;
      // live update: retire one string halfway through, stream it again
      if (src.size() == STREAM_BYTES / 2 && n_live_update == 0) begin
        rt_we <= 1; rt_addr <= PTR_W'(ptr_of[retired]); rt_data <= retired_str; rt_used <= 0;
        live[ptr_of[retired]] = 0;
        n_live_update++;
        for (int k = 0; k < 2; k++) begin
          repeat (5) src.push_front(8'($urandom));
          for (int b = 0; b < L; b++) src.push_front(retired_str[8*b +: 8]);
        end
        repeat (8) src.push_front(8'($urandom));
      end else rt_we <= 0;
      @(posedge clk); #1;
      cyc++;
      if (v) begin
        hist = {hist[W-9:0], in_byte};
        n_acc++;
        if (n_acc >= L) begin
          exp_t x;
          x.cyc = cyc;
          x.m = loaded_idx.exists(hist) && live[loaded_idx[hist]];
          x.id = x.m ? loaded_idx[hist] : -1;
          if (!x.m) begin
            int pp;
            pp = model_ptr(hist);
            if (pp < n_loaded && live[pp]) n_fp_removed++;
            else n_unused_ptr++;
          end
          expq.push_back(x);
        end
      end
      if (out_valid) begin
        exp_t x;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("cycle %0d: unexpected decision", cyc);
        end else begin
          x = expq.pop_front();
          if (cyc - x.cyc != LAT) begin
            failures++; $display("cycle %0d: latency %0d", cyc, cyc - x.cyc);
          end
          if (match !== x.m || (x.m && int'(string_id) != x.id)) begin
            failures++;
            if (failures < 20) $display("cycle %0d: match %b id %0d exp %b %0d", cyc, match, string_id, x.m, x.id);
          end
          if (x.m) n_match++;
        end
      end else if (expq.size() > 0 && cyc - expq[0].cyc > LAT) begin
        failures++; $display("cycle %0d: decision missing", cyc);
        void'(expq.pop_front());
      end
    end
    in_valid <= 0;

    $display("L=%0d n=%0d: matches=%0d fp_removed=%0d unused_ptr=%0d pauses=%0d live_updates=%0d unencodable=%0d",
             L, N, n_match, n_fp_removed, n_unused_ptr, n_pause, n_live_update, n_unencoded);
    checks += 5;
    if (n_match == 0)       begin failures++; $display("no match seen"); end
    if (n_fp_removed == 0)  begin failures++; $display("no false positive removed"); end
    if (n_unused_ptr == 0)  begin failures++; $display("no pointer to an unused entry"); end
    if (n_pause == 0)       begin failures++; $display("no input pause"); end
    if (n_live_update == 0) begin failures++; $display("no live update"); end
    $display("L=%0d n=%0d: checks=%0d failures=%0d", L, N, checks, failures);
    done = 1;
  end
endmodule
