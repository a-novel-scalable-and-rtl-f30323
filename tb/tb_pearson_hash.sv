// tb_pearson_hash: checks one PH block. Both elements share a permutation
// and differ by IHV; the lookup address must be the low ADDR_W bits of
// {hash(ihv_a), hash(ihv_b)} of the last STR_BYTES bytes, checked after
// every accepted byte with the default ADDR_W of 15.
module tb_pearson_hash;
  import tb_bsm_pkg::*;
  localparam int unsigned L  = 5;
  localparam int unsigned AW = 15;
  logic clk = 0, in_valid = 0, t_we = 0;
  logic [7:0] in_byte = 0, ihv_a = 8'h3c, ihv_b = 8'hc5, t_addr = 0, t_data = 0;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  perm_t p;

  pearson_hash #(.STR_BYTES(L), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [511:0] hist = '0;
    int got = 0;
    make_perm(p);
    for (int a = 0; a < 256; a++) begin
      t_we <= 1; t_addr <= 8'(a); t_data <= p[a];
      @(posedge clk);
    end
    t_we <= 0;
    for (int c = 0; c < 3000; c++) begin
      in_valid <= ($urandom_range(5, 0) != 0);
      in_byte  <= 8'($urandom);
      @(posedge clk); #1;
      if (in_valid) begin hist = {hist[503:0], in_byte}; got++; end
      if (got >= L) begin
        logic [15:0] e;
        e = {pearson_ref(hist, L, p, ihv_a), pearson_ref(hist, L, p, ihv_b)};
        checks++;
        if (addr !== e[AW-1:0]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: addr %h exp %h", c, addr, e[AW-1:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
