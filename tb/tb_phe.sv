// tb_phe: checks one Pearson hashing element against the reference hash.
// Loads a random permutation, streams random bytes with pauses and, once
// STR_BYTES bytes have been accepted, compares `hash` after every edge with
// Pearson's hash of the last STR_BYTES bytes (oldest first). The table is
// then reloaded with a new permutation and a new IHV and checked again.
module tb_phe;
  import tb_bsm_pkg::*;
  localparam int unsigned L = 6;
  logic clk = 0, in_valid = 0, t_we = 0;
  logic [7:0] in_byte = 0, ihv = 0, t_addr = 0, t_data = 0, hash;
  int checks = 0, failures = 0;
  perm_t p;

  phe #(.STR_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input byte unsigned new_ihv);
    make_perm(p);
    for (int a = 0; a < 256; a++) begin
      t_we <= 1; t_addr <= 8'(a); t_data <= p[a];
      @(posedge clk);
    end
    t_we <= 0;
    ihv  <= new_ihv;
  endtask

  task automatic run(input int n);
    logic [511:0] hist = '0;
    int got = 0;
    for (int c = 0; c < n; c++) begin
      in_valid <= ($urandom_range(4, 0) != 0);
      in_byte  <= 8'($urandom);
      @(posedge clk); #1;
      if (in_valid) begin
        hist = {hist[503:0], in_byte};
        got++;
      end
      if (got >= L) begin
        byte unsigned e;
        e = pearson_ref(hist, L, p, ihv);
        checks++;
        if (hash !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: hash %h exp %h", c, hash, e);
        end
      end
    end
  endtask

  initial begin
    load(8'h00);
    run(1000);
    load(8'h5a);
    run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
