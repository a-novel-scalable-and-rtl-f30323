// tb_lookup_table: fills a small lookup table, then reads random address
// pairs on both ports every clock while writing random words, and checks
// each port's registered data against a shadow array (read-before-write on
// a same-edge collision).
module tb_lookup_table;
  localparam int unsigned DEPTH = 64, WIDTH = 6, AW = 6;
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] rd_addr_a = 0, rd_addr_b = 0, wr_addr = 0;
  logic [WIDTH-1:0] rd_data_a, rd_data_b, wr_data = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  lookup_table #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      shadow[a] = WIDTH'($urandom);
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= shadow[a];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int c = 0; c < 2000; c++) begin
      logic [WIDTH-1:0] ea, eb;
      logic [AW-1:0] ra, rb, wa;
      logic [WIDTH-1:0] wd;
      logic we;
      ra = AW'($urandom); rb = AW'($urandom);
      we = $urandom_range(1, 0) == 1; wa = AW'($urandom); wd = WIDTH'($urandom);
      if ($urandom_range(7, 0) == 0) wa = ra;
      rd_addr_a <= ra; rd_addr_b <= rb; wr_en <= we; wr_addr <= wa; wr_data <= wd;
      ea = shadow[ra]; eb = shadow[rb];
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      checks += 2;
      if (rd_data_a !== ea) begin failures++; $display("port a @%0d: %h exp %h", ra, rd_data_a, ea); end
      if (rd_data_b !== eb) begin failures++; $display("port b @%0d: %h exp %h", rb, rd_data_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
