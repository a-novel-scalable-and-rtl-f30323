// tb_result_table: checks reset of the used bits, writes of strings with
// used set and cleared, and the registered read of data and used bit at
// random addresses against a shadow model.
module tb_result_table;
  localparam int unsigned DEPTH = 32, L = 4, AW = 5;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_used = 0, rd_used;
  logic [AW-1:0] rd_addr = 0, wr_addr = 0;
  logic [8*L-1:0] rd_data, wr_data = 0;
  logic [8*L-1:0] sh_d [DEPTH];
  logic           sh_u [DEPTH];
  int checks = 0, failures = 0;

  result_table #(.DEPTH(DEPTH), .STR_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < DEPTH; a++) sh_u[a] = 0;
    // after reset nothing is used
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr <= AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_used !== 1'b0) begin failures++; $display("entry %0d used after reset", a); end
    end
    for (int c = 0; c < 2000; c++) begin
      logic [AW-1:0] ra, wa;
      logic we, wu;
      logic [8*L-1:0] wd;
      logic [8*L-1:0] ed;
      logic eu;
      ra = AW'($urandom); wa = AW'($urandom); we = $urandom_range(1, 0) == 1;
      wu = $urandom_range(3, 0) != 0; wd = $urandom;
      rd_addr <= ra; wr_en <= we; wr_addr <= wa; wr_data <= wd; wr_used <= wu;
      ed = sh_d[ra]; eu = sh_u[ra];
      @(posedge clk); #1;
      if (we) begin sh_d[wa] = wd; sh_u[wa] = wu; end
      checks++;
      if (rd_used !== eu || (eu && rd_data !== ed)) begin
        failures++;
        $display("@%0d: used %b data %h exp %b %h", ra, rd_used, rd_data, eu, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
