// tb_data_window: checks the sliding window against a byte queue model.
// Random bytes with random pauses; after every edge the window must equal
// the last STR_BYTES accepted bytes (newest in the low byte) and `full`
// must rise exactly with the STR_BYTES-th byte. A second reset must empty it.
module tb_data_window;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_byte = 0;
  logic [8*L-1:0] window;
  logic full;
  int checks = 0, failures = 0;

  data_window #(.STR_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    byte unsigned q[$];
    logic [8*L-1:0] exp_w;
    for (int c = 0; c < n; c++) begin
      in_valid <= ($urandom_range(3, 0) != 0);
      in_byte  <= 8'($urandom);
      @(posedge clk); #1;
      if (in_valid) q.push_front(in_byte);
      exp_w = '0;
      for (int i = 0; i < L && i < q.size(); i++) exp_w[8*i +: 8] = q[i];
      checks++;
      if (window !== exp_w || full !== (q.size() >= L)) begin
        failures++;
        $display("cycle %0d: window %h exp %h full %b q %0d", c, window, exp_w, full, q.size());
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(500);
    rst_n <= 0; in_valid <= 0;
    @(posedge clk); #1;
    checks++;
    if (window !== '0 || full !== 1'b0) begin failures++; $display("reset did not clear"); end
    rst_n <= 1;
    run(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
