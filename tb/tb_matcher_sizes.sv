// tb_matcher_sizes: runs the matcher end to end at other points of the
// storage study: strings of 16, 48 and 64 bytes and string sets of 4k, 8k
// and 32k (the largest set the 16-bit two-PHE hash can address). Each run
// is a tb_matcher_harness with its own host setup and byte stream; the
// result sums their checks and failures.
module tb_matcher_sizes;
  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;
  int checks, failures;
  bit clk = 0;

  always #5 clk = ~clk;

  tb_matcher_harness #(.L(16), .N(4096),  .STREAM_BYTES(20000)) u_l16_n4k  (.done(d0), .checks(c0), .failures(f0));
  tb_matcher_harness #(.L(48), .N(8192),  .STREAM_BYTES(20000)) u_l48_n8k  (.done(d1), .checks(c1), .failures(f1));
  tb_matcher_harness #(.L(64), .N(32768), .STREAM_BYTES(20000)) u_l64_n32k (.done(d2), .checks(c2), .failures(f2));

  initial begin
    fork
      begin
        wait (d0 && d1 && d2);
        checks = c0 + c1 + c2; failures = f0 + f1 + f2;
      end
      begin
        repeat (3_000_000) @(posedge clk);
        checks = c0 + c1 + c2; failures = f0 + f1 + f2 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
