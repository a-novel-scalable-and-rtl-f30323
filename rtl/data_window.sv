// data_window: the L-byte sliding window over the input stream.
//
// Each accepted byte enters at position 1 and every byte moves one position
// up; the byte at position L leaves. Byte i of the window (1 = newest,
// L = oldest) sits at bits [8i-1:8i-8] of `window`, so the window reads as a
// little-endian vector whose lowest byte is the most recent one.
//
// Timing: on a clock edge with in_valid high the window shifts; it holds
// otherwise. `full` rises on the edge that accepts the STR_BYTES-th byte
// after reset and stays high, so the rest of the matcher never reports a
// window that still contains reset zeros.
//
// The shift register and its numbering follow the published block diagram;
// the hold on in_valid low, the reset and the `full` flag are this design's.
module data_window #(
  parameter int unsigned STR_BYTES = bsm_pkg::STR_BYTES_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [7:0]             in_byte,
  output logic [8*STR_BYTES-1:0] window,
  output logic                   full
);

  localparam int unsigned CNT_W = $clog2(STR_BYTES + 1);

  logic [CNT_W-1:0] fill_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window   <= '0;
      fill_cnt <= '0;
      full     <= 1'b0;
    end else if (in_valid) begin
      window <= {window[8*STR_BYTES-9:0], in_byte};
      if (!full) begin
        fill_cnt <= fill_cnt + 1'b1;
        if (fill_cnt == CNT_W'(STR_BYTES - 1)) full <= 1'b1;
      end
    end
  end

endmodule
