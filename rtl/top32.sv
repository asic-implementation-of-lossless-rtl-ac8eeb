// top32: lossless X-Match compression round trip.
// x1 (xmatch) compresses a stream of 32-bit words against a 64-word
// dictionary; each word leaves it as a compressed word (match flag, 6-bit
// dictionary address, and a literal only on a miss). x2 (dexmatch) rebuilds
// the original words from those compressed words with a dictionary of its
// own that it fills in the same order. dout therefore repeats data, in order,
// five clocks later (four in the compressor, one in the decompressor) at one
// word per clock. The instance names x1, x2 and the ports clk, rst, srt,
// data and dout are the design's own; the compressed link and the status
// flags are brought out as extra outputs so the compressed stream can be
// watched. The compressor's sig_address and read-back word are not needed
// here and stay unconnected inside (lint reports them as unused).
module top32 #(
  parameter int unsigned DATA_W     = xm_pkg::XM_DATA_W,
  parameter int unsigned ADDR_W     = xm_pkg::XM_ADDR_W,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              srt,          // data holds a word this cycle
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic              comp_valid,
  output logic              comp_hit,
  output logic [ADDR_W-1:0] comp_addr,
  output logic [DATA_W-1:0] comp_literal,
  output logic              sync_err,
  output logic              fifo_full
);
  logic [ADDR_W-1:0] sig_address;
  logic [DATA_W-1:0] readback;

  xmatch #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) x1 (
    .clk        (clk),
    .reset      (rst),
    .start      (srt),
    .data_in    (data),
    .fifo_full  (fifo_full),
    .out_valid  (comp_valid),
    .match_hit  (comp_hit),
    .sig_address(sig_address),
    .address    (comp_addr),
    .data_out   (readback),
    .literal    (comp_literal)
  );

  // Only the match flag, the address and the literal cross to the receiver;
  // the compressor's read-back word stays local.
  dexmatch #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) x2 (
    .clk      (clk),
    .reset    (rst),
    .start_de (comp_valid),
    .matchhit (comp_hit),
    .addrin   (comp_addr),
    .datain   (comp_literal),
    .dataout  (dout),
    .out_valid(dout_valid),
    .sync_err (sync_err)
  );
endmodule
