// xmatch: X-Match compressor.
// Input words enter a FIFO; whenever it holds a word, the word is popped and
// looked up in the dictionary of the CAM comparator (whose rows compare
// through match_logic units). The result is a compressed word:
//   match_hit = 1  the word is in the dictionary at address; literal is 0 and
//                  need not be sent;
//   match_hit = 0  the word was new; it is now stored at address and is sent
//                  as literal.
// data_out is the word read back from the dictionary at address, equal to the
// input word in both cases. Only whole-word matches are found.
// Timing: a word presented with start at edge n is pushed into the FIFO at
// edge n, popped into the comparator at edge n+1, and its compressed word is
// valid (out_valid) after edge n+3, i.e. four clocks of latency at one word
// per clock. Nothing downstream stalls, so the FIFO never holds more than one
// word in normal use; fifo_full reports when a word would be lost.
module xmatch #(
  parameter int unsigned DATA_W     = xm_pkg::XM_DATA_W,
  parameter int unsigned ADDR_W     = xm_pkg::XM_ADDR_W,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              reset,      // synchronous, active high
  input  logic              start,      // data_in holds a word this cycle
  input  logic [DATA_W-1:0] data_in,
  output logic              fifo_full,
  output logic              out_valid,
  output logic              match_hit,
  output logic [ADDR_W-1:0] sig_address,
  output logic [ADDR_W-1:0] address,
  output logic [DATA_W-1:0] data_out,
  output logic [DATA_W-1:0] literal
);
  logic              fifo_empty, fifo_pop;
  logic [DATA_W-1:0] fifo_data;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk    (clk),
    .reset  (reset),
    .push   (start),
    .wr_data(data_in),
    .pop    (fifo_pop),
    .rd_data(fifo_data),
    .empty  (fifo_empty),
    .full   (fifo_full),
    .count  (fifo_count)
  );

  assign fifo_pop = !fifo_empty;

  cam_comparator #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_cmp (
    .clk        (clk),
    .reset      (reset),
    .start      (fifo_pop),
    .data_in    (fifo_data),
    .sig_address(sig_address),
    .address    (address),
    .data_out   (data_out),
    .match_hit  (match_hit),
    .out_valid  (out_valid)
  );

  assign literal = match_hit ? '0 : data_out;
endmodule
