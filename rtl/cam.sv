// cam: content addressable memory.
// Like an SRAM it is written and read by address; in addition every word
// drives a match line that is high when the word equals the search key. The
// array is a row of registers, each with a valid bit, and each row compares
// itself with the key through a match_logic comparator (XOR, invert, AND over
// the word). miss is the NOR of all match lines. The 4-word by 4-bit default
// is the array the design is illustrated with; the compressor uses it at 64
// words of 32 bits.
// Timing: write at the clock edge when write is high; read data is
// registered (available the cycle after read); match and miss are
// combinational from key and the current contents, so a word written at an
// edge is matched from the next cycle on. Separate read and write addresses
// let one read and one write happen in the same cycle (a design choice; the
// textbook CAM has one address port). Reset clears the valid bits so empty
// rows never match; it does not clear the data.
module cam #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     write,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     read,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic [WIDTH-1:0]         key,
  output logic [DEPTH-1:0]         match,
  output logic                     miss
);
  logic [WIDTH-1:0] word  [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] equal;

  // One comparator per row: the match line of the row.
  for (genvar r = 0; r < DEPTH; r++) begin : g_row
    match_logic #(.WIDTH(WIDTH)) u_cmp (
      .a    (word[r]),
      .b    (key),
      .match(equal[r])
    );
  end

  always_comb begin
    match = equal & valid;
    miss  = ~|match;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      valid <= '0;
    end else if (write) begin
      valid[wr_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (write) word[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (reset)     rd_data <= '0;
    else if (read) rd_data <= word[rd_addr];
  end
endmodule
