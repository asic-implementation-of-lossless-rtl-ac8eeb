// fifo: synchronous first-in first-out buffer in front of the compressor.
// A circular array with read and write pointers one bit wider than the
// address, so full and empty are told apart by the extra bit. The head word
// is visible on rd_data while empty is low (first-word fall-through): pop
// removes it at the next clock edge. A push when full or a pop when empty is
// ignored. Depth and flag behaviour are this design's choice; the FIFO itself
// is only named as the first unit of the compressor.
module fifo #(
  parameter int unsigned WIDTH = xm_pkg::XM_DATA_W,
  parameter int unsigned DEPTH = 8   // must be a power of two
) (
  input  logic                       clk,
  input  logic                       reset,   // synchronous, active high
  input  logic                       push,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  always_comb begin
    count   = wr_ptr - rd_ptr;
    empty   = (wr_ptr == rd_ptr);
    full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
    do_push = push && !full;
    do_pop  = pop && !empty;
    rd_data = mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Storage needs no reset: a word is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("fifo: DEPTH must be a power of two, at least 2");
endmodule
