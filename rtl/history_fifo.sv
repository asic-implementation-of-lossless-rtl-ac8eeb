// history_fifo: dictionary store of the decompressor.
// Words are written in arrival order at a write pointer that wraps over all
// 2**ADDR_W locations, exactly as the compressor fills its CAM, so the same
// address names the same word on both sides. Any location can be read at any
// time through rd_addr (combinational read). Reset clears the pointer and the
// contents. Reading it by address is what the decompressor needs; building it
// as a FIFO-ordered buffer is this design's reading of the FIFO drawn inside
// the decompressor.
module history_fifo #(
  parameter int unsigned DATA_W = xm_pkg::XM_DATA_W,
  parameter int unsigned ADDR_W = xm_pkg::XM_ADDR_W
) (
  input  logic              clk,
  input  logic              reset,     // synchronous, active high
  input  logic              push,
  input  logic [DATA_W-1:0] wr_data,
  output logic [ADDR_W-1:0] wr_ptr,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[wr_ptr] <= wr_data;
      wr_ptr      <= wr_ptr + 1'b1;
    end
  end
endmodule
