// dexmatch: De-X-Match decompressor, the receiver of the compressed words.
// For every compressed word (start_de high) the control unit chooses the
// output: on a match hit, the word stored at addrin in the local dictionary
// (history_fifo); on a miss, the literal datain, which is also appended to
// the dictionary so it mirrors the compressor's CAM. dataout is registered:
// it and out_valid change one clock after start_de. sync_err (registered
// with dataout) reports a miss whose address is not where the local
// dictionary would put the word.
module dexmatch #(
  parameter int unsigned DATA_W = xm_pkg::XM_DATA_W,
  parameter int unsigned ADDR_W = xm_pkg::XM_ADDR_W
) (
  input  logic              clk,
  input  logic              reset,      // synchronous, active high
  input  logic              start_de,   // compressed word valid
  input  logic              matchhit,
  input  logic [ADDR_W-1:0] addrin,
  input  logic [DATA_W-1:0] datain,
  output logic [DATA_W-1:0] dataout,
  output logic              out_valid,
  output logic              sync_err
);
  logic              push, sel_dict, load, err;
  logic [ADDR_W-1:0] wr_ptr;
  logic [DATA_W-1:0] dict_word;

  dx_control #(.ADDR_W(ADDR_W)) u_ctrl (
    .start_de(start_de),
    .matchhit(matchhit),
    .addrin  (addrin),
    .wr_ptr  (wr_ptr),
    .push    (push),
    .sel_dict(sel_dict),
    .load    (load),
    .sync_err(err)
  );

  history_fifo #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_dict (
    .clk    (clk),
    .reset  (reset),
    .push   (push),
    .wr_data(datain),
    .wr_ptr (wr_ptr),
    .rd_addr(addrin),
    .rd_data(dict_word)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      dataout   <= '0;
      out_valid <= 1'b0;
      sync_err  <= 1'b0;
    end else begin
      out_valid <= load;
      sync_err  <= err;
      if (load) dataout <= sel_dict ? dict_word : datain;
    end
  end
endmodule
