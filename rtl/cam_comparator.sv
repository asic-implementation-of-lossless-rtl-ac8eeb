// cam_comparator: dictionary lookup of the X-Match compressor.
// Each valid input word is compared with every word of a CAM dictionary.
// Pipeline (one word per clock, three register stages):
//   edge 1  the input word is registered (s0);
//           during the next cycle the CAM match lines are evaluated for it;
//   edge 2  sig_address takes the match location on a hit, or the next free
//           slot on a miss, and on a miss the word is written there;
//   edge 3  address takes sig_address, match_hit the hit flag, and data_out
//           the word read back from the CAM at that address.
// So a word started at edge 1 appears on address/data_out/match_hit after
// edge 3, with out_valid high for one cycle; sig_address shows the same
// location one cycle earlier. The three-step timing and the port set follow
// the design's description of this cell; the round-robin write pointer (the
// oldest word is replaced once the dictionary is full), the lowest-address
// priority and the valid flags are this design's choices.
module cam_comparator #(
  parameter int unsigned DATA_W = xm_pkg::XM_DATA_W,
  parameter int unsigned ADDR_W = xm_pkg::XM_ADDR_W
) (
  input  logic              clk,
  input  logic              reset,      // synchronous, active high
  input  logic              start,      // data_in holds a word this cycle
  input  logic [DATA_W-1:0] data_in,
  output logic [ADDR_W-1:0] sig_address,
  output logic [ADDR_W-1:0] address,
  output logic [DATA_W-1:0] data_out,
  output logic              match_hit,
  output logic              out_valid
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  // stage 0: registered input
  logic              s0_valid;
  logic [DATA_W-1:0] s0_data;
  // stage 1: provisional address
  logic              s1_valid, s1_hit;
  // dictionary
  logic [DEPTH-1:0]  hits;
  logic              miss;
  logic [ADDR_W-1:0] hit_addr, wr_ptr;
  logic              write;

  cam #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_dict (
    .clk    (clk),
    .reset  (reset),
    .write  (write),
    .wr_addr(wr_ptr),
    .wr_data(s0_data),
    .read   (s1_valid),
    .rd_addr(sig_address),
    .rd_data(data_out),
    .key    (s0_data),
    .match  (hits),
    .miss   (miss)
  );

  // Priority encoder: lowest matching address.
  always_comb begin
    hit_addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (hits[i]) hit_addr = ADDR_W'(i);
    end
    write = s0_valid && miss;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      s0_valid    <= 1'b0;
      s0_data     <= '0;
      s1_valid    <= 1'b0;
      s1_hit      <= 1'b0;
      sig_address <= '0;
      wr_ptr      <= '0;
      out_valid   <= 1'b0;
      match_hit   <= 1'b0;
      address     <= '0;
    end else begin
      s0_valid <= start;
      if (start) s0_data <= data_in;

      s1_valid <= s0_valid;
      if (s0_valid) begin
        s1_hit      <= !miss;
        sig_address <= miss ? wr_ptr : hit_addr;
        if (miss) wr_ptr <= wr_ptr + 1'b1;
      end

      out_valid <= s1_valid;
      if (s1_valid) begin
        match_hit <= s1_hit;
        address   <= sig_address;
      end
    end
  end

  // At most one row can hold a given word, since words are only written on
  // a miss.
  assert property (@(posedge clk) disable iff (reset) s0_valid |-> $onehot0(hits))
    else $error("cam_comparator: more than one dictionary row matched");
endmodule
