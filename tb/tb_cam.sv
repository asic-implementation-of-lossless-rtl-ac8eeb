// tb_cam: drives random writes, reads and search keys into the 4x4 CAM and
// compares the match lines and miss (combinational) and the registered read
// data with an array model. Keys are drawn from the stored words half of the
// time so both hits and misses occur. Reset must clear every match line,
// including those of rows that were written before it.
module tb_cam;
  localparam int W = 4, D = 4, AW = 2;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  logic          clk = 0, reset = 1, write = 0, read = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0]  wr_data = '0, rd_data, key = '0;
  logic [D-1:0]  match;
  logic          miss;

  logic [W-1:0]  m_word [D];
  logic [D-1:0]  m_valid;
  logic [W-1:0]  exp_rd;
  logic          rd_known = 1'b1;
  logic [D-1:0]  exp_match;

  cam dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_valid = '0;
    exp_rd  = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    key = 4'h0;
    #1 check(W'(match), '0, "match lines after reset");
    check(W'(miss), 1, "miss after reset");
    reset = 0;
    // fill every row, see each one match, then reset: none may match after
    for (int r = 0; r < D; r++) begin
      @(negedge clk);
      write = 1; wr_addr = AW'(r); wr_data = W'(r + 5);
    end
    @(negedge clk) write = 0;
    for (int r = 0; r < D; r++) begin
      key = W'(r + 5);
      #1 check(W'(match), W'(1 << r), "match line of a written row");
    end
    reset = 1;
    @(negedge clk) reset = 0;
    for (int r = 0; r < D; r++) begin
      key = W'(r + 5);
      #1 check(W'(match), '0, "match lines of reset rows");
      check(W'(miss), 1, "miss for reset rows");
    end
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      write   = $urandom % 2;
      read    = $urandom % 2;
      wr_addr = $urandom;
      rd_addr = $urandom;
      wr_data = $urandom;
      key     = ($urandom % 2) ? m_word[$urandom % D] : W'($urandom);
      #1;
      for (int r = 0; r < D; r++) exp_match[r] = m_valid[r] && (m_word[r] == key);
      check(W'(match), W'(exp_match), "match lines");
      check(W'(miss), W'(exp_match == '0), "miss");
      if (exp_match != '0) hits++; else misses++;
      @(posedge clk);
      // read sees the old word; a never-written word has no defined value
      if (read) begin
        rd_known = m_valid[rd_addr];
        exp_rd   = m_word[rd_addr];
      end
      if (write) begin
        m_word[wr_addr]  = wr_data;
        m_valid[wr_addr] = 1'b1;
      end
      #1 if (rd_known) check(rd_data, exp_rd, "read data");
    end
    checks++;
    if (hits == 0 || misses == 0) begin
      failures++;
      $display("FAIL hits %0d misses %0d", hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
