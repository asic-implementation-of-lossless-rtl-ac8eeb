// tb_cam_comparator: streams words into the dictionary comparator at its
// default size (32-bit words, 64 entries) and checks each result against a
// dictionary model kept in the testbench: match_hit, address, data_out and
// sig_address (which must show the address one cycle before address), and
// a latency of exactly three clocks from start to out_valid. The stream
// begins with the document's example word 2 repeated, then mixes words from
// a small alphabet (hits) with fresh words (misses) and runs long enough to
// wrap the 64-entry dictionary, so replacement of old entries is exercised.
module tb_cam_comparator;
  localparam int DW = 32, AW = 6, D = 64, LAT = 3;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_replace = 0;

  logic          clk = 0, reset = 1, start = 0;
  logic [DW-1:0] data_in = '0, data_out;
  logic [AW-1:0] sig_address, address;
  logic          match_hit, out_valid;

  cam_comparator dut (.*);

  always #5 clk = ~clk;

  // reference dictionary
  logic [DW-1:0] m_word [D];
  logic [D-1:0]  m_valid = '0;
  int            m_ptr = 0;
  typedef struct { logic hit; logic [AW-1:0] addr; logic [DW-1:0] word; int cyc; } exp_t;
  exp_t exp_q[$];
  int cycle = 0;

  function automatic exp_t model(input logic [DW-1:0] w, input int cyc);
    exp_t e;
    e.hit = 0; e.addr = '0; e.word = w; e.cyc = cyc;
    for (int i = 0; i < D; i++) if (m_valid[i] && m_word[i] == w && !e.hit) begin
      e.hit = 1; e.addr = AW'(i);
    end
    if (!e.hit) begin
      if (m_valid[m_ptr]) n_replace++;
      e.addr = AW'(m_ptr);
      m_word[m_ptr] = w; m_valid[m_ptr] = 1'b1;
      m_ptr = (m_ptr + 1) % D;
    end
    return e;
  endfunction

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at cycle %0d", what, got, exp, cycle);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // monitor: sig_address one cycle ahead, then the result. An input taken at
  // the edge where cycle reads k is produced by the third edge (k, k+1, k+2)
  // and so is sampled here with cycle reading k+LAT.
  logic [AW-1:0] sig_prev;
  exp_t          e;
  always @(posedge clk) begin
    sig_prev <= sig_address;
    if (!reset && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        check(DW'(match_hit), DW'(e.hit), "match_hit");
        check(DW'(address), DW'(e.addr), "address");
        check(DW'(sig_prev), DW'(e.addr), "sig_address one cycle earlier");
        check(data_out, e.word, "data_out");
        check(cycle - e.cyc, LAT, "latency");
        if (e.hit) n_hit++; else n_miss++;
      end
    end
  end

  task automatic send(input logic [DW-1:0] w);
    @(negedge clk);
    start = 1; data_in = w;
    exp_q.push_back(model(w, cycle));
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // the example: 2, then 2 again
    send(32'd2); send(32'd2);
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      start = ($urandom % 5) != 0;
      if (start) begin
        data_in = ((n / 150) % 2 == 0) ? DW'($urandom % 24) : $urandom;
        exp_q.push_back(model(data_in, cycle));
      end
    end
    @(negedge clk) start = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_hit == 0 || n_miss == 0 || n_replace == 0) begin
      failures++;
      $display("FAIL left %0d, hits %0d, misses %0d, replacements %0d", exp_q.size(), n_hit, n_miss, n_replace);
    end
    $display("hits %0d misses %0d replacements %0d", n_hit, n_miss, n_replace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
