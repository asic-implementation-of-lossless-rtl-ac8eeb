// tb_dexmatch: feeds the decompressor a compressed stream produced by a
// compressor model in the testbench (64-entry dictionary, round-robin
// replacement, literal zeroed on hits) and checks that dataout reproduces
// the original words one clock after start_de. Near the end one miss is sent
// with a wrong address, which must raise sync_err; sync_err must stay low
// everywhere else.
module tb_dexmatch;
  localparam int DW = 32, AW = 6, D = 64, LAT = 1;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_err = 0;

  logic          clk = 0, reset = 1, start_de = 0, matchhit = 0;
  logic [AW-1:0] addrin = '0;
  logic [DW-1:0] datain = '0, dataout;
  logic          out_valid, sync_err;

  dexmatch dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] m_word [D];
  logic [D-1:0]  m_valid = '0;
  int            m_ptr = 0, cycle = 0;
  typedef struct { logic [DW-1:0] word; int cyc; logic err; } exp_t;
  exp_t exp_q[$];
  exp_t e;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at cycle %0d", what, got, exp, cycle);
    end
  endtask

  // compress one word with the model and drive it
  task automatic drive(input logic [DW-1:0] w, input logic corrupt);
    logic hit = 0;
    logic [AW-1:0] a = '0;
    for (int i = 0; i < D; i++) if (m_valid[i] && m_word[i] == w && !hit) begin
      hit = 1; a = AW'(i);
    end
    if (!hit) begin
      a = AW'(m_ptr);
      m_word[m_ptr] = w; m_valid[m_ptr] = 1'b1;
      m_ptr = (m_ptr + 1) % D;
    end
    start_de = 1; matchhit = hit; datain = hit ? '0 : w;
    addrin   = corrupt ? a + 1'b1 : a;
    if (hit) n_hit++; else n_miss++;
    exp_q.push_back('{word: w, cyc: cycle, err: corrupt});
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!reset && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        if (!e.err) check(dataout, e.word, "dataout");
        check(DW'(sync_err), DW'(e.err), "sync_err");
        check(cycle - e.cyc, LAT, "latency");
        if (sync_err) n_err++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if ($urandom % 5 != 0)
        drive(((n / 150) % 2 == 0) ? DW'($urandom % 24) : DW'($urandom), 1'b0);
      else
        start_de = 0;
    end
    // one corrupted miss: an address that is not the receiver's write pointer
    @(negedge clk) drive($urandom | 32'h8000_0000, 1'b1);
    @(negedge clk) start_de = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_hit == 0 || n_miss == 0 || n_err != 1) begin
      failures++;
      $display("FAIL left %0d hits %0d misses %0d sync errors %0d", exp_q.size(), n_hit, n_miss, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
