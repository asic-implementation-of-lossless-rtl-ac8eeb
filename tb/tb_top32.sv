// tb_top32: end-to-end test of the compression round trip at the default
// sizes (32-bit words, 64-entry dictionaries, 8-word input FIFO).
// It first sends the example stream 1, 2, 3, 4, 5 and expects the same five
// words back, then a long stream that mixes repeats (dictionary hits), fresh
// words (misses), more distinct words than the dictionary holds (replacement
// of the oldest entry), back-to-back words and idle cycles. Every word must
// come back unchanged, in order, five clocks after it went in; the link must
// carry a zero literal on hits and the word itself on misses; sync_err and
// fifo_full must never rise. Each mechanism is counted and one that never
// happened is a failure. The size of the compressed stream is reported with
// a hit costing 1+6 bits and a miss 1+6+32 bits.
module tb_top32;
  localparam int DW = 32, AW = 6, D = 64, LAT = 5;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_replace = 0, n_idle = 0, n_burst = 0;
  longint bits_in = 0, bits_out = 0;

  logic          clk = 0, rst = 1, srt = 0;
  logic [DW-1:0] data = '0, dout, comp_literal;
  logic          dout_valid, comp_valid, comp_hit, sync_err, fifo_full;
  logic [AW-1:0] comp_addr;

  top32 dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic [DW-1:0] word; int cyc; } exp_t;
  exp_t exp_q[$], e;
  logic [DW-1:0] lit_q[$], w_link;
  int   cycle = 0;
  logic prev_srt = 0;
  // model of the dictionary fill, only to count replacements
  logic [DW-1:0] m_word [D];
  logic [D-1:0]  m_valid = '0;
  int            m_ptr = 0;
  logic          m_hit;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at cycle %0d", what, got, exp, cycle);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // link monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (sync_err)  begin checks++; failures++; $display("FAIL sync_err at cycle %0d", cycle); end
      if (fifo_full) begin checks++; failures++; $display("FAIL fifo_full at cycle %0d", cycle); end
      if (comp_valid) begin
        w_link = lit_q.pop_front();
        check(comp_literal, comp_hit ? '0 : w_link, "literal on the link");
        if (comp_hit) begin n_hit++;  bits_out += 1 + AW; end
        else          begin n_miss++; bits_out += 1 + AW + DW; end
      end
    end
  end

  // output monitor
  always @(posedge clk) begin
    if (!rst && dout_valid) begin
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        check(dout, e.word, "dout");
        check(cycle - e.cyc, LAT, "latency");
      end
    end
  end

  task automatic put(input logic [DW-1:0] w);
    srt = 1; data = w;
    exp_q.push_back('{word: w, cyc: cycle});
    lit_q.push_back(w);
    bits_in += DW;
    if (prev_srt) n_burst++;
    m_hit = 0;
    for (int i = 0; i < D; i++) if (m_valid[i] && m_word[i] == w) m_hit = 1;
    if (!m_hit) begin
      if (m_valid[m_ptr]) n_replace++;
      m_word[m_ptr] = w; m_valid[m_ptr] = 1'b1;
      m_ptr = (m_ptr + 1) % D;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // the example stream, twice: five misses, then five hits
    for (int r = 0; r < 2; r++)
      for (int i = 1; i <= 5; i++) begin
        @(negedge clk) put(DW'(i));
        prev_srt = srt;
      end
    @(negedge clk) begin srt = 0; prev_srt = 0; n_idle++; end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL example stream incomplete"); end
    // mixed stream
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom % 6 == 0) begin
        srt = 0; n_idle++;
      end else begin
        case ((n / 250) % 3)
          0: put(DW'($urandom % 40));         // small alphabet: mostly hits
          1: put($urandom);                   // fresh words: misses, replacement
          default: put(DW'($urandom % 100));  // larger than the dictionary
        endcase
      end
      prev_srt = srt;
    end
    @(negedge clk) srt = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words never came out", exp_q.size()); end
    $display("hits %0d misses %0d replacements %0d back-to-back %0d idle %0d",
             n_hit, n_miss, n_replace, n_burst, n_idle);
    $display("compressed %0d bits of input into %0d bits", bits_in, bits_out);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_replace == 0 || n_burst == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
