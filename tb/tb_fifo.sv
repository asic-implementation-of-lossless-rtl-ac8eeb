// tb_fifo: random pushes and pops against a queue model. Checks the head
// word, empty, full and count every cycle, including pushes into a full FIFO
// and pops from an empty one (both must be ignored). Counts that the FIFO was
// seen full and empty at least once.
module tb_fifo;
  localparam int W = 32, D = 8;
  int checks = 0, failures = 0;
  int seen_full = 0, seen_empty = 0;

  logic         clk = 0, reset = 1, push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         empty, full;
  logic [$clog2(D):0] count;
  logic [W-1:0] q[$];
  bit           was_full, was_empty;

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, balanced
      case ((n / 100) % 3)
        0: begin push = ($urandom % 4) != 0; pop = ($urandom % 4) == 0; end
        1: begin push = ($urandom % 4) == 0; pop = ($urandom % 4) != 0; end
        default: begin push = $urandom % 2; pop = $urandom % 2; end
      endcase
      wr_data = $urandom;
      #1;
      check(empty, q.size() == 0, "empty");
      check(full, q.size() == D, "full");
      check(count, q.size(), "count");
      if (q.size() > 0) check(rd_data, q[0], "head");
      if (q.size() == D) seen_full++;
      if (q.size() == 0) seen_empty++;
      @(posedge clk);
      // the FIFO ignores a push when full even if it pops in the same cycle
      was_full  = (q.size() == D);
      was_empty = (q.size() == 0);
      if (pop && !was_empty) void'(q.pop_front());
      if (push && !was_full) q.push_back(wr_data);
    end
    checks++;
    if (seen_full == 0 || seen_empty == 0) begin
      failures++;
      $display("FAIL full seen %0d, empty seen %0d", seen_full, seen_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
