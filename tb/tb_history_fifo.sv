// tb_history_fifo: pushes random words, more than the 64 locations so the
// write pointer wraps, and reads random addresses every cycle. Checks the
// write pointer, the read data against an array model, and that reset
// clears contents and pointer.
module tb_history_fifo;
  localparam int DW = 32, AW = 6, D = 64;
  int checks = 0, failures = 0, wraps = 0;

  logic          clk = 0, reset = 1, push = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [AW-1:0] wr_ptr, rd_addr = '0;
  logic [DW-1:0] m_mem [D];
  int            m_ptr = 0;

  history_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
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
    for (int i = 0; i < D; i++) m_mem[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      push    = $urandom % 3 != 0;
      wr_data = $urandom;
      rd_addr = $urandom;
      #1;
      check(DW'(wr_ptr), DW'(m_ptr), "write pointer");
      check(rd_data, m_mem[rd_addr], "read data");
      @(posedge clk);
      if (push) begin
        m_mem[m_ptr] = wr_data;
        m_ptr = (m_ptr + 1) % D;
        if (m_ptr == 0) wraps++;
      end
    end
    @(negedge clk) begin reset = 1; push = 0; end
    @(negedge clk) reset = 0;
    for (int i = 0; i < D; i++) begin
      rd_addr = AW'(i);
      #1 check(rd_data, '0, "contents after reset");
    end
    check(DW'(wr_ptr), 0, "pointer after reset");
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
