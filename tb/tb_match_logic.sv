// tb_match_logic: checks the equality comparator at its 2-bit default
// exhaustively and at 32 bits with random equal words, words that differ in
// one random bit, and fully random pairs; the expected result is a == b.
module tb_match_logic;
  int checks = 0, failures = 0;

  logic [1:0]  a2, b2;
  logic        m2;
  logic [31:0] a32, b32;
  logic        m32;

  match_logic              dut2  (.a(a2),  .b(b2),  .match(m2));
  match_logic #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .match(m32));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        #1 check(m2, i == j, $sformatf("2-bit %0d vs %0d", i, j));
      end
    end
    for (int n = 0; n < 300; n++) begin
      a32 = $urandom;
      case (n % 3)
        0: b32 = a32;
        1: b32 = a32 ^ (32'h1 << ($urandom % 32));
        default: b32 = $urandom;
      endcase
      #1 check(m32, a32 == b32, $sformatf("32-bit %h vs %h", a32, b32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
