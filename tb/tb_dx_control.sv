// tb_dx_control: exhaustive over start_de and matchhit with random and equal
// address/write-pointer pairs; checks push, sel_dict, load and sync_err
// against their definitions.
module tb_dx_control;
  localparam int AW = 6;
  int checks = 0, failures = 0;

  logic          start_de, matchhit, push, sel_dict, load, sync_err;
  logic [AW-1:0] addrin, wr_ptr;

  dx_control dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (start_de %0b hit %0b addr %0d ptr %0d)",
               what, got, exp, start_de, matchhit, addrin, wr_ptr);
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
    for (int n = 0; n < 400; n++) begin
      start_de = n[0];
      matchhit = n[1];
      wr_ptr   = $urandom;
      addrin   = n[2] ? wr_ptr : AW'($urandom);
      #1;
      check(load, start_de, "load");
      check(sel_dict, start_de && matchhit, "sel_dict");
      check(push, start_de && !matchhit, "push");
      check(sync_err, start_de && !matchhit && (addrin != wr_ptr), "sync_err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
