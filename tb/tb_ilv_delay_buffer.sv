// Self-checking testbench of the ilv_delay_buffer model: the output must
// hold its old value until NS*STAGE_DELAY after an input change and show
// the new one (inverted for odd NS) right after. NS = 2 (default, 40 ps)
// and NS = 3 are checked.
module tb_ilv_delay_buffer;
  int checks = 0, failures = 0;
  logic [31:0] a, y2, y3;

  ilv_delay_buffer #(.N_ILV(32))                     u2 (.a(a), .y(y2));
  ilv_delay_buffer #(.N_ILV(32), .NS(3), .STAGE_DELAY(20)) u3 (.a(a), .y(y3));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100ns;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] old;
    a = 32'h0; #1ns;
    for (int k = 0; k < 8; k++) begin
      old = a;
      a = $urandom;
      #39ps; chk(y2, old, "NS=2 before 40ps");
      #2ps;  chk(y2, a,   "NS=2 after 40ps");
      #17ps; chk(y3, ~old, "NS=3 before 60ps");
      #2ps;  chk(y3, ~a,  "NS=3 after 60ps");
      #200ps;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
