// Self-checking testbench of bist_reduce_tree: AND and OR trees of several
// widths (including the default 31 inputs) against the reduction operators,
// with random and corner-case inputs (all ones, all zeros, one bit off).
module tb_bist_reduce_tree;
  int checks = 0, failures = 0;

  logic [30:0] d31;  logic ya31, yo31;
  logic [6:0]  d7;   logic ya7,  yo7;
  logic [0:0]  d1;   logic ya1;

  bist_reduce_tree #(.N_IN(31), .IS_OR(1'b0)) u_a31 (.d(d31), .y(ya31));
  bist_reduce_tree #(.N_IN(31), .IS_OR(1'b1)) u_o31 (.d(d31), .y(yo31));
  bist_reduce_tree #(.N_IN(7),  .IS_OR(1'b0)) u_a7  (.d(d7),  .y(ya7));
  bist_reduce_tree #(.N_IN(7),  .IS_OR(1'b1)) u_o7  (.d(d7),  .y(yo7));
  bist_reduce_tree #(.N_IN(1),  .IS_OR(1'b0)) u_a1  (.d(d1),  .y(ya1));

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic logic ref_and31(logic [30:0] v);
    for (int i = 0; i < 31; i++) if (!v[i]) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic ref_or31(logic [30:0] v);
    for (int i = 0; i < 31; i++) if (v[i]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive 7-input and 1-input trees.
    for (int v = 0; v < 128; v++) begin
      d7 = 7'(v); d1 = 1'(v); #1;
      chk(ya7, &d7, "and7");
      chk(yo7, |d7, "or7");
      chk(ya1, d1[0], "and1");
    end
    // 31-input trees: all ones, all zeros, each single bit off / on.
    d31 = '1; #1; chk(ya31, 1'b1, "and31 ones"); chk(yo31, 1'b1, "or31 ones");
    d31 = '0; #1; chk(ya31, 1'b0, "and31 zeros"); chk(yo31, 1'b0, "or31 zeros");
    for (int i = 0; i < 31; i++) begin
      d31 = '1; d31[i] = 1'b0; #1; chk(ya31, 1'b0, $sformatf("and31 bit %0d off", i));
      d31 = '0; d31[i] = 1'b1; #1; chk(yo31, 1'b1, $sformatf("or31 bit %0d on", i));
    end
    for (int k = 0; k < 200; k++) begin
      d31 = 31'($urandom) | ((k % 2 == 0) ? 31'($urandom) : 31'h0); #1;
      chk(ya31, ref_and31(d31), "and31 random");
      chk(yo31, ref_or31(d31), "or31 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
