// Self-checking testbench of bist_b_compactor, BIST-B (XNOR/OR): the output must
// be 0 exactly when every pair of adjacent ILVs differs. Checked on both
// alternating patterns, every single flipped ILV, every equal neighbour pair
// and random words, for 32 and 11 ILVs.
module tb_bist_b_compactor;
  int checks = 0, failures = 0;
  logic [31:0] q32; logic [10:0] q11;
  logic o32, o11;

  bist_b_compactor #(.N_ILV(32)) u32 (.ilv_q(q32), .y2(o32));
  bist_b_compactor #(.N_ILV(11)) u11 (.ilv_q(q11), .y2(o11));

  function automatic logic expect_out(logic [31:0] v, int n);
    for (int i = 0; i < n - 1; i++) if (v[i] == v[i+1]) return ~1'b0;
    return 1'b0;
  endfunction

  task automatic apply(logic [31:0] v, string what);
    q32 = v; q11 = v[10:0]; #1;
    checks += 2;
    if (o32 !== expect_out(v, 32)) begin failures++; $display("FAIL %s x32 v=%h got %b", what, v, o32); end
    if (o11 !== expect_out({21'b0, v[10:0]}, 11)) begin failures++; $display("FAIL %s x11 v=%h got %b", what, v, o11); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h5555_5555, "alt 1010");
    apply(32'haaaa_aaaa, "alt 0101");
    for (int i = 0; i < 32; i++) begin
      apply(32'h5555_5555 ^ (32'h1 << i), "one ILV flipped");
      apply(32'haaaa_aaaa ^ (32'h1 << i), "one ILV flipped");
    end
    apply('0, "all 0"); apply('1, "all 1");
    for (int k = 0; k < 300; k++) apply($urandom, "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
