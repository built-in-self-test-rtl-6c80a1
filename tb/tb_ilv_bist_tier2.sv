// Self-checking testbench of ilv_bist_tier2: in test mode {Y1,Y2} must be
// {1,0} exactly when all neighbour ILVs differ and {0,1} otherwise; in
// functional mode it must stay {1,0} whatever the ILVs carry.
module tb_ilv_bist_tier2;
  int checks = 0, failures = 0;
  logic en, y1, y2;
  logic [31:0] q;

  ilv_bist_tier2 #(.N_ILV(32)) dut (.test_en(en), .ilv_q(q), .y1(y1), .y2(y2));

  function automatic logic all_differ(logic [31:0] v);
    for (int i = 0; i < 31; i++) if (v[i] == v[i+1]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic apply(logic e, logic [31:0] v);
    logic good;
    en = e; q = v; #1;
    good = !e || all_differ(v);
    checks++;
    if ({y1, y2} !== {good, ~good}) begin
      failures++;
      $display("FAIL en=%b q=%h got y1=%b y2=%b", e, v, y1, y2);
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
    for (int e = 0; e < 2; e++) begin
      apply(e[0], 32'h5555_5555);
      apply(e[0], 32'haaaa_aaaa);
      for (int i = 0; i < 32; i++) apply(e[0], 32'h5555_5555 ^ (32'h1 << i));
      for (int k = 0; k < 100; k++) apply(e[0], $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
