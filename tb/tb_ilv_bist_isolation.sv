// Self-checking testbench of ilv_bist_isolation: with test_en=1 the BIST
// sees the ILV outputs; with test_en=0 it sees the parked 1010... pattern
// whatever the ILVs carry.
module tb_ilv_bist_isolation;
  int checks = 0, failures = 0;
  logic en;
  logic [31:0] q, b;

  ilv_bist_isolation #(.N_ILV(32)) dut (.test_en(en), .ilv_q(q), .bist_q(b));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      q = $urandom; en = k[0]; #1;
      checks++;
      if (b !== (en ? q : 32'h5555_5555)) begin
        failures++;
        $display("FAIL en=%b q=%h got %h", en, q, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
