// Self-checking testbench of ilv_inverter_chain: for Vin = 1 and 0, every
// ILV i must receive Vin ^ i[0], for the default sub-chains of nine
// inverters, one unbroken chain (CHAIN_LEN=0, 11 ILVs) and sub-chains of
// four (heads on odd ILVs).
module tb_ilv_inverter_chain;
  int checks = 0, failures = 0;
  logic vin;
  logic [31:0] p32;
  logic [10:0] p11;
  logic [12:0] p13;

  ilv_inverter_chain #(.N_ILV(32), .CHAIN_LEN(9)) u_def (.vin(vin), .pattern(p32));
  ilv_inverter_chain #(.N_ILV(11), .CHAIN_LEN(0)) u_one (.vin(vin), .pattern(p11));
  ilv_inverter_chain #(.N_ILV(13), .CHAIN_LEN(4)) u_odd (.vin(vin), .pattern(p13));

  task automatic chk(int n, logic [31:0] got, string what);
    logic [31:0] exp = '0;
    for (int i = 0; i < n; i++) exp[i] = vin ^ i[0];
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s vin=%b: got %h expected %h", what, vin, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      vin = r[0] ? 1'b0 : 1'b1; #1;
      chk(32, p32, "chain9 x32");
      chk(11, {21'b0, p11}, "single chain x11");
      chk(13, {19'b0, p13}, "chain4 x13");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
