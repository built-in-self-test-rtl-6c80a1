// Self-checking testbench of ilv_bist_tier1: in functional mode the ILVs
// carry func_d; in test mode they carry 1010... for Vin=1 and 0101... for
// Vin=0, which appears 40 ps (two 20 ps buffer stages) after Vin changes.
module tb_ilv_bist_tier1;
  int checks = 0, failures = 0;
  logic vin, launch;
  logic [31:0] f, d;
  localparam logic [31:0] ALT1 = 32'h5555_5555;  // ILV i = 1 ^ i[0]: bit0 = 1

  ilv_bist_tier1 dut (.vin(vin), .launch(launch), .func_d(f), .ilv_d(d));

  task automatic chk(logic [31:0] exp, string what);
    checks++;
    if (d !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %t", what, d, exp, $time);
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
    vin = 1'b0; launch = 1'b0; f = 32'h1234_5678; #1ns;
    chk(f, "functional");
    f = 32'hdead_beef; #1ps; chk(f, "functional 2");
    launch = 1'b1; #1ps; chk(~ALT1, "test, vin=0");
    vin = 1'b1; #38ps; chk(~ALT1, "test, vin=1 before buffer delay");
    #3ps; chk(ALT1, "test, vin=1");
    vin = 1'b0; #41ps; chk(~ALT1, "test, vin=0 again");
    launch = 1'b0; #1ps; chk(f, "back to functional");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
