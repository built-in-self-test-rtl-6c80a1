// Self-checking testbench of ilv_launch_mux: with Launch=0 every ILV takes
// the functional bit, with Launch=1 the test bit; random data.
module tb_ilv_launch_mux;
  int checks = 0, failures = 0;
  logic launch;
  logic [31:0] f, t, d;

  ilv_launch_mux #(.N_ILV(32)) dut (.launch(launch), .func_d(f), .test_d(t), .ilv_d(d));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      f = $urandom; t = $urandom; launch = k[0]; #1;
      checks++;
      if (d !== (launch ? t : f)) begin
        failures++;
        $display("FAIL launch=%b f=%h t=%h got %h", launch, f, t, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
