// Self-checking testbench of ilv_bist_controller with three buses. It plays
// given Y1/Y2 values for the Vin=1 and Vin=0 cycles, then checks the launch
// sequence (Launch high two cycles, Vin 1 then 0), the two-cycle test time,
// the captured signatures, and the pass flag and diagnosis of each bus
// against ilv_bist_pkg's rule computed here independently.
module tb_ilv_bist_controller;
  import ilv_bist_pkg::*;
  int checks = 0, failures = 0;
  localparam int NB = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NB-1:0] y1, y2;
  logic launch, vin, test_en, busy, done;
  sig_t [NB-1:0] s1, s2;
  logic [NB-1:0] pass;
  diag_e [NB-1:0] diag;

  ilv_bist_controller #(.N_BUS(NB)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y1(y1), .y2(y2),
    .launch(launch), .vin(vin), .test_en(test_en), .busy(busy), .done(done),
    .sig_c1(s1), .sig_c2(s2), .bus_pass(pass), .bus_diag(diag));

  always #250ps clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // Values the receiving tier would show while Vin=1 (a) and Vin=0 (b).
  logic [NB-1:0] a1, a2, b1, b2;
  always_comb begin
    y1 = (launch && vin) ? a1 : b1;
    y2 = (launch && vin) ? a2 : b2;
  end

  function automatic logic [1:0] ref_diag(logic c1y1, logic c1y2, logic c2y1, logic c2y2);
    if (c1y1 == 0 && c2y1 == 0) return 2'd2;
    if (c1y1 == 0 || c2y1 == 0) return 2'd1;
    if (c1y2 == 1 || c2y2 == 1) return 2'd3;
    return 2'd0;
  endfunction

  task automatic run_test;
    int cyc;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    chk(launch && vin && test_en && busy && !done, "cycle 1: Launch=1, Vin=1");
    @(negedge clk);
    chk(launch && !vin && test_en && busy, "cycle 2: Launch=1, Vin=0");
    @(negedge clk);
    chk(!launch && !busy && done, "done two cycles after start");
    for (int b = 0; b < NB; b++) begin
      chk(s1[b] == '{y1: a1[b], y2: a2[b]}, $sformatf("bus %0d cycle-1 signature", b));
      chk(s2[b] == '{y1: b1[b], y2: b2[b]}, $sformatf("bus %0d cycle-2 signature", b));
      chk(2'(diag[b]) == ref_diag(a1[b], a2[b], b1[b], b2[b]), $sformatf("bus %0d diagnosis", b));
      chk(pass[b] == (a1[b] && !a2[b] && b1[b] && !b2[b]), $sformatf("bus %0d pass", b));
    end
    // Results hold while idle.
    @(negedge clk); @(negedge clk);
    chk(done && !launch, "results held");
  endtask

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '1; a2 = '0; b1 = '1; b2 = '0;
    #600ps rst_n = 1'b1;
    chk(!launch && !busy && !done, "idle after reset");
    // All good.
    run_test();
    // Bus 0 fails cycle 2 only, bus 1 both cycles, bus 2 only Y2.
    a1 = 3'b011; a2 = 3'b100; b1 = 3'b010; b2 = 3'b000;
    run_test();
    for (int k = 0; k < 20; k++) begin
      {a1, a2, b1, b2} = 12'($urandom);
      run_test();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
