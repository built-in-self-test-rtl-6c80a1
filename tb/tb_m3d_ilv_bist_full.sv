// Full-size testbench of m3d_ilv_bist with every parameter at its default
// (one bus of 32 ILVs, sub-chains of nine inverters, two-stage buffers),
// clocked at 2 GHz. Runs complete two-cycle tests on fault-free vias, with
// a short, with a stuck-at-0, with a hard open, and fault-free again, and
// checks the captured signatures, the diagnosis and the test time; it also
// checks functional traffic before and after.
module tb_m3d_ilv_bist_full;
  import ilv_bist_pkg::*;
  localparam int N = 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [0:0][N-1:0] func_tx, ilv_tx, ilv_rx, func_rx;
  logic [N-1:0] sa0, sa1, oh, ov, ores, sh;
  logic busy, done;
  sig_t  [0:0] sig_c1, sig_c2;
  logic  [0:0] bus_pass;
  diag_e [0:0] bus_diag;

  m3d_ilv_bist dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .func_tx(func_tx), .ilv_tx(ilv_tx), .ilv_rx(ilv_rx), .func_rx(func_rx),
    .busy(busy), .done(done), .sig_c1(sig_c1), .sig_c2(sig_c2),
    .bus_pass(bus_pass), .bus_diag(bus_diag));

  ilv_channel_model #(.N(N)) u_via (
    .tx(ilv_tx[0]), .sa0(sa0), .sa1(sa1), .open_hard(oh), .open_val(ov),
    .open_res(ores), .short_nxt(sh), .rx(ilv_rx[0]));

  always #250ps clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // One test; e1/e2 are the expected signatures of the Vin=1 / Vin=0 cycles.
  task automatic run(string what, sig_t e1, sig_t e2, diag_e ed);
    int cyc = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == 2, {what, ": results right after two launch cycles"});
    chk(sig_c1[0] == e1, {what, ": Vin=1 signature"});
    chk(sig_c2[0] == e2, {what, ": Vin=0 signature"});
    chk(bus_diag[0] == ed, $sformatf("%s: diagnosis %s expected %s", what, bus_diag[0].name(), ed.name()));
    chk(bus_pass[0] == (ed == DIAG_PASS), {what, ": pass flag"});
  endtask

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam sig_t GOOD = '{y1: 1'b1, y2: 1'b0};
  localparam sig_t BAD  = '{y1: 1'b0, y2: 1'b1};

  initial begin
    sa0 = '0; sa1 = '0; oh = '0; ov = '0; ores = '0; sh = '0;
    func_tx = '0;
    #600ps rst_n = 1'b1;
    @(negedge clk); func_tx[0] = 32'h0123_4567; #1ps;
    chk(func_rx[0] == 32'h0123_4567, "functional data");

    run("fault-free", GOOD, GOOD, DIAG_PASS);
    sh[17] = 1'b1;
    run("short 17-18", BAD, BAD, DIAG_BOTH_CYCLE);
    sh = '0; sa0[4] = 1'b1;   // ILV 4 should be 1 in the Vin=1 cycle
    run("stuck-at-0", BAD, GOOD, DIAG_ONE_CYCLE);
    sa0 = '0; oh[31] = 1'b1; ov[31] = 1'b1;  // ILV 31 should be 1 for Vin=0
    run("hard open", BAD, GOOD, DIAG_ONE_CYCLE);
    oh = '0;
    run("fault-free again", GOOD, GOOD, DIAG_PASS);

    @(negedge clk); func_tx[0] = 32'hfeed_beef; #1ps;
    chk(func_rx[0] == 32'hfeed_beef, "functional data after test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
