// End-to-end testbench of m3d_ilv_bist: three buses of 32 ILVs, sub-chains
// of nine inverters, two-stage delay buffers and a 2 GHz test clock. The
// vias are ilv_channel_model instances with injected faults. Each test run
// checks the two-cycle test time and, for every bus, the pass flag and
// diagnosis against a reference worked out here from the fault list (the
// ILV values for Vin=1 and Vin=0 and the neighbour comparisons). Functional
// traffic, the parked BIST inputs in functional mode, shorts, stuck-ats,
// hard and resistive opens, several faults at once, a short across a
// sub-chain boundary, stuck-ats inside the BIST-A tree that hide a short
// and a stuck-at ILV from Y1 and that BIST-B must expose,
// stuck-ats inside BIST-B, and the one escape of the method (all ILVs stuck
// at the test pattern) are each made to happen and counted.
module tb_m3d_ilv_bist;
  import ilv_bist_pkg::*;
  localparam int N  = 32;
  localparam int NB = 3;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_func = 0, n_parked = 0, n_pass = 0, n_short = 0, n_saf = 0, n_open = 0;
  int n_res_open = 0, n_multi = 0, n_boundary = 0, n_masked_caught = 0;
  int n_bistb_s1 = 0, n_bistb_s0 = 0, n_localised = 0, n_escape = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NB-1:0][N-1:0] func_tx, ilv_tx, ilv_rx, func_rx;
  logic [NB-1:0][N-1:0] sa0, sa1, oh, ov, ores, sh;
  logic busy, done;
  sig_t  [NB-1:0] sig_c1, sig_c2;
  logic  [NB-1:0] bus_pass;
  diag_e [NB-1:0] bus_diag;

  m3d_ilv_bist #(.N_ILV(N), .N_BUS(NB)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .func_tx(func_tx), .ilv_tx(ilv_tx), .ilv_rx(ilv_rx), .func_rx(func_rx),
    .busy(busy), .done(done), .sig_c1(sig_c1), .sig_c2(sig_c2),
    .bus_pass(bus_pass), .bus_diag(bus_diag));

  for (genvar b = 0; b < NB; b++) begin : g_via
    ilv_channel_model #(.N(N), .RES_DELAY_PS(480)) u_via (
      .tx(ilv_tx[b]), .sa0(sa0[b]), .sa1(sa1[b]), .open_hard(oh[b]), .open_val(ov[b]),
      .open_res(ores[b]), .short_nxt(sh[b]), .rx(ilv_rx[b]));
  end

  always #250ps clk = ~clk;  // 2 GHz

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  task automatic clear_faults;
    sa0 = '0; sa1 = '0; oh = '0; ov = '0; ores = '0; sh = '0;
  endtask

  // Reference: value at the far end of each via of bus b for a static drive.
  function automatic logic [N-1:0] ref_rx(int b, logic [N-1:0] tx);
    logic [N-1:0] base, rx;
    for (int i = 0; i < N; i++) begin
      base[i] = tx[i];
      if (oh[b][i])  base[i] = ov[b][i];
      if (sa0[b][i]) base[i] = 1'b0;
      if (sa1[b][i]) base[i] = 1'b1;
    end
    rx[0] = base[0];
    for (int i = 1; i < N; i++) rx[i] = sh[b][i-1] ? rx[i-1] : base[i];
    return rx;
  endfunction

  function automatic logic neighbours_differ(logic [N-1:0] v);
    for (int i = 0; i < N - 1; i++) if (v[i] == v[i+1]) return 1'b0;
    return 1'b1;
  endfunction

  // Expected diagnosis with a fault-free BIST (resistive opens excluded).
  function automatic diag_e ref_diag(int b);
    logic [N-1:0] p1, p0;
    logic g1, g0;
    for (int i = 0; i < N; i++) begin p1[i] = ~i[0]; p0[i] = i[0]; end
    g1 = neighbours_differ(ref_rx(b, p1));
    g0 = neighbours_differ(ref_rx(b, p0));
    if (!g1 && !g0) return DIAG_BOTH_CYCLE;
    if (!g1 || !g0) return DIAG_ONE_CYCLE;
    return DIAG_PASS;
  endfunction

  // Runs one test and returns the diagnosis; checks test time.
  task automatic run_test(output diag_e d [NB]);
    int cyc = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == 2, $sformatf("results right after the two launch cycles (got %0d cycles)", cyc + 1));
    for (int b = 0; b < NB; b++) d[b] = bus_diag[b];
    for (int b = 0; b < NB; b++) chk(bus_pass[b] == (d[b] == DIAG_PASS), "pass flag matches diagnosis");
  endtask

  // Runs a test and compares every bus with the reference.
  task automatic run_and_compare(string what);
    diag_e d [NB];
    run_test(d);
    for (int b = 0; b < NB; b++) begin
      diag_e e = ref_diag(b);
      chk(d[b] == e, $sformatf("%s: bus %0d diag %s expected %s", what, b, d[b].name(), e.name()));
    end
    if (d[0] == DIAG_PASS && d[1] == DIAG_PASS && d[2] == DIAG_PASS) n_pass++;
    if ((d[0] != DIAG_PASS) + (d[1] != DIAG_PASS) + (d[2] != DIAG_PASS) == 1) n_localised++;
  endtask

  initial begin
    #2us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    diag_e d [NB];
    clear_faults();
    func_tx = '0;
    #600ps rst_n = 1'b1;

    // Functional mode: data crosses the vias, the BIST inputs stay parked.
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) func_tx[b] = $urandom;
      #1ps;
      chk(func_rx == func_tx, "functional data crosses the vias");
      n_func++;
      chk(dut.g_bus[0].u_tier2.bist_q == 32'h5555_5555 && dut.g_bus[1].u_tier2.bist_q == 32'h5555_5555 &&
          dut.g_bus[2].u_tier2.bist_q == 32'h5555_5555, "BIST inputs parked in functional mode");
      chk(dut.g_bus[0].u_tier2.y1 && !dut.g_bus[0].u_tier2.y2, "compactor idle at a passing signature");
      n_parked++;
    end

    // Fault-free.
    run_and_compare("fault-free");

    // Hard short on bus 1.
    clear_faults(); sh[1][5] = 1'b1;
    run_and_compare("short");
    chk(bus_diag[1] == DIAG_BOTH_CYCLE, "short fails both cycles"); n_short++;

    // Stuck-at-0 on bus 0, stuck-at-1 on bus 2.
    clear_faults(); sa0[0][12] = 1'b1; sa1[2][31] = 1'b1;
    run_and_compare("stuck-at");
    chk(bus_diag[0] == DIAG_ONE_CYCLE && bus_diag[2] == DIAG_ONE_CYCLE, "stuck-at fails one cycle"); n_saf++;

    // Hard open on bus 2 holding 1.
    clear_faults(); oh[2][0] = 1'b1; ov[2][0] = 1'b1;
    run_and_compare("hard open");
    chk(bus_diag[2] == DIAG_ONE_CYCLE, "open fails one cycle"); n_open++;

    // Short across the boundary of the first two sub-chains (ILVs 9 and 10).
    clear_faults(); sh[0][9] = 1'b1;
    run_and_compare("boundary short");
    chk(bus_diag[0] == DIAG_BOTH_CYCLE, "boundary short detected"); n_boundary++;

    // Several faults on one bus.
    clear_faults(); sh[1][20] = 1'b1; oh[1][3] = 1'b1; ov[1][3] = 1'b0; sa1[1][27] = 1'b1;
    run_and_compare("multiple faults");
    chk(bus_diag[1] != DIAG_PASS, "multiple faults detected"); n_multi++;

    // Resistive open: the 480 ps RC delay plus the 40 ps buffer misses the 500 ps edge.
    clear_faults(); ores[1][9] = 1'b1;
    run_test(d);
    chk(d[1] != DIAG_PASS && d[0] == DIAG_PASS && d[2] == DIAG_PASS, "resistive open detected on bus 1 only");
    if (d[1] != DIAG_PASS) n_res_open++;

    // Short between ILVs 14 and 15 of bus 0. ILV 15 copies ILV 14, so it
    // equals both neighbours and the XORs 14 and 15 both read 0. A
    // stuck-at-1 on the first-level AND gate that joins those two XORs
    // hides the short from Y1; the dual path must flag it.
    clear_faults(); sh[0][14] = 1'b1;
    force dut.g_bus[0].u_tier2.u_bist_a.u_and_tree.lvl[1][7] = 1'b1;
    run_test(d);
    release dut.g_bus[0].u_tier2.u_bist_a.u_and_tree.lvl[1][7];
    chk(sig_c1[0].y1 && sig_c2[0].y1, "stuck XOR hides the short from Y1");
    chk(sig_c1[0].y1 && sig_c2[0].y1, "stuck AND node hides the short from Y1");
    chk(d[0] == DIAG_Y2_ONLY && sig_c1[0].y2 && sig_c2[0].y2, "BIST-A masking of a short exposed by Y2");
    if (d[0] == DIAG_Y2_ONLY) n_masked_caught++;

    // ILV 18 of bus 1 stuck-at-0, hidden from Y1 by a stuck-at-1 on the
    // second-level AND gate above XORs 16-19; Y2 must flag it.
    clear_faults(); sa0[1][18] = 1'b1;
    force dut.g_bus[1].u_tier2.u_bist_a.u_and_tree.lvl[2][4] = 1'b1;
    run_test(d);
    release dut.g_bus[1].u_tier2.u_bist_a.u_and_tree.lvl[2][4];
    chk(sig_c1[1].y1 && sig_c2[1].y1, "stuck AND node hides the stuck-at from Y1");
    chk(d[1] == DIAG_Y2_ONLY && sig_c1[1].y2 && !sig_c2[1].y2, "BIST-A masking of a stuck-at exposed by Y2");
    if (d[1] == DIAG_Y2_ONLY) n_masked_caught++;

    // Stuck-at-1 / stuck-at-0 inside BIST-B on fault-free vias.
    clear_faults();
    force dut.g_bus[2].u_tier2.y2 = 1'b1;
    run_test(d);
    release dut.g_bus[2].u_tier2.y2;
    chk(d[2] == DIAG_Y2_ONLY && d[0] == DIAG_PASS, "BIST-B stuck-at-1 flagged");
    if (d[2] == DIAG_Y2_ONLY) n_bistb_s1++;
    force dut.g_bus[2].u_tier2.y2 = 1'b0;
    run_test(d);
    release dut.g_bus[2].u_tier2.y2;
    chk(d[2] == DIAG_PASS, "BIST-B stuck-at-0 on good vias passes");
    if (d[2] == DIAG_PASS) n_bistb_s0++;

    // All vias of bus 2 stuck at the Vin=1 pattern: the known escape.
    clear_faults();
    for (int i = 0; i < N; i++) if (i % 2 == 0) sa1[2][i] = 1'b1; else sa0[2][i] = 1'b1;
    run_and_compare("alternating stuck-at escape");
    if (bus_diag[2] == DIAG_PASS) n_escape++;

    // Fault-free again, then functional traffic resumes.
    clear_faults();
    run_and_compare("fault-free again");
    @(negedge clk); func_tx[0] = 32'hcafe_f00d; #1ps;
    chk(func_rx[0] == 32'hcafe_f00d, "functional data after test");

    $display("mechanisms: func=%0d parked=%0d pass=%0d short=%0d saf=%0d open=%0d res_open=%0d multi=%0d boundary=%0d masked_caught=%0d bistb_s1=%0d bistb_s0=%0d localised=%0d escape=%0d",
             n_func, n_parked, n_pass, n_short, n_saf, n_open, n_res_open, n_multi, n_boundary,
             n_masked_caught, n_bistb_s1, n_bistb_s0, n_localised, n_escape);
    chk(n_func > 0 && n_parked > 0 && n_pass > 0 && n_short > 0 && n_saf > 0 && n_open > 0 &&
        n_res_open > 0 && n_multi > 0 && n_boundary > 0 && n_masked_caught > 0 &&
        n_bistb_s1 > 0 && n_bistb_s0 > 0 && n_localised > 0 && n_escape > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
