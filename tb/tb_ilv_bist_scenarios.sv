// Fault scenarios of the method's circuit-level evaluation, replayed at
// logic level: one bus of 11 ILVs tested at 2 GHz, with the enhanced BIST
// (two-stage delay buffers) and, beside it, the same BIST without buffers.
//   I   fault-free
//   II  two hard shorts, each between the ILVs of a different adjacent pair
//   III two hard opens on two different ILVs
//   IV  a resistive short and a resistive open on two different ILVs
// plus V, a resistive open alone. The resistive open is a 480 ps RC delay;
// a resistive short inside the detectable range is taken as a short. The
// enhanced BIST must flag II-V and pass I; without buffers the lone
// resistive open (480 ps < 500 ps clock period) escapes, which is what the
// buffers are for.
module tb_ilv_bist_scenarios;
  import ilv_bist_pkg::*;
  localparam int N = 11;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [0:0][N-1:0] func_tx;
  logic [0:0][N-1:0] tx_e, rx_e, tx_p, rx_p, frx_e, frx_p;
  logic [N-1:0] sa0, sa1, oh, ov, ores, sh;
  logic busy_e, done_e, busy_p, done_p;
  sig_t  [0:0] s1_e, s2_e, s1_p, s2_p;
  logic  [0:0] pass_e, pass_p;
  diag_e [0:0] diag_e_q, diag_p_q;

  m3d_ilv_bist #(.N_ILV(N), .N_BUS(1), .CHAIN_LEN(0), .NS(2)) u_enh (
    .clk(clk), .rst_n(rst_n), .start(start), .func_tx(func_tx), .ilv_tx(tx_e), .ilv_rx(rx_e),
    .func_rx(frx_e), .busy(busy_e), .done(done_e), .sig_c1(s1_e), .sig_c2(s2_e),
    .bus_pass(pass_e), .bus_diag(diag_e_q));
  m3d_ilv_bist #(.N_ILV(N), .N_BUS(1), .CHAIN_LEN(0), .NS(0)) u_plain (
    .clk(clk), .rst_n(rst_n), .start(start), .func_tx(func_tx), .ilv_tx(tx_p), .ilv_rx(rx_p),
    .func_rx(frx_p), .busy(busy_p), .done(done_p), .sig_c1(s1_p), .sig_c2(s2_p),
    .bus_pass(pass_p), .bus_diag(diag_p_q));

  ilv_channel_model #(.N(N), .RES_DELAY_PS(480)) u_via_e (
    .tx(tx_e[0]), .sa0(sa0), .sa1(sa1), .open_hard(oh), .open_val(ov), .open_res(ores),
    .short_nxt(sh), .rx(rx_e[0]));
  ilv_channel_model #(.N(N), .RES_DELAY_PS(480)) u_via_p (
    .tx(tx_p[0]), .sa0(sa0), .sa1(sa1), .open_hard(oh), .open_val(ov), .open_res(ores),
    .short_nxt(sh), .rx(rx_p[0]));

  always #250ps clk = ~clk;  // 2 GHz test clock

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  task automatic run(string what, logic exp_fail_enh, logic exp_fail_plain);
    int cyc = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done_e) begin @(negedge clk); cyc++; end
    chk(cyc == 2, {what, ": two-cycle test"});
    chk(done_p, {what, ": both BISTs finish together"});
    chk(pass_e[0] == !exp_fail_enh, $sformatf("%s: enhanced BIST %s (Y1Y2 = %b%b, %b%b)", what,
        pass_e[0] ? "passes" : "fails", s1_e[0].y1, s1_e[0].y2, s2_e[0].y1, s2_e[0].y2));
    chk(pass_p[0] == !exp_fail_plain, $sformatf("%s: BIST without buffers %s", what,
        pass_p[0] ? "passes" : "fails"));
    $display("scenario %s: enhanced {Y1,Y2} = %b%b / %b%b -> %s", what, s1_e[0].y1, s1_e[0].y2,
             s2_e[0].y1, s2_e[0].y2, diag_e_q[0].name());
  endtask

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa0 = '0; sa1 = '0; oh = '0; ov = '0; ores = '0; sh = '0;
    func_tx = '0;
    #600ps rst_n = 1'b1;

    run("I fault-free", 1'b0, 1'b0);
    sh[1] = 1'b1; sh[6] = 1'b1;
    run("II two hard shorts", 1'b1, 1'b1);
    sh = '0; oh[3] = 1'b1; ov[3] = 1'b0; oh[8] = 1'b1; ov[8] = 1'b1;
    run("III two hard opens", 1'b1, 1'b1);
    oh = '0; sh[4] = 1'b1; ores[9] = 1'b1;
    run("IV resistive short and open", 1'b1, 1'b1);
    sh = '0;
    run("V resistive open alone", 1'b1, 1'b0);
    ores = '0;
    run("I fault-free again", 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
