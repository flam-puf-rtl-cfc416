// tb_flam_puf -- end-to-end test of FLAM-PUF in three reduced configurations.
//   A: 8 stages, 1-bit final response at cycle N+1 (the attack-evaluation form)
//   B: 16 stages, 16-bit final response from cycle 2N, feedback point at a_7,
//      a denser initial coefficient set G1
//   C: 4 stages, 4-bit response from cycle N (the worked-example configuration)
// Each instance is checked clock by clock against the reference model by
// tb_flam_puf_drv. Every mechanism (inverting and XOR feedback, G1 -> G2
// switch with a G2 different from G1, secondary confusion, all-zero refusal,
// start ignored while busy) must occur at least once.
module tb_flam_puf;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NA = 8,  KA = 9,  MA = 1;
  localparam int NB = 16, KB = 32, MB = 16;
  localparam int NC = 4,  KC = 4,  MC = 4;
  localparam logic [NB-1:1] G1B = 15'h2a51;

  logic sa, sb, sc, ba, bb, bc, da, db, dc, ea, eb, ec, ra, rb, rc, va, vb, vc;
  logic [NA-1:0] ca; logic [NB-1:0] cb; logic [NC-1:0] cc;
  logic [MA-1:0] qa; logic [MB-1:0] qb; logic [MC-1:0] qc;

  flam_puf #(.N(NA), .K(KA), .M(MA), .SEED(3)) dut_a (
    .clk, .rst_n, .start(sa), .challenge(ca), .busy(ba), .done(da), .err(ea),
    .response(qa), .r_out(ra), .r_valid(va));
  flam_puf #(.N(NB), .K(KB), .M(MB), .FB_POS(7), .G1(G1B), .SEED(11)) dut_b (
    .clk, .rst_n, .start(sb), .challenge(cb), .busy(bb), .done(db), .err(eb),
    .response(qb), .r_out(rb), .r_valid(vb));
  flam_puf #(.N(NC), .K(KC), .M(MC), .SEED(5)) dut_c (
    .clk, .rst_n, .start(sc), .challenge(cc), .busy(bc), .done(dc), .err(ec),
    .response(qc), .r_out(rc), .r_valid(vc));

  bit fa, fb, fc;
  int ck[3], fl[3], ev[3], inv[3], xr[3], sw[3], gd[3], sec[3], zr[3], bi[3];

  tb_flam_puf_drv #(.N(NA), .K(KA), .M(MA), .SEED(3), .NCHAL(60)) drv_a (
    .clk, .rst_n, .start(sa), .challenge(ca), .busy(ba), .done(da), .err(ea),
    .response(qa), .r_out(ra), .r_valid(va), .c_star(dut_a.c_star), .finished(fa),
    .checks(ck[0]), .failures(fl[0]), .n_eval(ev[0]), .n_fb_inv(inv[0]), .n_fb_xor(xr[0]),
    .n_switch(sw[0]), .n_g2_diff(gd[0]), .n_second(sec[0]), .n_zero_ref(zr[0]), .n_busy_ign(bi[0]));
  tb_flam_puf_drv #(.N(NB), .K(KB), .M(MB), .FB_POS(7), .G1(G1B), .SEED(11), .NCHAL(30)) drv_b (
    .clk, .rst_n, .start(sb), .challenge(cb), .busy(bb), .done(db), .err(eb),
    .response(qb), .r_out(rb), .r_valid(vb), .c_star(dut_b.c_star), .finished(fb),
    .checks(ck[1]), .failures(fl[1]), .n_eval(ev[1]), .n_fb_inv(inv[1]), .n_fb_xor(xr[1]),
    .n_switch(sw[1]), .n_g2_diff(gd[1]), .n_second(sec[1]), .n_zero_ref(zr[1]), .n_busy_ign(bi[1]));
  tb_flam_puf_drv #(.N(NC), .K(KC), .M(MC), .SEED(5), .NCHAL(40)) drv_c (
    .clk, .rst_n, .start(sc), .challenge(cc), .busy(bc), .done(dc), .err(ec),
    .response(qc), .r_out(rc), .r_valid(vc), .c_star(dut_c.c_star), .finished(fc),
    .checks(ck[2]), .failures(fl[2]), .n_eval(ev[2]), .n_fb_inv(inv[2]), .n_fb_xor(xr[2]),
    .n_switch(sw[2]), .n_g2_diff(gd[2]), .n_second(sec[2]), .n_zero_ref(zr[2]), .n_busy_ign(bi[2]));

  int checks, failures;

  task automatic report();
    int tot[8];
    checks = 0; failures = 0;
    tot = '{default: 0};
    for (int i = 0; i < 3; i++) begin
      checks += ck[i]; failures += fl[i];
      tot[0] += ev[i]; tot[1] += inv[i]; tot[2] += xr[i]; tot[3] += sw[i];
      tot[4] += gd[i]; tot[5] += sec[i]; tot[6] += zr[i]; tot[7] += bi[i];
    end
    $display("mechanisms: evaluations=%0d fb_invert=%0d fb_xor=%0d g1_to_g2=%0d g2_differs=%0d second_conf_steps=%0d zero_refused=%0d start_ignored=%0d",
             tot[0], tot[1], tot[2], tot[3], tot[4], tot[5], tot[6], tot[7]);
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (tot[m] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fa && fb && fc);
    report();
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
