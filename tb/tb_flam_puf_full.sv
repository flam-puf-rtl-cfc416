// tb_flam_puf_full -- FLAM-PUF at its default size: 128 stages, final
// response of 128 bits from cycle 128 (256 clocks per evaluation).
// The top is instantiated with no parameter overrides; tb_flam_puf_drv
// checks every clock of twenty evaluations against the reference model, plus
// the all-zero refusal and a start while busy, and every mechanism must occur.
module tb_flam_puf_full;
  localparam int N = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done, err, r_out, r_valid;
  logic [N-1:0] challenge, response;

  flam_puf dut (.clk, .rst_n, .start, .challenge, .busy, .done, .err,
                .response, .r_out, .r_valid);

  bit fin;
  int ck, fl, ev, inv, xr, sw, gd, sec, zr, bi;
  int checks, failures;

  tb_flam_puf_drv #(.N(N), .NCHAL(20)) drv (
    .clk, .rst_n, .start, .challenge, .busy, .done, .err, .response, .r_out, .r_valid,
    .c_star(dut.c_star), .finished(fin), .checks(ck), .failures(fl), .n_eval(ev),
    .n_fb_inv(inv), .n_fb_xor(xr), .n_switch(sw), .n_g2_diff(gd), .n_second(sec),
    .n_zero_ref(zr), .n_busy_ign(bi));

  task automatic report(input int extra);
    int tot[8];
    tot = '{ev, inv, xr, sw, gd, sec, zr, bi};
    checks = ck; failures = fl + extra;
    $display("mechanisms: evaluations=%0d fb_invert=%0d fb_xor=%0d g1_to_g2=%0d g2_differs=%0d second_conf_steps=%0d zero_refused=%0d start_ignored=%0d",
             ev, inv, xr, sw, gd, sec, zr, bi);
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
    wait (fin);
    report(0);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
