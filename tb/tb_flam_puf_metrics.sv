// tb_flam_puf_metrics -- uniformity, uniqueness and reliability of FLAM-PUF
// at the two evaluated sizes, 64 and 128 stages (reduced sample counts:
// 4 chips and 200 challenges of 64 or 128 response bits per size, with one
// noisy copy of chip 1 whose arbiter noise has a standard deviation of 0.1
// stage-delay units).
module tb_flam_puf_metrics;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bit f64, f128;
  int c64, c128, e64, e128;

  tb_flam_metrics_grp #(.N(64))  g64  (.clk, .rst_n, .finished(f64),  .checks(c64),  .failures(e64));
  tb_flam_metrics_grp #(.N(128)) g128 (.clk, .rst_n, .finished(f128), .checks(c128), .failures(e128));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (f64 && f128);
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c128, e64 + e128);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c128, e64 + e128 + 1);
    $finish;
  end
endmodule
