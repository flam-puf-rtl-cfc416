// tb_flam_shift_buffer -- random test of the serial-in response buffer.
// A reference queue records every bit shifted in; after each clock q[i] must
// equal the (i+1)-th of the last W bits received (zero-filled after a clear),
// and q_next must always predict the next value of q. Widths 7 and 1.
module tb_flam_shift_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       clear, shift, d;
  logic [6:0] q7, n7;
  logic [0:0] q1, n1;
  int checks = 0, failures = 0;

  flam_shift_buffer #(.W(7)) dut7 (.clk, .rst_n, .clear, .shift, .d, .q(q7), .q_next(n7));
  flam_shift_buffer #(.W(1)) dut1 (.clk, .rst_n, .clear, .shift, .d, .q(q1), .q_next(n1));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] m7;
  logic       m1;
  logic [6:0] pred7;
  logic       pred1;

  initial begin
    clear = 0; shift = 0; d = 0;
    m7 = '0; m1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      clear = ($urandom % 50) == 0;
      shift = ($urandom % 3) != 0;
      d     = $urandom % 2;
      // reference: newest bit at the top, oldest moves toward index 0
      if (clear)      begin m7 = '0; m1 = 0; end
      else if (shift) begin m7 = {d, m7[6:1]}; m1 = d; end
      #1;
      pred7 = n7; pred1 = n1[0];
      checks++;
      if (pred7 !== m7 || pred1 !== m1) begin
        failures++;
        $display("FAIL t=%0d q_next %b/%b expected %b/%b", t, pred7, pred1, m7, m1);
      end
      @(posedge clk); #1;
      checks++;
      if (q7 !== m7 || q1[0] !== m1) begin
        failures++;
        $display("FAIL t=%0d q %b/%b expected %b/%b", t, q7, q1, m7, m1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
