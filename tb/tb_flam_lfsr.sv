// tb_flam_lfsr -- test of the reconfigurable Galois LFSR.
// Part 1: the 4-stage worked example. C = (s0..s3) = (0,1,1,0), G1 = (1,0,0),
//   feedback point between a_1 and a_2, direct responses r*_0..r*_2 = 0,1,0
//   must give C*_1 = (0,0,0,1), C*_2 = (1,1,1,0), C*_3 = (0,1,0,1); then with
//   G2 = (1,0,1) and r*_3 = 1 the Galois equations give C*_4 = (1,1,0,1).
// Part 2: a 32-stage LFSR with the feedback point at a_5 is stepped with
//   random coefficients, random responses, random stalls and reloads, and
//   compared every clock with the reference transition.
module tb_flam_lfsr;
  import tb_flam_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- 4-stage example ----
  logic       l4, st4, r4;
  logic [3:0] c4, s4;
  logic [3:1] g4;
  flam_lfsr #(.N(4), .FB_POS(2)) dut4 (.clk, .rst_n, .load(l4), .load_val(c4), .step(st4),
                                       .g(g4), .r_fb(r4), .state(s4));

  // ---- 32-stage random ----
  localparam int NB = 32, FB = 5;
  logic          lb, stb, rb;
  logic [NB-1:0] cb, sb;
  logic [NB-1:1] gb;
  flam_lfsr #(.N(NB), .FB_POS(FB)) dutb (.clk, .rst_n, .load(lb), .load_val(cb), .step(stb),
                                         .g(gb), .r_fb(rb), .state(sb));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check4(input logic [3:0] exp_s, input string what);
    checks++;
    // printed as (s0,s1,s2,s3)
    if (s4 !== exp_s) begin
      failures++;
      $display("FAIL %s: state (s0..s3) = %b%b%b%b expected %b%b%b%b", what,
               s4[0], s4[1], s4[2], s4[3], exp_s[0], exp_s[1], exp_s[2], exp_s[3]);
    end
  endtask

  vec_t model, gv;

  initial begin
    l4 = 0; st4 = 0; r4 = 0; c4 = '0; g4 = '0;
    lb = 0; stb = 0; rb = 0; cb = '0; gb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Part 1: bit j of the vector is s_j, so (s0,s1,s2,s3) = (0,1,1,0) is 4'b0110.
    @(negedge clk); l4 = 1; c4 = 4'b0110; g4 = 3'b001;   // G1: g_1 = 1
    @(negedge clk); l4 = 0; check4(4'b0110, "S0");
    st4 = 1; r4 = 0;
    @(negedge clk); check4(4'b1000, "C*_1");             // (0,0,0,1)
    r4 = 1;
    @(negedge clk); check4(4'b0111, "C*_2");             // (1,1,1,0)
    r4 = 0;
    @(negedge clk); check4(4'b1010, "C*_3");             // (0,1,0,1)
    g4 = 3'b101; r4 = 1;                                 // G2 = (1,0,1)
    @(negedge clk); check4(4'b1011, "C*_4");             // (1,1,0,1)
    st4 = 0;
    @(negedge clk); check4(4'b1011, "hold");

    // Part 2
    @(negedge clk); lb = 1; cb = NB'($urandom); model = '0; model[NB-1:0] = cb;
    @(negedge clk); lb = 0;
    for (int t = 0; t < 2000; t++) begin
      checks++;
      if (sb !== model[NB-1:0]) begin
        failures++;
        $display("FAIL t=%0d state %h expected %h", t, sb, model[NB-1:0]);
      end
      lb  = ($urandom % 97) == 0;
      stb = ($urandom % 5) != 0;
      rb  = $urandom % 2;
      gb  = (NB-1)'({$urandom, $urandom});
      cb  = NB'($urandom) | 1;
      gv = '0; gv[NB-1:1] = gb;
      if (lb)       begin model = '0; model[NB-1:0] = cb; end
      else if (stb) model = lfsr_ref(NB, model, gv, rb, FB);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
