// flam_fb_module -- response feedback module of the FLAM-PUF LFSR.
//
// In the reconfigurable Galois LFSR every tap j normally feeds
// s_{j-1} XOR (g_j AND s_{n-1}) into register j. At the one tap chosen as the
// feedback point the AND gate is replaced by two 2-input NAND gates driven by
// the APUF's direct response r*:
//     tap = NAND(r*, NAND(s_{n-1}, s_{n-1})) = (NOT r*) OR s_{n-1}
// The register then receives s_{j-1} XOR tap, so
//     r* = 1 : s_j <= s_{j-1} XOR s_{n-1}   (behaves as coefficient g_j = 1)
//     r* = 0 : s_j <= NOT s_{j-1}           (register input inverted)
// which are the two cases the design specifies. The exact gate arrangement
// (the second NAND used as an inverter of s_{n-1}) is this implementation's
// reading; it is the arrangement that yields both cases from two NANDs.
// Purely combinational; the XOR into the register lives in flam_lfsr.
module flam_fb_module (
  input  logic r_fb,     // direct response r* of the APUF
  input  logic s_last,   // state of the last LFSR register s_{n-1}
  output logic tap       // value XORed into the register at the feedback point
);
  logic n_last;
  always_comb begin
    n_last = ~(s_last & s_last);  // NAND used as inverter
    tap    = ~(r_fb & n_last);    // NAND
  end
endmodule
