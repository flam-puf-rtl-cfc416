// flam_shift_buffer -- serial-in, parallel-out buffer for direct responses.
//
// Used twice in FLAM-PUF:
//   * as the response buffer: during the first confusion it collects the
//     direct responses r*_1..r*_{N-1}; its parallel contents are then the
//     coefficient set G2 = (r*_1..r*_{N-1}) of the secondary confusion;
//   * as the final-response register collecting R = (r*_k .. r*_{k+M-1}).
// A bit shifted in enters at the top (index W-1) and moves down one place per
// shift, so after W shifts the first bit is at index 0 and the last at W-1:
// q[i] holds the (i+1)-th bit received. `clear` empties the buffer.
// Timing: one bit per clock while `shift` is high; `q` is registered.
// `q_next` shows the contents as they will be after this cycle's shift, which
// lets the LFSR use the complete G2 on the very cycle the last bit arrives.
// The design states only that a buffer collects and feeds back the bits; the
// shift-register form, clear and look-ahead output are this design's choice.
module flam_shift_buffer #(
  parameter int unsigned W = flam_pkg::N_DEFAULT - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift,
  input  logic         d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_next
);

  logic [W-1:0] shifted;

  if (W > 1) begin : g_wide
    assign shifted = {d, q[W-1:1]};
  end else begin : g_one
    assign shifted = d;
  end

  always_comb begin
    if (clear)      q_next = '0;
    else if (shift) q_next = shifted;
    else            q_next = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

endmodule
