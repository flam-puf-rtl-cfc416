// flam_ctrl -- sequencing of one FLAM-PUF evaluation.
//
// One evaluation of an original challenge C runs as follows (i is the index
// of the LFSR state S^i currently applied to the APUF, r*_i its response):
//   start      : C is loaded into the LFSR as S^0 (i = 0), both buffers clear.
//                An all-zero C is refused (err pulse), as the LFSR state must
//                not be all zero.
//   i = 0..N-2 : first confusion, taps from the fixed set G1; r*_i feeds the
//                feedback module, and r*_1..r*_{N-2} are shifted into the
//                response buffer.
//   i = N-1    : r*_{N-1} completes R*; the LFSR already uses the complete
//                G2 = (r*_1..r*_{N-1}) for the step to S^N (buffer look-ahead).
//   i >= N     : secondary confusion with G2 held in the buffer.
//   i = K..K+M-1 : the direct responses are the final response bits, shifted
//                into the output register; after i = K+M-1 `done` pulses.
// The LFSR advances once per clock throughout, so an evaluation takes
// K+M clocks after the start cycle (K = N, M = N by default: 2N clocks).
// The six steps, the N-1 cycle first confusion, the switch to G2 and the
// final response from cycle k follow the design; the counter-based FSM,
// the pulse outputs and the all-zero refusal mechanism are this design's own.
module flam_ctrl
  import flam_pkg::*;
#(
  parameter int unsigned N = flam_pkg::N_DEFAULT,  // stages
  parameter int unsigned K = N,                    // cycle of the first final-response bit
  parameter int unsigned M = N                     // final-response bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,       // request an evaluation (ignored while busy)
  input  logic   chal_zero,   // the offered challenge is all zero
  output logic   lfsr_load,
  output logic   lfsr_step,
  output gsrc_e  gsrc,        // coefficient source for this cycle
  output logic   buf_clear,
  output logic   buf_shift,   // capture r* into the response buffer
  output logic   resp_clear,
  output logic   resp_shift,  // capture r* into the final-response register
  output logic   busy,
  output logic   done,        // one-cycle pulse: final response complete
  output logic   err          // one-cycle pulse: all-zero challenge refused
);

  localparam int unsigned LAST = K + M - 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  flam_state_e    st;
  logic [CW-1:0]  cnt;

  always_comb begin
    lfsr_load  = 1'b0;
    lfsr_step  = 1'b0;
    buf_clear  = 1'b0;
    buf_shift  = 1'b0;
    resp_clear = 1'b0;
    resp_shift = 1'b0;
    gsrc       = GSRC_G1;
    busy       = (st == ST_RUN);
    if (st == ST_IDLE) begin
      if (start && !chal_zero) begin
        lfsr_load  = 1'b1;
        buf_clear  = 1'b1;
        resp_clear = 1'b1;
      end
    end else begin
      lfsr_step = 1'b1;
      buf_shift = (cnt >= CW'(1)) && (cnt <= CW'(N - 1));
      if (cnt < CW'(N - 1))       gsrc = GSRC_G1;
      else if (cnt == CW'(N - 1)) gsrc = GSRC_BYPASS;
      else                        gsrc = GSRC_G2;
      resp_shift = (cnt >= CW'(K));  // cnt never exceeds LAST
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= ST_IDLE;
      cnt  <= '0;
      done <= 1'b0;
      err  <= 1'b0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      case (st)
        ST_IDLE: begin
          if (start) begin
            if (chal_zero) begin
              err <= 1'b1;
            end else begin
              st  <= ST_RUN;
              cnt <= '0;
            end
          end
        end
        default: begin
          if (cnt == CW'(LAST)) begin
            st   <= ST_IDLE;
            done <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  initial begin
    assert (N >= 3) else $error("flam_ctrl: N must be at least 3");
    assert (K >= N) else $error("flam_ctrl: the final response starts no earlier than cycle N");
    assert (M >= 1) else $error("flam_ctrl: at least one final-response bit");
  end

  // The LFSR is never loaded and stepped in the same cycle.
  a_load_step_excl: assert property (@(posedge clk) disable iff (!rst_n) !(lfsr_load && lfsr_step));

endmodule
