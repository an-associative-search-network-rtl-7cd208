// timing_fsa: the timing sequencer that drives the network through each
// iteration ("iterate" mode) and holds it in "pause" mode on request.
//
// As in the original, the sequencer is a state machine whose state only changes
// when a segment ends, plus a duration counter: on entering a segment (LOAD) the
// segment's 6-bit timing word is fetched from a small ROM into a register and a
// 6-bit counter is reset; when the counter equals the register a comparator
// raises RESUME and the state machine advances. The timing lines (tm) are
// decoded from the state alone, except the start strobes, which also look at a
// zero count. The timing word of the segment that waits before the weight update
// is the N_c value of the C register instead of a ROM word, so one iteration
// lasts 45 + N_c minor cycles (45..61 for N_c = 0..16).
// Segments (t = minor cycle of the iteration; this design's schedule):
//   CHECK t=0; A 1-4; B 5; C 6; D 7-8; E 9-16; F 17; G 18-20; H 21-25; I 26;
//   J 27-28; K 29..28+N_c (skipped when N_c = 0); L 29+N_c..44+N_c.
// At CHECK the pause request is examined; if set, the chip enters PAUSE and
// acknowledges it (paused) until the request is withdrawn.
// The sequencer is written as a case statement rather than AND/OR planes.
// Only bits 5:0 of the 8-bit C register are read: N_c never exceeds 16, and a
// 6-bit word matches the width of the sequencer's counter.
module timing_fsa
  import asn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pause_req,
  input  logic [7:0] c_reg,
  output timing_t    tm,
  output logic       load
);
  typedef enum logic [3:0] {
    S_CHECK, S_A, S_B, S_C, S_D, S_E, S_F, S_G, S_H, S_I, S_J, S_K, S_L, S_PAUSE
  } seg_e;

  seg_e       seg_q, seg_n;
  logic [5:0] cnt_q, word_q, rom;
  logic       resume, first;
  logic [5:0] nc;

  assign nc = c_reg[5:0];

  // ROM of timing words: segment length minus one
  always_comb begin
    unique case (seg_n)
      S_A:     rom = 6'd3;
      S_D:     rom = 6'd1;
      S_E:     rom = 6'd7;
      S_G:     rom = 6'd2;
      S_H:     rom = 6'd4;
      S_J:     rom = 6'd1;
      S_K:     rom = nc - 6'd1;
      S_L:     rom = 6'd15;
      default: rom = 6'd0;
    endcase
  end

  // comparator
  assign resume = (cnt_q == word_q);
  assign first  = (cnt_q == 6'd0);

  // next-state logic
  always_comb begin
    seg_n = seg_q;
    if (resume) begin
      unique case (seg_q)
        S_CHECK: seg_n = pause_req ? S_PAUSE : S_A;
        S_A:     seg_n = S_B;
        S_B:     seg_n = S_C;
        S_C:     seg_n = S_D;
        S_D:     seg_n = S_E;
        S_E:     seg_n = S_F;
        S_F:     seg_n = S_G;
        S_G:     seg_n = S_H;
        S_H:     seg_n = S_I;
        S_I:     seg_n = S_J;
        S_J:     seg_n = (nc == 6'd0) ? S_L : S_K;
        S_K:     seg_n = S_L;
        S_L:     seg_n = S_CHECK;
        S_PAUSE: seg_n = pause_req ? S_PAUSE : S_CHECK;
        default: seg_n = S_CHECK;
      endcase
    end
  end

  assign load = resume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_q  <= S_CHECK;
      cnt_q  <= '0;
      word_q <= '0;
    end else if (load) begin
      seg_q  <= seg_n;
      cnt_q  <= '0;
      word_q <= rom;
    end else begin
      cnt_q  <= cnt_q + 6'd1;
    end
  end

  // timing lines (OR plane)
  always_comb begin
    tm            = '0;
    tm.clr        = seg_q inside {S_CHECK, S_PAUSE};
    tm.paused     = seg_q == S_PAUSE;
    tm.x_shift    = seg_q == S_A;
    tm.z_load     = seg_q inside {S_A, S_B, S_C, S_D};
    tm.t_upd      = seg_q inside {S_A, S_B, S_C, S_D, S_E};
    tm.decay_slot = seg_q == S_F;
    tm.sa_w       = seg_q inside {S_A, S_B, S_C, S_D, S_E, S_F, S_G};
    tm.sa_t       = seg_q inside {S_H, S_I, S_J, S_K, S_L};
    tm.sa_start   = (seg_q inside {S_CHECK, S_PAUSE}) || (seg_q inside {S_A, S_H} && first);
    tm.r_start    = seg_q == S_H && first;
    tm.r_run      = tm.sa_t;
    tm.noise_en   = seg_q inside {S_C, S_D, S_E, S_F, S_G, S_H};
    tm.thr_en     = seg_q inside {S_D, S_E, S_F, S_G, S_H, S_I};
    tm.thr_msb    = seg_q == S_I;
    tm.w_add      = seg_q == S_L;
    tm.iter_done  = seg_q == S_L && resume;
  end
endmodule
