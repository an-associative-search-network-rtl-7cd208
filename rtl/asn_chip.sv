// asn_chip: top level of the Associative Search Network chip.
//
// The chip learns, by reinforcement, a thresholded linear map from N_IN sensory
// inputs to N_ELEM binary actions. Each iteration (45 + N_c minor cycles) it
// reads a 4-bit unsigned value on every x_in pin and an 8-bit signed payoff on
// z_in, bit-serially LSB first, computes for every element
//     y_i = [ sum_j w_ij * x_j + noise_i > threshold ],
// adds Yold * Xold to every trace register, halves the traces every (D+1)-th
// iteration, and adds ((z - z_old) * T_ij) >> (8 + N_c) to every weight.
// Pin timing, with t = 0 the first cycle of an iteration (see timing_fsa):
//   x_in   bits 0..3 during t = 1..4
//   z_in   bits 0..7 during t = 1..8
//   noise_in  during t = 6..25, bit k of both noises in cycle 6+k: element 0 in
//          the first half of the cycle, element 1 in the second half
//   y_out  new outputs from t = 27 (or, in serial mode, the noisy sum bit k at
//          t = 7+k)
// The microprocessor interface (cs_n, we_n, data_*) reaches all registers in
// pause mode; pause_n requests pause, which takes effect at the next t = 0.
// The bidirectional data pads are outside this module: data_in is the bus,
// data_out/data_oe drive it.
module asn_chip
  import asn_pkg::*;
#(
  parameter int unsigned N_IN     = asn_pkg::NUM_INPUTS,
  parameter int unsigned N_ELEM   = asn_pkg::NUM_ELEMS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   x_in,
  input  logic              z_in,
  input  logic              noise_in,
  output logic [N_ELEM-1:0] y_out,
  input  logic              pause_n,
  input  logic              cs_n,
  input  logic              we_n,
  input  logic [7:0]        data_in,
  output logic [7:0]        data_out,
  output logic              data_oe
);
  timing_t tm;
  logic fsa_load_unused;
  logic [7:0] c_reg, ctrl;
  logic [N_IN-1:0] ignore;
  logic [3:0] dec_wr;
  logic [15:0] decay_q, dcount_q, iter_count_unused;
  logic decay_now;
  logic ia_sel, ia_trace, ia_write, thr_load;
  logic [$clog2(N_IN)-1:0] ia_row;
  logic [N_ELEM-1:0] ia_d, ia_q, y;
  logic [SUM_WIDTH-1:0] thr_pdata, thr_q;

  timing_fsa u_fsa (
    .clk, .rst_n, .pause_req(!pause_n), .c_reg, .tm, .load(fsa_load_unused)
  );

  decay_unit #(.BITS(16)) u_decay (
    .clk, .rst_n, .slot(tm.decay_slot), .wr(dec_wr), .din(data_in),
    .decay_now, .decay_q, .count_q(dcount_q)
  );

  upi #(.N_IN(N_IN), .N_ELEM(N_ELEM)) u_upi (
    .clk, .rst_n, .cs_n, .we_n, .din(data_in), .dout(data_out), .doe(data_oe),
    .paused(tm.paused), .y,
    .ia_sel, .ia_row, .ia_trace, .ia_write, .ia_d, .ia_q,
    .ignore, .c_reg, .ctrl, .dec_wr, .decay_q, .dcount_q,
    .thr_load, .thr_pdata, .thr_q, .iter_inc(tm.iter_done),
    .iter_count(iter_count_unused)
  );

  asn_network #(.N_IN(N_IN), .N_ELEM(N_ELEM)) u_net (
    .clk, .rst_n, .tm, .x_in, .z_in, .noise_in, .ignore, .ctrl, .decay_now,
    .ia_sel, .ia_row, .ia_trace, .ia_write, .ia_d, .ia_q,
    .thr_load, .thr_pdata, .thr_q, .y, .y_out
  );
endmodule
