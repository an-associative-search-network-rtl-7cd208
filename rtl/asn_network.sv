// asn_network: the network section of the chip - everything that computes.
//
// It holds the X input buffers, the z difference (reinforcement) unit, N_ELEM
// element columns of N_IN intersections with their adder trees, the noise
// element, the shared threshold register and one threshold element per element.
// The timing bundle tm comes from the timing sequencer; the register-access
// lines (ia_*) come from the microprocessor interface during pause, and
// decay_now from the decay registers. This module merges them into the
// intersection control lines:
//   Wshift : weight update, or access to a weight register;
//   Tshift : trace update, trace halving, or access to a trace register;
//   R/W    : low for an access write and for the trace halving (which writes a
//            0 into the MSB of every trace register, i.e. divides it by two);
//   L      : the addressed row during access, every row during the halving;
//   D      : the write bit during access, 0 during halving, else Yold.
// Element outputs: y_out[e] is the latched binary output y[e], or, if bit e of
// the control register is set, the noisy sum itself as a bit stream.
// The timing lines paused and iter_done are part of the shared bundle but are
// used only by the interface and the decay registers, not here.
module asn_network
  import asn_pkg::*;
#(
  parameter int unsigned N_IN     = asn_pkg::NUM_INPUTS,
  parameter int unsigned N_ELEM   = asn_pkg::NUM_ELEMS,
  parameter int unsigned X_BITS   = asn_pkg::X_WIDTH,
  parameter int unsigned Z_BITS   = asn_pkg::Z_WIDTH,
  parameter int unsigned W_BITS   = asn_pkg::REG_WIDTH,
  parameter int unsigned ACC_BITS = asn_pkg::ACC_WIDTH,
  parameter int unsigned SUM_BITS = asn_pkg::SUM_WIDTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  timing_t             tm,
  input  logic [N_IN-1:0]     x_in,
  input  logic                z_in,
  input  logic                noise_in,
  input  logic [N_IN-1:0]     ignore,
  input  logic [7:0]          ctrl,
  input  logic                decay_now,
  input  logic                ia_sel,
  input  logic [$clog2(N_IN)-1:0] ia_row,
  input  logic                ia_trace,
  input  logic                ia_write,
  input  logic [N_ELEM-1:0]   ia_d,
  output logic [N_ELEM-1:0]   ia_q,
  input  logic                thr_load,
  input  logic [SUM_BITS-1:0] thr_pdata,
  output logic [SUM_BITS-1:0] thr_q,
  output logic [N_ELEM-1:0]   y,
  output logic [N_ELEM-1:0]   y_out
);
  logic [N_IN-1:0]   xc, xold, l;
  logic              r, rc, halve, wshift, tshift, rw, thr_bit;
  logic [N_ELEM-1:0] esum, nsum, d, state_unused;

  x_input_buffer #(.N_IN(N_IN), .X_BITS(X_BITS)) u_xbuf (
    .clk, .rst_n, .shift(tm.x_shift), .x_in, .xc, .xold
  );

  z_difference #(.Z_BITS(Z_BITS)) u_zdiff (
    .clk, .rst_n, .z_in, .load(tm.z_load), .start(tm.r_start), .run(tm.r_run), .r
  );

  always_comb begin
    halve  = tm.decay_slot & decay_now;
    rc     = tm.sa_t & tm.r_run & r;
    wshift = tm.w_add | (ia_sel & !ia_trace);
    tshift = tm.t_upd | halve | (ia_sel & ia_trace);
    rw     = !((ia_sel & ia_write) | halve);
    for (int j = 0; j < N_IN; j++)
      l[j] = halve | (ia_sel && 32'(ia_row) == j);
    for (int e = 0; e < N_ELEM; e++)
      d[e] = ia_sel ? ia_d[e] : (halve ? 1'b0 : y[e]);
  end

  for (genvar e = 0; e < N_ELEM; e++) begin : g_elem
    asn_element #(.N_IN(N_IN), .W_BITS(W_BITS), .ACC_BITS(ACC_BITS)) u_elem (
      .clk, .rst_n,
      .xc(tm.sa_w ? xc : '0), .xold, .rc, .sign_ext(tm.sa_w), .sa_start(tm.sa_start),
      .wshift, .tshift, .rw, .l, .d(d[e]), .tree_clr(tm.clr), .ignore,
      .sum(esum[e]), .d_out(ia_q[e])
    );

    threshold_element u_thr (
      .clk, .rst_n, .clr(tm.clr), .en(tm.thr_en), .msb(tm.thr_msb),
      .s(nsum[e]), .th(thr_bit), .state(state_unused[e]), .y(y[e])
    );

    assign y_out[e] = ctrl[e] ? nsum[e] : y[e];
  end

  noise_element #(.N_ELEM(N_ELEM)) u_noise (
    .clk, .rst_n, .clr(tm.clr), .en(tm.noise_en), .noise_off(ctrl[CTRL_NOISE_OFF]),
    .noise_in, .sum_in(esum), .nsum
  );

  shift_register #(.WIDTH(SUM_BITS)) u_thr_reg (
    .clk, .rst_n, .shift(1'b0), .circ(tm.thr_en), .load(thr_load), .din(1'b0),
    .pdata(thr_pdata), .lsb(thr_bit), .q(thr_q)
  );
endmodule
