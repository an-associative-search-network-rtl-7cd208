// intersection: the arithmetic and memory unit at one crossing of an input line
// and an element column.
//
// It holds a signed 16-bit weight W and an unsigned 16-bit trace T in
// right-shifting registers, each closed into a ring through its own 1-bit
// serial adder, and one shift-adder that multiplies either register by a serial
// input. During an iteration:
//   * weight x X: the shift-adder multiplies W by the 4-bit X arriving on xc and
//     puts the product, LSB first, on the wx line toward the adder tree;
//   * trace update: with tshift high the trace circulates through its adder,
//     which adds (d AND xold), i.e. Yold * Xold, into T;
//   * weight update: the shift-adder multiplies T by R (rc); with wshift high the
//     weight circulates through its adder and the product bits are added in.
// Register access (pause mode, or the trace halving): l selects this row;
//   rw = 1, l = 1 : read  - the register circulates, its LSB appears on d_out;
//   rw = 0, l = 1 : write - the register shifts right taking d into its MSB.
// With l = 0 a shifting register always circulates through its adder (rw = 1 in
// iterate mode); that an unselected row keeps its value during a write is this
// design's choice. Which register shifts is set by wshift / tshift.
// The adder carries are emptied whenever their register is not shifting.
module intersection #(
  parameter int unsigned W_BITS   = 16,
  parameter int unsigned ACC_BITS = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  // shift-adder
  input  logic              xc,
  input  logic              rc,
  input  logic              sign_ext,
  input  logic              sa_start,
  output logic              wx,
  // registers
  input  logic              wshift,
  input  logic              tshift,
  input  logic              rw,
  input  logic              l,
  input  logic              d,
  input  logic              xold,
  output logic              d_out,
  output logic [W_BITS-1:0] w_q,
  output logic [W_BITS-1:0] t_q
);
  logic p;
  logic w_sum, t_sum;
  logic w_msb, t_msb;

  shift_adder #(.W_BITS(W_BITS), .ACC_BITS(ACC_BITS)) u_sa (
    .clk, .rst_n, .start(sa_start), .sign_ext, .mx(xc), .mr(rc),
    .w(w_q), .t(t_q), .p, .p_q(wx)
  );

  // 1-bit adders at the end of each register: in access mode the second input is
  // held at 0 so the adder passes the register bit through unchanged.
  serial_adder #(.REG_SUM(1'b0)) u_wadd (
    .clk, .rst_n, .clr(!wshift), .cin1(1'b0),
    .a(w_q[0]), .b(p & rw & !l), .s(w_sum)
  );
  serial_adder #(.REG_SUM(1'b0)) u_tadd (
    .clk, .rst_n, .clr(!tshift), .cin1(1'b0),
    .a(t_q[0]), .b(d & xold & rw & !l), .s(t_sum)
  );

  always_comb begin
    w_msb = (l && !rw) ? d : w_sum;
    t_msb = (l && !rw) ? d : t_sum;
    d_out = l & (wshift ? w_q[0] : t_q[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q <= '0;
      t_q <= '0;
    end else begin
      if (wshift) w_q <= {w_msb, w_q[W_BITS-1:1]};
      if (tshift) t_q <= {t_msb, t_q[W_BITS-1:1]};
    end
  end
endmodule
