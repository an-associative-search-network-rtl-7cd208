// shift_adder: bit-serial x parallel multiplier shared by the weight and trace
// registers of one intersection.
//
// Each minor cycle the parallel operand is added into an accumulator when the
// serial multiplier bit is 1, the lowest bit of the result is emitted as the
// next product bit (least significant first), and the accumulator shifts one
// place right, so the next addition enters at twice the significance. After
// the last multiplier bit the accumulator keeps shifting and drains the upper
// product bits; one product bit leaves per cycle.
//   mx, w : weight register (signed) gated by the serial X input
//   mr, t : trace register (unsigned) gated by the serial R input
//   sign_ext: arithmetic (1) or logical (0) right shift of the accumulator,
//           used for the signed weight and the unsigned trace respectively
//   start : first cycle of a multiplication; the accumulator is taken as empty
//   p     : product bit of this cycle (combinational)
//   p_q   : the same bit one cycle later (the W*X output line)
// The original is a row of sixteen 1-bit adders each retaining its own carry
// (carry-save form); here the row is written as one ACC_BITS-wide accumulator
// with a word-wide adder, which emits the same product bits in the same cycles.
// A signed serial multiplier (R) is handled by continuing to feed its sign bit
// after its last bit: the product bits then stay exact for as long as they are
// read.
module shift_adder #(
  parameter int unsigned W_BITS   = 16,
  parameter int unsigned ACC_BITS = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              sign_ext,
  input  logic              mx,
  input  logic              mr,
  input  logic [W_BITS-1:0] w,
  input  logic [W_BITS-1:0] t,
  output logic              p,
  output logic              p_q
);
  logic signed [ACC_BITS-1:0] acc_q, base, addend, total;

  always_comb begin
    addend = '0;
    if (mx) addend = addend + ACC_BITS'(signed'(w));
    if (mr) addend = addend + ACC_BITS'({1'b0, t});
    base  = start ? '0 : acc_q;
    total = base + addend;
    p     = total[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      p_q   <= 1'b0;
    end else begin
      acc_q <= sign_ext ? (total >>> 1) : signed'(total >> 1);
      p_q   <= p;
    end
  end
endmodule
