// serial_adder: the one-bit bit-serial adder element used throughout the chip.
//
// Two operand bits arrive each minor cycle, least significant bit first. They
// are added to the carry kept from the previous cycle; the new carry is held in
// a flip-flop for one cycle and added into the next, more significant, bit.
// Sum and carry follow the full-adder truth table of the original design.
// With REG_SUM = 1 the sum is also delayed one cycle (the form used in the
// adder tree and the noise adder); with REG_SUM = 0 the sum is combinational,
// which is how the adder at the end of a weight or trace register feeds that
// register's vacated MSB in the same cycle.
//   clr : synchronous, empties the carry (and the sum flip-flop); inputs ignored.
//   cin1: carry-in forced to 1 for this cycle (two's-complement subtraction).
// The clr and cin1 controls are this design's choice of how the adder is emptied
// and preset; the document only states that it can be cleared and preset.
module serial_adder #(
  parameter bit REG_SUM = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic cin1,
  input  logic a,
  input  logic b,
  output logic s
);
  logic c_q, cin, sum, cout, s_q;

  always_comb begin
    cin  = cin1 | c_q;
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a | b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= 1'b0;
      s_q <= 1'b0;
    end else if (clr) begin
      c_q <= 1'b0;
      s_q <= 1'b0;
    end else begin
      c_q <= cout;
      s_q <= sum;
    end
  end

  assign s = REG_SUM ? s_q : sum;
endmodule
