// threshold_element: bit-serial comparison of a noisy element sum with the
// threshold, producing the element output y.
//
// Sum bits s and threshold bits th arrive together, LSB first, while en is high.
// A one-bit comparison state, cleared by clr, follows the original state table:
// it is set when the sum bit is 1 and the threshold bit 0, reset when the
// threshold bit is 1 and the sum bit 0, and kept when they are equal. At the
// end the state is 1 exactly when sum > threshold. Both numbers are two's
// complement here: on the sign bit (msb high) the roles of the two bits are
// exchanged, which turns the unsigned comparison of the table into a signed one
// (this sign handling is this design's addition). The result of the msb cycle is
// latched into y, which holds it for the whole next iteration (it is the Yold
// fed back to the traces) while the state is reused.
module threshold_element (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic msb,
  input  logic s,
  input  logic th,
  output logic state,
  output logic y
);
  logic a, b, nxt;

  always_comb begin
    a   = msb ? th : s;
    b   = msb ? s  : th;
    nxt = (a & !b) | (state & !(a ^ b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 1'b0;
      y     <= 1'b0;
    end else begin
      if (clr)     state <= 1'b0;
      else if (en) state <= nxt;
      if (en && msb) y <= nxt;
    end
  end
endmodule
