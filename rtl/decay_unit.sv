// decay_unit: the Decay Register and the Decay Count Register, which make the
// trace registers forget: every (D + 1)-th iteration each trace is halved.
//
// The Decay Register holds the constant D written by the microprocessor. The
// Decay Count Register counts down by one at the decay slot of each iteration;
// in the iteration in which it holds zero, decay_now is high during the slot
// (the network then shifts every trace right by one bit) and the count is
// reloaded from the Decay Register. Both registers are 16 bits and can be
// written or read a byte at a time in pause mode.
//   wr[0]/wr[1]: decay register low/high byte; wr[2]/wr[3]: count low/high byte.
module decay_unit #(
  parameter int unsigned BITS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            slot,
  input  logic [3:0]      wr,
  input  logic [7:0]      din,
  output logic            decay_now,
  output logic [BITS-1:0] decay_q,
  output logic [BITS-1:0] count_q
);
  assign decay_now = slot && (count_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decay_q <= '0;
      count_q <= '0;
    end else begin
      if (wr[0]) decay_q[7:0]      <= din;
      if (wr[1]) decay_q[BITS-1:8] <= din[BITS-9:0];
      if (wr[2]) count_q[7:0]      <= din;
      if (wr[3]) count_q[BITS-1:8] <= din[BITS-9:0];
      if (slot) count_q <= decay_now ? decay_q : count_q - BITS'(1);
    end
  end
endmodule
