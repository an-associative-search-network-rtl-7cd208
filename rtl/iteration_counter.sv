// iteration_counter: counts completed iterations of the chip.
//
// BITS JK flip-flops form a counter: with inc high, stage i toggles when all
// lower stages are 1. clear (a write to either byte of the counter) resets every
// stage on the next edge by driving J=0, K=1. The original is a ripple counter;
// here every stage shares the one clock (a synchronous counter), which keeps the
// design single-clock.
module iteration_counter #(
  parameter int unsigned BITS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inc,
  input  logic            clear,
  output logic [BITS-1:0] count
);
  logic [BITS-1:0] qn_unused;
  logic [BITS-1:0] carry;

  // carry[i]: every stage below i is 1 and an increment is requested
  assign carry[0] = inc;
  for (genvar i = 1; i < BITS; i++) begin : g_carry
    assign carry[i] = carry[i-1] & count[i-1];
  end

  for (genvar i = 0; i < BITS; i++) begin : g_stage
    jk_ff u_ff (
      .clk, .clr_n(rst_n), .pre_n(1'b1),
      .j(!clear && carry[i]), .k(clear || carry[i]),
      .q(count[i]), .q_n(qn_unused[i])
    );
  end
endmodule
