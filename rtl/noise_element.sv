// noise_element: adds an independent serial random number to each element's sum.
//
// The noise arrives on a single pin carrying two bits per minor cycle: the bit
// for element 0 during the first half of the cycle and the bit for element 1
// during the second half. The element-0 bit is captured on the falling clock
// edge and held for half a cycle, so that on the rising edge both bits enter
// their elements' serial adders together with the adder-tree sum bits. The noise
// is gated by en (the cycles in which sum bits arrive) and by noise_off (the
// control-register bit that removes noise). Output: the noisy sum of each
// element, LSB first, one cycle after its inputs (registered adder sum).
// The scheme serves exactly two elements, as in the original chip.
module noise_element #(
  parameter int unsigned N_ELEM = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  logic              noise_off,
  input  logic              noise_in,
  input  logic [N_ELEM-1:0] sum_in,
  output logic [N_ELEM-1:0] nsum
);
  initial begin
    assert (N_ELEM == 2) else $error("noise_element: one noise pin serves two elements");
  end

  logic n0_q;
  logic [N_ELEM-1:0] nbit;

  // half-cycle delay of the element-0 bit
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) n0_q <= 1'b0;
    else        n0_q <= noise_in;
  end

  always_comb begin
    nbit    = '0;
    nbit[0] = n0_q & en & !noise_off;
    nbit[1] = noise_in & en & !noise_off;
  end

  for (genvar e = 0; e < N_ELEM; e++) begin : g_add
    serial_adder #(.REG_SUM(1'b1)) u_add (
      .clk, .rst_n, .clr, .cin1(1'b0), .a(sum_in[e]), .b(nbit[e]), .s(nsum[e])
    );
  end
endmodule
