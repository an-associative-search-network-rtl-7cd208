// adder_tree: pipelined bit-serial adder tree summing the products of one
// element's intersections.
//
// N_IN bit-serial inputs (LSB first) are added pairwise by serial_adder
// elements with registered sums, in log2(N_IN) levels, so each level adds one
// cycle of latency: the sum bit of weight k leaves the tree LEVELS cycles after
// the input bits of weight k arrive. Every input passes through an enable gate
// first: an input whose ignore bit is 1 is replaced by zeros (the enable line of
// the original is held high to ignore an input). clr empties all sum and carry
// flip-flops; it is applied before each summation so no stray carry is left.
// The sum wraps at the stream length the caller reads.
module adder_tree #(
  parameter int unsigned N_IN = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [N_IN-1:0] ignore,
  input  logic [N_IN-1:0] in,
  output logic            sum
);
  localparam int unsigned LEVELS = $clog2(N_IN);

  initial begin
    assert (N_IN >= 2 && (1 << LEVELS) == N_IN)
      else $error("adder_tree: N_IN must be a power of two");
  end

  logic [N_IN-1:0] lvl [LEVELS+1];

  assign lvl[0] = in & ~ignore;

  for (genvar g = 0; g < LEVELS; g++) begin : g_lvl
    localparam int unsigned NOUT = N_IN >> (g + 1);
    for (genvar i = 0; i < NOUT; i++) begin : g_add
      serial_adder #(.REG_SUM(1'b1)) u_add (
        .clk, .rst_n, .clr, .cin1(1'b0),
        .a(lvl[g][2*i]), .b(lvl[g][2*i+1]), .s(lvl[g+1][i])
      );
    end
    if (NOUT < N_IN) begin : g_pad
      assign lvl[g+1][N_IN-1:NOUT] = '0;
    end
  end

  assign sum = lvl[LEVELS][0];
endmodule
