// asn_element: one ASN element, i.e. one column of the network: N_IN
// intersection circuits, one per input line, and the adder tree that sums their
// weight x input products into the element sum s_i = sum_j w_ij * x_j.
//
// Row j receives its own serial X bit (xc[j]), previous X bit (xold[j]) and
// select line (l[j]); the R line, the register shift lines, R/W, SignExtend and
// the shift-adder start are common to all rows. The column has one D line (d in,
// d_out out): in iterate mode it carries this element's previous output Yold to
// every row; in register access the selected row's bit appears on d_out.
// Timing: product bit k of every row leaves its intersection one cycle after
// the X multiplication's cycle k, and the sum bit k leaves the tree log2(N_IN)
// cycles later.
module asn_element #(
  parameter int unsigned N_IN     = 16,
  parameter int unsigned W_BITS   = 16,
  parameter int unsigned ACC_BITS = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] xc,
  input  logic [N_IN-1:0] xold,
  input  logic            rc,
  input  logic            sign_ext,
  input  logic            sa_start,
  input  logic            wshift,
  input  logic            tshift,
  input  logic            rw,
  input  logic [N_IN-1:0] l,
  input  logic            d,
  input  logic            tree_clr,
  input  logic [N_IN-1:0] ignore,
  output logic            sum,
  output logic            d_out
);
  logic [N_IN-1:0] wx, dq;

  for (genvar j = 0; j < N_IN; j++) begin : g_row
    intersection #(.W_BITS(W_BITS), .ACC_BITS(ACC_BITS)) u_int (
      .clk, .rst_n,
      .xc(xc[j]), .rc, .sign_ext, .sa_start, .wx(wx[j]),
      .wshift, .tshift, .rw, .l(l[j]), .d, .xold(xold[j]),
      .d_out(dq[j]), .w_q(), .t_q()
    );
  end

  adder_tree #(.N_IN(N_IN)) u_tree (
    .clk, .rst_n, .clr(tree_clr), .ignore, .in(wx), .sum
  );

  assign d_out = |dq;
endmodule
