// x_input_buffer: the 4-bit input buffers on the sensory input lines.
//
// Each of the N_IN X pins carries a 4-bit unsigned value, LSB first, during the
// four cycles in which shift is high. The bit on the pin goes straight to the
// intersections as Xc (the current X, for the weight multiplication) and also
// into a 4-bit shift register; the bit that leaves that register's other end is
// the X of the previous iteration, delivered as Xold (for the trace update) in
// the same cycles. Outside the shift cycles xc and xold are 0.
module x_input_buffer #(
  parameter int unsigned N_IN   = 16,
  parameter int unsigned X_BITS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,
  input  logic [N_IN-1:0] x_in,
  output logic [N_IN-1:0] xc,
  output logic [N_IN-1:0] xold
);
  logic [N_IN-1:0] lsb;

  for (genvar i = 0; i < N_IN; i++) begin : g_line
    logic [X_BITS-1:0] q_unused;
    shift_register #(.WIDTH(X_BITS)) u_buf (
      .clk, .rst_n, .shift, .circ(1'b0), .load(1'b0), .din(x_in[i]),
      .pdata('0), .lsb(lsb[i]), .q(q_unused)
    );
  end

  assign xc   = shift ? x_in : '0;
  assign xold = shift ? lsb  : '0;
endmodule
