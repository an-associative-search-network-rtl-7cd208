// z_difference: the reinforcement ("z trace") element. It turns the payoff z
// into the bit-serial reinforcement R = z - z_old sent to every intersection.
//
// While load is high (Z_BITS cycles) the payoff bits on the z pin, LSB first,
// shift into the z register. When run starts (start high for one cycle) the z
// register shifts out LSB first into a serial adder and into the z_old register
// at the same time, while z_old, the payoff of the previous iteration, shifts
// out through an inverter into the adder's other input; the adder's carry is
// preset to 1 in the first cycle, so the adder computes z + ~z_old + 1. After
// Z_BITS bits the new z has become z_old for the next iteration. For as long as
// run stays high after that, the adder is fed the two sign bits, so R continues
// as its own sign extension: the difference is exact (it needs Z_BITS+1 bits)
// and the trace multiplication that consumes it can treat it as a number of any
// length. The document stops the R line after 8 bits; the sign extension is this
// design's choice, required for a signed multiplier.
module z_difference #(
  parameter int unsigned Z_BITS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic z_in,
  input  logic load,
  input  logic start,
  input  logic run,
  output logic r
);
  localparam int unsigned CW = $clog2(Z_BITS + 1);

  logic [Z_BITS-1:0] z_q, zo_q;
  logic z_lsb, zo_lsb;
  logic [CW-1:0] cnt_q;
  logic zs_q, os_q;
  logic body, z_bit, o_bit;

  assign body = run && (start || cnt_q < CW'(Z_BITS));

  shift_register #(.WIDTH(Z_BITS)) u_z (
    .clk, .rst_n, .shift(load), .circ(body), .load(1'b0), .din(z_in),
    .pdata('0), .lsb(z_lsb), .q(z_q)
  );
  shift_register #(.WIDTH(Z_BITS)) u_zold (
    .clk, .rst_n, .shift(body), .circ(1'b0), .load(1'b0), .din(z_lsb),
    .pdata('0), .lsb(zo_lsb), .q(zo_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      zs_q  <= 1'b0;
      os_q  <= 1'b0;
    end else if (run) begin
      if (start) begin
        cnt_q <= CW'(1);
        zs_q  <= z_q[Z_BITS-1];
        os_q  <= zo_q[Z_BITS-1];
      end else if (cnt_q < CW'(Z_BITS)) begin
        cnt_q <= cnt_q + CW'(1);
      end
    end
  end

  always_comb begin
    z_bit = body ? z_lsb  : zs_q;
    o_bit = body ? zo_lsb : os_q;
  end

  serial_adder #(.REG_SUM(1'b0)) u_sub (
    .clk, .rst_n, .clr(!run), .cin1(start), .a(z_bit), .b(!o_bit), .s(r)
  );
endmodule
