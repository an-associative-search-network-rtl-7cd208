// shift_register: a one-word register that shifts right or circulates.
//
// shift: the word moves one place toward the LSB and din enters the MSB; the
//        bit leaving the LSB is available on lsb during the same cycle.
// circ : the word moves one place toward the LSB and its own LSB re-enters the
//        MSB, so after WIDTH cycles it is back where it started.
// load : parallel load of pdata (used only for initialisation through the
//        microprocessor interface; the parallel port is this design's choice).
// Priority: load, then shift, then circ. All changes on the rising clock edge.
// The two-phase shift/transfer transistors of the original are replaced by one
// edge-triggered flip-flop per bit.
module shift_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             circ,
  input  logic             load,
  input  logic             din,
  input  logic [WIDTH-1:0] pdata,
  output logic             lsb,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= pdata;
    else if (shift)  q <= {din, q[WIDTH-1:1]};
    else if (circ)   q <= {q[0], q[WIDTH-1:1]};
  end
  assign lsb = q[0];
endmodule
