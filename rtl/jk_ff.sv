// jk_ff: static edge-triggered JK flip-flop with asynchronous clear and preset.
//
// On the rising clock edge: J=0,K=0 hold; J=1,K=0 set; J=0,K=1 reset; J=1,K=1
// toggle. clr_n (active low) forces 0 and pre_n (active low) forces 1 at once,
// clear taking priority (release one override before asserting the other).
// q_n is the complement output.
module jk_ff (
  input  logic clk,
  input  logic clr_n,
  input  logic pre_n,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);
  logic ovr_n;

  // clear and preset merged into one asynchronous override; while it is active
  // q takes clr_n (0 when clearing, 1 when only presetting)
  assign ovr_n = clr_n & pre_n;

  always_ff @(posedge clk or negedge ovr_n) begin
    if (!ovr_n) q <= clr_n;
    else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= !q;
      endcase
    end
  end
  assign q_n = !q;
endmodule
