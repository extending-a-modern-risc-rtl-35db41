// rni_credit: L-credit counter of one CHI transmit channel.
//
// The counter holds the number of link-layer credits granted by the receiver and
// not yet spent. A cycle with the receiver's lcrdv high and no flit sent adds one;
// a cycle with a flit sent and no lcrdv takes one; a cycle with both or neither
// leaves it alone. have_credit is high whenever the count is not zero, so the
// owner may send a flit in the same cycle (combinational path from the count
// register only, not from lcrdv). A synchronous active-low reset (rsn_i) empties
// the counter, as the reset multiplexer in front of the register does in the
// design's credit circuit; a CHI transmitter starts with no credits.
// The increment/decrement structure follows the credit circuit of the design;
// the counter width (4 bits, enough for the 15-credit CHI maximum) and the
// saturation at MAX are this design's choices.
module rni_credit #(
  parameter int unsigned MAX = 15
) (
  input  logic clk_i,
  input  logic rsn_i,
  input  logic lcrdv_i,     // credit returned by the receiver
  input  logic flitv_i,     // flit sent this cycle (spends a credit)
  output logic have_credit_o
);
  localparam int unsigned W = $clog2(MAX + 1);

  logic [W-1:0] count_q;
  logic         increment, decrement;

  assign increment = lcrdv_i & ~flitv_i;
  assign decrement = flitv_i & ~lcrdv_i;

  always_ff @(posedge clk_i) begin
    if (!rsn_i)                                  count_q <= '0;
    else if (increment && count_q != W'(MAX))    count_q <= count_q + 1'b1;
    else if (decrement && count_q != '0)         count_q <= count_q - 1'b1;
  end

  assign have_credit_o = (count_q != '0);

`ifndef SYNTHESIS
  // A flit may only leave when a credit is held (or arrives in the same cycle).
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
    flitv_i |-> (have_credit_o || lcrdv_i));
`endif
endmodule
