// rni_lcrd_return: L-credit return logic of one CHI receive channel.
//
// Counts the credits this receiver owes the transmitter and returns them one per
// cycle on lcrdv_o. After reset it owes DEPTH credits, one per buffer entry, so
// the transmitter can fill the receive FIFO; afterwards each freed entry
// (release_i, one per popped or dropped flit) adds one credit owed. This way a
// freed entry is returned in the same cycle it is freed whenever nothing else is
// pending, as the design description asks, and the initial grant (which it does
// not describe) is handed out in the DEPTH cycles after reset.
module rni_lcrd_return #(
  parameter int unsigned DEPTH = 15
) (
  input  logic clk_i,
  input  logic rsn_i,
  input  logic release_i,
  output logic lcrdv_o
);
  localparam int unsigned W = $clog2(DEPTH + 1);
  logic [W-1:0] owed_q;

  assign lcrdv_o = (owed_q != '0) | release_i;

  always_ff @(posedge clk_i) begin
    if (!rsn_i) owed_q <= W'(DEPTH);
    else if (owed_q != '0 && !release_i) owed_q <= owed_q - 1'b1;
    // owed != 0 and release: one returned, one added -> unchanged
    // owed == 0 and release: returned in the same cycle -> unchanged
  end
endmodule
