// rni_fwft_fifo: first-word fall-through FIFO.
//
// The oldest entry is always present on rd_data_o with valid_o high while the
// FIFO is not empty; rd_en_i pops it, and the next entry appears in the next
// cycle. A write lands in the array and is visible one cycle later. A write to a
// full FIFO is accepted only together with a pop; otherwise it is dropped (the
// RN-I never does that: the CHI L-credits it grants equal DEPTH).
// Inside: a circular buffer of DEPTH words with read and write pointers and an
// occupancy counter. Reset clears the pointers and the counter, not the storage,
// which is only read after it has been written.
// The FWFT behaviour and a depth equal to the credit count follow the design
// description; the implementation is this design's choice.
module rni_fwft_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 15
) (
  input  logic             clk_i,
  input  logic             rsn_i,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             valid_o,
  output logic             full_o
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [PW-1:0]    wr_ptr_q, rd_ptr_q;
  logic [CW-1:0]    count_q;
  logic             do_wr, do_rd;

  assign valid_o = (count_q != '0);
  assign full_o  = (count_q == CW'(DEPTH));
  assign do_wr   = wr_en_i & (~full_o | rd_en_i);
  assign do_rd   = rd_en_i & valid_o;
  assign rd_data_o = mem_q[rd_ptr_q];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i) begin
    if (!rsn_i) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (do_wr) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_rd) rd_ptr_q <= next_ptr(rd_ptr_q);
      count_q <= count_q + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk_i) begin
    if (do_wr) mem_q[wr_ptr_q] <= wr_data_i;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
    wr_en_i |-> (!full_o || rd_en_i));
`endif
endmodule
