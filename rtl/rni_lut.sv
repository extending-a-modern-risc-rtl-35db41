// rni_lut: lookup table indexed by the VPU transaction tag, with one write port
// and NRD synchronous read ports.
//
// The RN-I uses it twice: as the transaction lookup table (1 bit per tag, the
// Excl flag, written by the REQ module and read by RSP and RDAT) and as the WDAT
// module's WriteData table (TgtID and DBID per tag, written by RSP and read by
// WDAT). A read presents its address in one cycle and gets the data in the next;
// that one-cycle latency is the first stage of the RDAT/RSP receive pipelines and
// the extra cycle of the WDAT flit path. A write and a read of the same entry in
// the same cycle return the old contents. The table is cleared at reset so that
// no entry is ever undefined. One write port and two read ports follow the design
// description; synchronous reads and the reset are this design's choices.
module rni_lut #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 1,
  parameter int unsigned NRD   = 2
) (
  input  logic                             clk_i,
  input  logic                             rsn_i,
  input  logic                             wr_en_i,
  input  logic [$clog2(DEPTH)-1:0]         wr_addr_i,
  input  logic [WIDTH-1:0]                 wr_data_i,
  input  logic [NRD-1:0]                   rd_en_i,
  input  logic [NRD-1:0][$clog2(DEPTH)-1:0] rd_addr_i,
  output logic [NRD-1:0][WIDTH-1:0]        rd_data_o
);
  logic [WIDTH-1:0] mem_q [DEPTH];

  always_ff @(posedge clk_i) begin
    if (!rsn_i) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (wr_en_i) begin
      mem_q[wr_addr_i] <= wr_data_i;
    end
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk_i) begin
      if (!rsn_i)            rd_data_o[p] <= '0;
      else if (rd_en_i[p])   rd_data_o[p] <= mem_q[rd_addr_i[p]];
    end
  end
endmodule
