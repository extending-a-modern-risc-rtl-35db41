// rni_rdat: RDAT module of the RN-I. Receives CHI read data (CompData) flits and
// returns them to the VPU as load responses.
//
// CHI RX logic, two stages: in the cycle a flit arrives its TxnID addresses the
// transaction lookup table (read port lkpt_rd1) and the flit is registered; in the
// next cycle the registered flit (TxnID, RespErr, Data) is written, together with
// the Excl bit the table returned, into a first-word fall-through FIFO of
// FIFO_DEPTH entries. Flit processing: the FIFO head drives the load response;
// its error bit comes from rni_vpu_error (RespErr interpreted with Excl), its tag
// is the TxnID. Control: the response is valid while the FIFO is not empty; when
// the VPU acknowledges it the entry is popped and an L-credit goes back to the
// interconnect. The minimum latency from rxdatflitv to ld_resp_valid is 2 cycles.
// The flit fields a read-only requester has no use for (QoS, SrcID, HomeNID,
// Resp, FwdState, DBID, CCID, DataID, TraceTag, BE, DataCheck, Poison) are
// ignored, so a lint run reports those input bits as unused.
// This follows the design's RDAT circuit. The initial grant of FIFO_DEPTH
// credits after reset (rni_lcrd_return) is this design's choice.
module rni_rdat
  import rni_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = MAX_LCRD
) (
  input  logic               clk_i,
  input  logic               rsn_i,
  // CHI RXDAT
  input  logic               chi_rxdatflitv_i,
  input  chi_dat_flit_t      chi_rxdatflit_i,
  output logic               chi_rxdatlcrdv_o,
  // transaction lookup table read port
  output logic               lkpt_rd1_en_o,
  output logic [TAG_W-1:0]   lkpt_rd1_addr_o,
  input  logic               lkpt_txn_info_i,     // Excl, one cycle after the read
  // VPU RDAT channel
  output logic               ld_resp_valid_o,
  output vpu_rdat_t          ld_resp_o,
  input  logic               ld_resp_ack_i
);
  typedef struct packed {
    logic               excl;
    logic [1:0]         resp_err;
    logic [DATA_W-1:0]  data;
    logic [TXNID_W-1:0] txn_id;
  } entry_t;

  logic               flitv_q;
  logic [1:0]         resp_err_q;
  logic [DATA_W-1:0]  data_q;
  logic [TXNID_W-1:0] txn_id_q;
  entry_t        wr_entry, head;
  logic          head_valid, pop, full;

  // stage 1: register the flit while the lookup table is read
  assign lkpt_rd1_en_o   = chi_rxdatflitv_i;
  assign lkpt_rd1_addr_o = TAG_W'(chi_rxdatflit_i.txn_id);

  always_ff @(posedge clk_i) begin
    if (!rsn_i) flitv_q <= 1'b0;
    else        flitv_q <= chi_rxdatflitv_i;
  end
  always_ff @(posedge clk_i) begin
    if (chi_rxdatflitv_i) begin
      resp_err_q <= chi_rxdatflit_i.resp_err;
      data_q     <= chi_rxdatflit_i.data;
      txn_id_q   <= chi_rxdatflit_i.txn_id;
    end
  end

  // stage 2: write flit fields and Excl into the FIFO
  assign wr_entry = '{excl: lkpt_txn_info_i, resp_err: resp_err_q,
                      data: data_q, txn_id: txn_id_q};

  rni_fwft_fifo #(.WIDTH($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .wr_en_i   (flitv_q),
    .wr_data_i (wr_entry),
    .rd_en_i   (pop),
    .rd_data_o (head),
    .valid_o   (head_valid),
    .full_o    (full)
  );

  // flit processing
  rni_vpu_error u_vpu_error (
    .excl_i     (head.excl),
    .resp_err_i (head.resp_err),
    .error_o    (ld_resp_o.error)
  );
  assign ld_resp_o.tag  = TAG_W'(head.txn_id);
  assign ld_resp_o.data = head.data;

  // control
  assign ld_resp_valid_o = head_valid;
  assign pop             = head_valid & ld_resp_ack_i;

  rni_lcrd_return #(.DEPTH(FIFO_DEPTH)) u_lcrd (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .release_i (pop),
    .lcrdv_o   (chi_rxdatlcrdv_o)
  );

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
    flitv_q |-> !full);
`endif
endmodule
