// rni_rsp: RSP module of the RN-I. Receives CHI responses to write requests and
// tells the VPU, through its RSP channel, that the write data may be sent.
//
// CHI RX logic is the same two-stage pipeline as in rni_rdat: the TxnID of an
// arriving flit addresses the transaction lookup table (read port lkpt_rd2), the
// flit is registered, and in the next cycle Opcode, RespErr, TxnID, SrcID, DBID
// and the returned Excl bit are written into a first-word fall-through FIFO.
// Control (detection / actuation), on the FIFO head:
//   flit_supported = opcode is CompDBIDResp or DBIDResp
//   flit_drop      = valid & ~flit_supported        (Comp and anything else)
//   flit_pend      = valid &  flit_supported        -> store response valid
//   flit_send      = flit_pend & store-response ack -> write WDAT lookup table
//   flit_processed = flit_drop | flit_send          -> pop FIFO, return L-credit
// The WDAT lookup table is written at the tag (TxnID) with the response's SrcID
// (future TgtID of the write data) and DBID (future TxnID of the write data).
// The store response error comes from rni_vpu_error. Minimum latency from
// rxrspflitv to the store response is 2 cycles.
// The response fields the RN-I has no use for (QoS, TgtID, Resp, FwdState,
// PCrdType, TraceTag) are ignored, so a lint run reports those input bits as
// unused.
// This follows the design's RSP circuit and control logic. This design's own
// choices: the Excl bit is only applied to CompDBIDResp (a separate DBIDResp
// carries no exclusive result, which travels on the dropped Comp), and the
// initial grant of FIFO_DEPTH credits after reset.
module rni_rsp
  import rni_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = MAX_LCRD
) (
  input  logic                clk_i,
  input  logic                rsn_i,
  // CHI RXRSP
  input  logic                chi_rxrspflitv_i,
  input  chi_rsp_flit_t       chi_rxrspflit_i,
  output logic                chi_rxrsplcrdv_o,
  // transaction lookup table read port
  output logic                lkpt_rd2_en_o,
  output logic [TAG_W-1:0]    lkpt_rd2_addr_o,
  input  logic                lkpt_rd2_dat_i,      // Excl, one cycle after the read
  // VPU RSP channel
  output logic                vpu_store_resp_valid_o,
  output vpu_rsp_t            vpu_store_resp_o,
  input  logic                vpu_store_resp_ack_i,
  // WDAT lookup table write port
  output logic                txdat_lkpt_we_o,
  output logic [TAG_W-1:0]    txdat_lkpt_addr_o,
  output logic [NODEID_W-1:0] txdat_tgt_id_o,
  output logic [TXNID_W-1:0]  txdat_txn_id_o
);
  // flit fields kept by stage 1
  typedef struct packed {
    chi_rsp_op_e         opcode;
    logic [1:0]          resp_err;
    logic [TXNID_W-1:0]  txn_id;
    logic [NODEID_W-1:0] src_id;
    logic [TXNID_W-1:0]  dbid;
  } fields_t;

  typedef struct packed {
    logic    excl;
    fields_t f;
  } entry_t;

  logic          flitv_q;
  fields_t       fields_q;
  entry_t        wr_entry, head;
  logic          valid, full;
  logic          flit_supported, flit_drop, flit_pend, flit_send, flit_processed;

  // stage 1
  assign lkpt_rd2_en_o   = chi_rxrspflitv_i;
  assign lkpt_rd2_addr_o = TAG_W'(chi_rxrspflit_i.txn_id);

  always_ff @(posedge clk_i) begin
    if (!rsn_i) flitv_q <= 1'b0;
    else        flitv_q <= chi_rxrspflitv_i;
  end
  always_ff @(posedge clk_i) begin
    if (chi_rxrspflitv_i)
      fields_q <= '{opcode: chi_rxrspflit_i.opcode, resp_err: chi_rxrspflit_i.resp_err,
                    txn_id: chi_rxrspflit_i.txn_id, src_id: chi_rxrspflit_i.src_id,
                    dbid: chi_rxrspflit_i.dbid};
  end

  // stage 2
  assign wr_entry = '{excl: lkpt_rd2_dat_i, f: fields_q};

  rni_fwft_fifo #(.WIDTH($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .wr_en_i   (flitv_q),
    .wr_data_i (wr_entry),
    .rd_en_i   (flit_processed),
    .rd_data_o (head),
    .valid_o   (valid),
    .full_o    (full)
  );

  // flit processing
  rni_vpu_error u_vpu_error (
    .excl_i     (head.excl && head.f.opcode == RSP_COMP_DBID),
    .resp_err_i (head.f.resp_err),
    .error_o    (vpu_store_resp_o.error)
  );
  assign vpu_store_resp_o.tag = TAG_W'(head.f.txn_id);

  // control logic: detection
  assign flit_supported = (head.f.opcode == RSP_COMP_DBID) || (head.f.opcode == RSP_DBID);
  assign flit_drop      = valid & ~flit_supported;
  assign flit_pend      = valid &  flit_supported;
  // control logic: actuation
  assign vpu_store_resp_valid_o = flit_pend;
  assign flit_send              = flit_pend & vpu_store_resp_ack_i;
  assign flit_processed         = flit_drop | flit_send;

  assign txdat_lkpt_we_o   = flit_send;
  assign txdat_lkpt_addr_o = TAG_W'(head.f.txn_id);
  assign txdat_tgt_id_o    = head.f.src_id;
  assign txdat_txn_id_o    = head.f.dbid;

  rni_lcrd_return #(.DEPTH(FIFO_DEPTH)) u_lcrd (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .release_i (flit_processed),
    .lcrdv_o   (chi_rxrsplcrdv_o)
  );

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
    flitv_q |-> !full);
`endif
endmodule
