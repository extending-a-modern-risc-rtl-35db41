// rni_top: IO-coherent AMBA 5 CHI Request Node (RN-I) for a RISC-V vector unit.
//
// The RN-I gives the vector unit's load/store unit (LSU) direct access to the
// CHI interconnect that holds the shared L2 cache. On its VPU side it has four
// simple valid/ack channels: REQ (tag, Load/Write/WritePtl, address, excl,
// attr), RDAT (load response: tag, error, 512-bit line), RSP (store response:
// tag, error) and WDATA (tag, kill, byte enables, data). On its CHI side it has
// TXREQ, RXRSP, RXDAT and TXDAT with L-credit flow control; there is no snoop
// channel and no TXRSP, since no CompAck is ever requested.
//
// Four modules each own one VPU channel and one CHI channel:
//   rni_req  VPU REQ   -> CHI TXREQ  (writes Excl into the transaction table)
//   rni_rdat CHI RXDAT -> VPU RDAT   (reads the table, port b)
//   rni_rsp  CHI RXRSP -> VPU RSP    (reads the table, port a; fills WDAT's table)
//   rni_wdat VPU WDATA -> CHI TXDAT
// A read: Load -> ReadNoSnp/ReadOnce -> CompData -> load response.
// A write: Write/WritePtl -> WriteNoSnp*/WriteUnique* -> DBIDResp or
// CompDBIDResp (Comp is dropped) -> store response -> VPU data ->
// NonCopyBackWrData, or WriteDataCancel when the VPU kills it.
// Latencies: VPU REQ to CHI REQ 0 cycles; CHI RXDAT/RXRSP to the VPU response
// 2 cycles; VPU WDATA acknowledge to CHI TXDAT 1 cycle.
// All state is reset synchronously by the active-low rsn_i; after reset the
// RN-I hands each receive channel's RX_FIFO_DEPTH credits to the interconnect
// over the following RX_FIFO_DEPTH cycles.
// The partition and data path follow the design description. The target node of
// each request is supplied from outside by a system address map (sam_* ports).
module rni_top
  import rni_pkg::*;
#(
  parameter int unsigned RX_FIFO_DEPTH = MAX_LCRD,  // entries = L-credits granted per RX channel
  parameter int unsigned TX_LCRD_MAX   = MAX_LCRD   // largest credit count held per TX channel
) (
  input  logic                  clk_i,
  input  logic                  rsn_i,
  input  logic [NODEID_W-1:0]   src_id_i,
  // VPU REQ
  input  logic                  vpu_req_valid_i,
  input  vpu_req_t              vpu_req_i,
  output logic                  vpu_req_ack_o,
  // VPU RDAT (load response)
  output logic                  vpu_rdat_valid_o,
  output vpu_rdat_t             vpu_rdat_o,
  input  logic                  vpu_rdat_ack_i,
  // VPU RSP (store response)
  output logic                  vpu_rsp_valid_o,
  output vpu_rsp_t              vpu_rsp_o,
  input  logic                  vpu_rsp_ack_i,
  // VPU WDATA
  input  logic                  vpu_wdat_valid_i,
  input  vpu_wdat_t             vpu_wdat_i,
  output logic                  vpu_wdat_ack_o,
  // system address map
  output logic [VPU_ADDR_W-1:0] sam_target_addr_o,
  input  logic [NODEID_W-1:0]   sam_tgt_id_i,
  // CHI TXREQ
  output logic                  txreqflitpend_o,
  output logic                  txreqflitv_o,
  output chi_req_flit_t         txreqflit_o,
  input  logic                  txreqlcrdv_i,
  // CHI RXRSP
  input  logic                  rxrspflitpend_i,
  input  logic                  rxrspflitv_i,
  input  chi_rsp_flit_t         rxrspflit_i,
  output logic                  rxrsplcrdv_o,
  // CHI RXDAT
  input  logic                  rxdatflitpend_i,
  input  logic                  rxdatflitv_i,
  input  chi_dat_flit_t         rxdatflit_i,
  output logic                  rxdatlcrdv_o,
  // CHI TXDAT
  output logic                  txdatflitpend_o,
  output logic                  txdatflitv_o,
  output chi_dat_flit_t         txdatflit_o,
  input  logic                  txdatlcrdv_i
);
  // FLITPEND of the receive channels is an early hint only; the RN-I does not
  // gate its clock, so it has no use for it.
  logic unused_pend;
  assign unused_pend = rxrspflitpend_i ^ rxdatflitpend_i;

  // transaction lookup table: write from REQ, read port a (0) for RSP, b (1) for RDAT
  logic                  lkpt_wr_en, lkpt_wr_d;
  logic [TAG_W-1:0]      lkpt_wr_addr;
  logic [1:0]            lkpt_rd_en;
  logic [1:0][TAG_W-1:0] lkpt_rd_addr;
  logic [1:0][0:0]       lkpt_rd_data;

  // RSP -> WDAT transaction information
  logic                  txdat_we;
  logic [TAG_W-1:0]      txdat_addr;
  logic [NODEID_W-1:0]   txdat_tgt_id;
  logic [TXNID_W-1:0]    txdat_txn_id;

  rni_req #(.LCRD_MAX(TX_LCRD_MAX)) u_req (
    .clk_i                (clk_i),
    .rsn_i                (rsn_i),
    .src_id_i             (src_id_i),
    .vpu_req_valid_i      (vpu_req_valid_i),
    .vpu_req_i            (vpu_req_i),
    .vpu_req_ack_o        (vpu_req_ack_o),
    .sam_target_addr_o    (sam_target_addr_o),
    .sam_tgt_id_i         (sam_tgt_id_i),
    .chi_txreqflitpend_o  (txreqflitpend_o),
    .chi_txreqflitv_o     (txreqflitv_o),
    .chi_txreqflit_o      (txreqflit_o),
    .noc_chi_txreqlcrdv_i (txreqlcrdv_i),
    .lkpt_wr_en_o         (lkpt_wr_en),
    .lkpt_wr_addr_o       (lkpt_wr_addr),
    .lkpt_wr_d_o          (lkpt_wr_d)
  );

  rni_lut #(.DEPTH(2**TAG_W), .WIDTH(1), .NRD(2)) u_txn_lut (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .wr_en_i   (lkpt_wr_en),
    .wr_addr_i (lkpt_wr_addr),
    .wr_data_i (lkpt_wr_d),
    .rd_en_i   (lkpt_rd_en),
    .rd_addr_i (lkpt_rd_addr),
    .rd_data_o (lkpt_rd_data)
  );

  rni_rsp #(.FIFO_DEPTH(RX_FIFO_DEPTH)) u_rsp (
    .clk_i                  (clk_i),
    .rsn_i                  (rsn_i),
    .chi_rxrspflitv_i       (rxrspflitv_i),
    .chi_rxrspflit_i        (rxrspflit_i),
    .chi_rxrsplcrdv_o       (rxrsplcrdv_o),
    .lkpt_rd2_en_o          (lkpt_rd_en[0]),
    .lkpt_rd2_addr_o        (lkpt_rd_addr[0]),
    .lkpt_rd2_dat_i         (lkpt_rd_data[0][0]),
    .vpu_store_resp_valid_o (vpu_rsp_valid_o),
    .vpu_store_resp_o       (vpu_rsp_o),
    .vpu_store_resp_ack_i   (vpu_rsp_ack_i),
    .txdat_lkpt_we_o        (txdat_we),
    .txdat_lkpt_addr_o      (txdat_addr),
    .txdat_tgt_id_o         (txdat_tgt_id),
    .txdat_txn_id_o         (txdat_txn_id)
  );

  rni_rdat #(.FIFO_DEPTH(RX_FIFO_DEPTH)) u_rdat (
    .clk_i            (clk_i),
    .rsn_i            (rsn_i),
    .chi_rxdatflitv_i (rxdatflitv_i),
    .chi_rxdatflit_i  (rxdatflit_i),
    .chi_rxdatlcrdv_o (rxdatlcrdv_o),
    .lkpt_rd1_en_o    (lkpt_rd_en[1]),
    .lkpt_rd1_addr_o  (lkpt_rd_addr[1]),
    .lkpt_txn_info_i  (lkpt_rd_data[1][0]),
    .ld_resp_valid_o  (vpu_rdat_valid_o),
    .ld_resp_o        (vpu_rdat_o),
    .ld_resp_ack_i    (vpu_rdat_ack_i)
  );

  rni_wdat #(.LCRD_MAX(TX_LCRD_MAX)) u_wdat (
    .clk_i                      (clk_i),
    .rsn_i                      (rsn_i),
    .src_id_i                   (src_id_i),
    .rxrsp_to_txdat_wr_en_i     (txdat_we),
    .rxrsp_to_txdat_wr_txn_id_i (txdat_addr),
    .rxrsp_to_txdat_src_id_i    (txdat_tgt_id),
    .rxrsp_to_txdat_db_id_i     (txdat_txn_id),
    .vpu_wdat_valid_i           (vpu_wdat_valid_i),
    .vpu_wdat_i                 (vpu_wdat_i),
    .st_data_ack_o              (vpu_wdat_ack_o),
    .noc_chi_txdatflitpend_o    (txdatflitpend_o),
    .noc_chi_txdatflitv_o       (txdatflitv_o),
    .noc_chi_txdatflit_o        (txdatflit_o),
    .noc_chi_txdatlcrdv_i       (txdatlcrdv_i)
  );
endmodule
