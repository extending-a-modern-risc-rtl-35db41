// rni_wdat: WDAT module of the RN-I. Takes store data from the VPU WDATA channel
// and sends it as a CHI write-data flit.
//
// The WriteData lookup table (rni_lut, one entry per tag) is written by the RSP
// module with the SrcID and DBID of the DBIDResp/CompDBIDResp of each write; they
// become the TgtID and TxnID of the data flit. Control: the VPU data is accepted
// (st_data_ack_o) when it is valid and the CHI TXDAT channel holds an L-credit;
// the credit is spent then. In that cycle the tag reads the lookup table and the
// data, byte enables and Kill flag are registered; one cycle later the flit is
// sent (txdatflitv is one cycle behind the acknowledge). Build flit: Kill=0 gives
// opcode NonCopyBackWrData with the VPU byte enables; Kill=1 gives
// WriteDataCancel with all byte enables low. TXDATFLITPEND is the acknowledge
// itself, so it rises exactly one cycle before every flit. Other fields are
// fixed at zero (HomeNID, RespErr, Resp, DataPull, DBID, CCID, DataID, TraceTag,
// DataCheck, Poison); SrcID is the node's own ID.
// The structure follows the design's WDAT circuit; the fixed values and the use
// of the acknowledge as FLITPEND are this design's choices.
module rni_wdat
  import rni_pkg::*;
#(
  parameter int unsigned LCRD_MAX = MAX_LCRD
) (
  input  logic                clk_i,
  input  logic                rsn_i,
  input  logic [NODEID_W-1:0] src_id_i,
  // WriteData lookup table write port (from RSP)
  input  logic                rxrsp_to_txdat_wr_en_i,
  input  logic [TAG_W-1:0]    rxrsp_to_txdat_wr_txn_id_i,
  input  logic [NODEID_W-1:0] rxrsp_to_txdat_src_id_i,
  input  logic [TXNID_W-1:0]  rxrsp_to_txdat_db_id_i,
  // VPU WDATA channel
  input  logic                vpu_wdat_valid_i,
  input  vpu_wdat_t           vpu_wdat_i,
  output logic                st_data_ack_o,
  // CHI TXDAT
  output logic                noc_chi_txdatflitpend_o,
  output logic                noc_chi_txdatflitv_o,
  output chi_dat_flit_t       noc_chi_txdatflit_o,
  input  logic                noc_chi_txdatlcrdv_i
);
  logic              have_credit, flit_send;
  logic              send_q, kill_q;
  logic [BE_W-1:0]   be_q;
  logic [DATA_W-1:0] data_q;
  wdat_info_t        wr_info;
  wdat_info_t        lkpt_data;

  assign wr_info = '{tgt_id: rxrsp_to_txdat_src_id_i, txn_id: rxrsp_to_txdat_db_id_i};

  rni_lut #(.DEPTH(2**TAG_W), .WIDTH($bits(wdat_info_t)), .NRD(1)) u_lut (
    .clk_i     (clk_i),
    .rsn_i     (rsn_i),
    .wr_en_i   (rxrsp_to_txdat_wr_en_i),
    .wr_addr_i (rxrsp_to_txdat_wr_txn_id_i),
    .wr_data_i (wr_info),
    .rd_en_i   (flit_send),
    .rd_addr_i (vpu_wdat_i.tag),
    .rd_data_o (lkpt_data)
  );

  rni_credit #(.MAX(LCRD_MAX)) u_credit (
    .clk_i         (clk_i),
    .rsn_i         (rsn_i),
    .lcrdv_i       (noc_chi_txdatlcrdv_i),
    .flitv_i       (flit_send),
    .have_credit_o (have_credit)
  );

  // control logic
  assign flit_send               = vpu_wdat_valid_i & have_credit;
  assign st_data_ack_o           = flit_send;
  assign noc_chi_txdatflitpend_o = flit_send;

  always_ff @(posedge clk_i) begin
    if (!rsn_i) begin
      send_q <= 1'b0;
      kill_q <= 1'b0;
      be_q   <= '0;
      data_q <= '0;
    end else begin
      send_q <= flit_send;
      if (flit_send) begin
        kill_q <= vpu_wdat_i.kill;
        be_q   <= vpu_wdat_i.be;
        data_q <= vpu_wdat_i.data;
      end
    end
  end

  // build flit
  assign noc_chi_txdatflitv_o = send_q;
  always_comb begin
    noc_chi_txdatflit_o        = '0;   // fixed fields
    noc_chi_txdatflit_o.tgt_id = lkpt_data.tgt_id;
    noc_chi_txdatflit_o.txn_id = lkpt_data.txn_id;
    noc_chi_txdatflit_o.src_id = src_id_i;
    noc_chi_txdatflit_o.opcode = kill_q ? DAT_WRITE_DATA_CANCEL : DAT_NON_COPYBACK_WR;
    noc_chi_txdatflit_o.be     = kill_q ? '0 : be_q;
    noc_chi_txdatflit_o.data   = data_q;
  end
endmodule
