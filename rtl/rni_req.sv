// rni_req: REQ module of the RN-I. Takes a request from the VPU REQ channel and
// sends it, in the same cycle, as a CHI REQ flit.
//
// Control: the request is accepted (vpu_req_ack_o) and the flit is sent
// (chi_txreqflitv_o) exactly when the VPU request is valid and the CHI REQ
// channel holds an L-credit; the same condition writes the request's Excl flag
// into the transaction lookup table at the tag's entry and spends the credit.
// There is no register on the path: a request leaves in the cycle it arrives.
// Flit: TxnID is the VPU tag, the address goes to the system address map (SAM)
// whose answer gives TgtID, opcode and MemAttr come from rni_vpu_to_chi, Excl is
// copied, Size is always 64 bytes, and every other field is fixed (QoS 0,
// Order 0: no ReadReceipt, ExpCompAck 0: no CompAck, AllowRetry 0, PCrdType 0,
// LPID 0, NS 0, SnpAttr 0, TraceTag 0).
// The structure (fixed fields, VPU-to-CHI mapping, credit counter, a control
// that forwards a request when it is valid and a credit is held) follows the
// design; the values of the fixed fields other than
// ExpCompAck and Order, and tying TXREQFLITPEND high, are this design's choices.
// The CHI address is the low CHI_ADDR_W bits of the VPU address.
module rni_req
  import rni_pkg::*;
#(
  parameter int unsigned LCRD_MAX = MAX_LCRD
) (
  input  logic                  clk_i,
  input  logic                  rsn_i,
  input  logic [NODEID_W-1:0]   src_id_i,
  // VPU REQ channel
  input  logic                  vpu_req_valid_i,
  input  vpu_req_t              vpu_req_i,
  output logic                  vpu_req_ack_o,
  // system address map
  output logic [VPU_ADDR_W-1:0] sam_target_addr_o,
  input  logic [NODEID_W-1:0]   sam_tgt_id_i,
  // CHI TXREQ
  output logic                  chi_txreqflitpend_o,
  output logic                  chi_txreqflitv_o,
  output chi_req_flit_t         chi_txreqflit_o,
  input  logic                  noc_chi_txreqlcrdv_i,
  // transaction lookup table write port
  output logic                  lkpt_wr_en_o,
  output logic [TAG_W-1:0]      lkpt_wr_addr_o,
  output logic                  lkpt_wr_d_o
);
  logic        have_credit, send;
  chi_req_op_e opcode;
  logic [3:0]  mem_attr;

  rni_vpu_to_chi u_vpu_to_chi (
    .vpu_opcode_i (vpu_req_i.opcode),
    .vpu_attr_i   (vpu_req_i.attr),
    .opcode_o     (opcode),
    .mem_attr_o   (mem_attr)
  );

  rni_credit #(.MAX(LCRD_MAX)) u_credit (
    .clk_i         (clk_i),
    .rsn_i         (rsn_i),
    .lcrdv_i       (noc_chi_txreqlcrdv_i),
    .flitv_i       (send),
    .have_credit_o (have_credit)
  );

  assign send                = vpu_req_valid_i & have_credit;
  assign vpu_req_ack_o       = send;
  assign chi_txreqflitv_o    = send;
  assign chi_txreqflitpend_o = 1'b1;

  assign lkpt_wr_en_o   = send;
  assign lkpt_wr_addr_o = vpu_req_i.tag;
  assign lkpt_wr_d_o    = vpu_req_i.excl;

  assign sam_target_addr_o = vpu_req_i.addr;

  always_comb begin
    chi_txreqflit_o               = '0;   // fixed fields
    chi_txreqflit_o.size          = SIZE_64B;
    chi_txreqflit_o.tgt_id        = sam_tgt_id_i;
    chi_txreqflit_o.src_id        = src_id_i;
    chi_txreqflit_o.txn_id        = TXNID_W'(vpu_req_i.tag);
    chi_txreqflit_o.opcode        = opcode;
    chi_txreqflit_o.addr          = vpu_req_i.addr[CHI_ADDR_W-1:0];
    chi_txreqflit_o.mem_attr      = mem_attr;
    chi_txreqflit_o.excl          = vpu_req_i.excl;
  end

`ifndef SYNTHESIS
  // Field rule of the VPU interface: no exclusive access to cacheable memory.
  a_no_excl_cacheable: assert property (@(posedge clk_i) disable iff (!rsn_i)
    vpu_req_valid_i |-> !(vpu_req_i.excl && vpu_req_i.attr == ATTR_CACHEABLE));
  // valid/ack handshake: a request stays valid and stable until acknowledged.
  a_req_stable: assert property (@(posedge clk_i) disable iff (!rsn_i)
    vpu_req_valid_i && !vpu_req_ack_o |=> vpu_req_valid_i && $stable(vpu_req_i));
`endif
endmodule
