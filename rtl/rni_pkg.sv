// rni_pkg: types and constants shared by the IO-coherent CHI Request Node (RN-I).
//
// The RN-I sits between the load/store unit (LSU) of a RISC-V vector unit and an
// AMBA 5 CHI (issue C) interconnect. Two sets of types live here:
//   * the simple VPU-side channels (REQ, RDAT, RSP, WDATA) with the field widths
//     of the VPU interface: 8-bit tag, 2-bit opcode, 56-bit address, 512-bit data,
//     64-bit byte enable, 1-bit excl/attr/error/kill;
//   * the CHI flits the RN-I sends (TXREQ, TXDAT) and receives (RXRSP, RXDAT).
// The VPU-side widths and the CHI opcode/MemAttr mapping follow the design
// description. The CHI flit field widths are the CHI issue C ones; the node-ID
// width (7) and the CHI address width (52) are this design's choices. The VPU
// opcode encodings are this design's choice (Load=0, Write=1, WritePtl=2).
// A lint run on this package by itself reports its constants as unused. The
// modules that import the package use them. ATTR_DEVICE, RESPERR_DERR and
// RESPERR_NDERR are kept so that the encodings are written down in one place;
// the testbenches use them.
package rni_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned TAG_W      = 8;    // VPU transaction tag
  localparam int unsigned VPU_ADDR_W = 56;   // VPU request address
  localparam int unsigned DATA_W     = 512;  // one cache line per transfer
  localparam int unsigned BE_W       = DATA_W / 8;
  localparam int unsigned NODEID_W   = 7;
  localparam int unsigned TXNID_W    = 8;
  localparam int unsigned CHI_ADDR_W = 52;
  localparam int unsigned MAX_LCRD   = 15;   // largest L-credit count a CHI receiver may grant

  // ---------------------------------------------------------------- VPU side
  typedef enum logic [1:0] {
    VPU_LOAD      = 2'd0,
    VPU_WRITE     = 2'd1,
    VPU_WRITE_PTL = 2'd2
  } vpu_op_e;

  // attr: 0 = Device (non-snoopable), 1 = Cacheable (snoopable)
  localparam logic ATTR_DEVICE    = 1'b0;
  localparam logic ATTR_CACHEABLE = 1'b1;

  typedef struct packed {
    logic [TAG_W-1:0]      tag;
    vpu_op_e               opcode;
    logic [VPU_ADDR_W-1:0] addr;
    logic                  excl;
    logic                  attr;
  } vpu_req_t;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic              error;
    logic [DATA_W-1:0] data;
  } vpu_rdat_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             error;
  } vpu_rsp_t;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic              kill;
    logic [BE_W-1:0]   be;
    logic [DATA_W-1:0] data;
  } vpu_wdat_t;

  // ---------------------------------------------------------------- CHI opcodes
  typedef enum logic [5:0] {
    REQ_READ_ONCE         = 6'h03,
    REQ_READ_NO_SNP       = 6'h04,
    REQ_WRITE_UNIQUE_PTL  = 6'h18,
    REQ_WRITE_UNIQUE_FULL = 6'h19,
    REQ_WRITE_NO_SNP_PTL  = 6'h1C,
    REQ_WRITE_NO_SNP_FULL = 6'h1D
  } chi_req_op_e;

  typedef enum logic [3:0] {
    RSP_LCRD_RETURN  = 4'h0,
    RSP_SNP_RESP     = 4'h1,
    RSP_COMP_ACK     = 4'h2,
    RSP_RETRY_ACK    = 4'h3,
    RSP_COMP         = 4'h4,
    RSP_COMP_DBID    = 4'h5,
    RSP_DBID         = 4'h6,
    RSP_PCRD_GRANT   = 4'h7,
    RSP_READ_RECEIPT = 4'h8
  } chi_rsp_op_e;

  typedef enum logic [2:0] {
    DAT_LCRD_RETURN       = 3'h0,
    DAT_NON_COPYBACK_WR   = 3'h3,
    DAT_COMP_DATA         = 3'h4,
    DAT_WRITE_DATA_CANCEL = 3'h7
  } chi_dat_op_e;

  // RespErr encodings
  localparam logic [1:0] RESPERR_OK    = 2'b00;
  localparam logic [1:0] RESPERR_EXOK  = 2'b01;
  localparam logic [1:0] RESPERR_DERR  = 2'b10;
  localparam logic [1:0] RESPERR_NDERR = 2'b11;

  // MemAttr values of the VPU-to-CHI mapping: {Allocate, Cacheable, Device, EWA}
  localparam logic [3:0] MEMATTR_DEVICE    = 4'b0010;
  localparam logic [3:0] MEMATTR_CACHEABLE = 4'b0100;

  localparam logic [2:0] SIZE_64B = 3'b110;

  // ---------------------------------------------------------------- CHI flits
  typedef struct packed {
    logic [3:0]            qos;
    logic [NODEID_W-1:0]   tgt_id;
    logic [NODEID_W-1:0]   src_id;
    logic [TXNID_W-1:0]    txn_id;
    logic [NODEID_W-1:0]   return_nid;
    logic                  endian;
    logic [TXNID_W-1:0]    return_txn_id;
    chi_req_op_e           opcode;
    logic [2:0]            size;
    logic [CHI_ADDR_W-1:0] addr;
    logic                  ns;
    logic                  likely_shared;
    logic                  allow_retry;
    logic [1:0]            order;
    logic [3:0]            pcrd_type;
    logic [3:0]            mem_attr;
    logic                  snp_attr;
    logic [4:0]            lpid;
    logic                  excl;
    logic                  exp_comp_ack;
    logic                  trace_tag;
  } chi_req_flit_t;

  typedef struct packed {
    logic [3:0]          qos;
    logic [NODEID_W-1:0] tgt_id;
    logic [NODEID_W-1:0] src_id;
    logic [TXNID_W-1:0]  txn_id;
    chi_rsp_op_e         opcode;
    logic [1:0]          resp_err;
    logic [2:0]          resp;
    logic [2:0]          fwd_state;
    logic [TXNID_W-1:0]  dbid;
    logic [3:0]          pcrd_type;
    logic                trace_tag;
  } chi_rsp_flit_t;

  typedef struct packed {
    logic [3:0]          qos;
    logic [NODEID_W-1:0] tgt_id;
    logic [NODEID_W-1:0] src_id;
    logic [TXNID_W-1:0]  txn_id;
    logic [NODEID_W-1:0] home_nid;
    chi_dat_op_e         opcode;
    logic [1:0]          resp_err;
    logic [2:0]          resp;
    logic [2:0]          fwd_state;
    logic [TXNID_W-1:0]  dbid;
    logic [1:0]          ccid;
    logic [1:0]          data_id;
    logic                trace_tag;
    logic [BE_W-1:0]     be;
    logic [DATA_W-1:0]   data;
    logic [BE_W-1:0]     data_check;
    logic [BE_W/8-1:0]   poison;
  } chi_dat_flit_t;

  // Information the WDAT lookup table keeps per tag (filled from DBIDResp/CompDBIDResp)
  typedef struct packed {
    logic [NODEID_W-1:0] tgt_id;  // SrcID of the response
    logic [TXNID_W-1:0]  txn_id;  // DBID of the response
  } wdat_info_t;

endpackage
