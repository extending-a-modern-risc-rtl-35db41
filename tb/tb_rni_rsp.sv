// tb_rni_rsp: self-checking test of the RSP module.
// An interconnect model sends a random mix of CompDBIDResp, DBIDResp and Comp
// (plus an occasional unrelated opcode) while it holds RXRSP credits; a table
// model answers the lookup reads with a random Excl bit per tag; a VPU model
// acknowledges store responses at a changing rate. Checks: only DBIDResp and
// CompDBIDResp become store responses, in order, with the right tag and error;
// the WDAT table write happens exactly on the acknowledged response with SrcID
// and DBID of that flit; dropped flits return their credit too (all 15 credits
// are back at the end); first store response 2 cycles after its flit.
module tb_rni_rsp;
  import rni_pkg::*;
  typedef struct packed {
    logic [TAG_W-1:0]    tag;
    logic                error;
    logic [NODEID_W-1:0] src;
    logic [TXNID_W-1:0]  dbid;
  } exp_t;

  logic clk = 1'b0, rsn = 1'b0;
  logic flitv, lcrdv, rd_en, rd_dat, st_valid, st_ack, we;
  chi_rsp_flit_t flit;
  logic [TAG_W-1:0] rd_addr, wr_addr;
  logic [NODEID_W-1:0] tgt_id;
  logic [TXNID_W-1:0] txn_id;
  vpu_rsp_t st;
  logic excl_tbl [256];
  exp_t expected [$];
  int checks = 0, failures = 0, credits = 0, sent = 0, supported = 0, received = 0;
  int n_comp = 0, n_dbid = 0, n_compdbid = 0, vpu_stalls = 0, credit_starved = 0, ack_rate = 80;
  localparam int N = 1500;

  rni_rsp dut (
    .clk_i(clk), .rsn_i(rsn),
    .chi_rxrspflitv_i(flitv), .chi_rxrspflit_i(flit), .chi_rxrsplcrdv_o(lcrdv),
    .lkpt_rd2_en_o(rd_en), .lkpt_rd2_addr_o(rd_addr), .lkpt_rd2_dat_i(rd_dat),
    .vpu_store_resp_valid_o(st_valid), .vpu_store_resp_o(st), .vpu_store_resp_ack_i(st_ack),
    .txdat_lkpt_we_o(we), .txdat_lkpt_addr_o(wr_addr), .txdat_tgt_id_o(tgt_id),
    .txdat_txn_id_o(txn_id));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rd_en) rd_dat <= excl_tbl[rd_addr];

  always @(posedge clk) if (rsn) begin
    if (lcrdv) credits++;
    if (flitv) begin
      credits--;
      if (flit.opcode == RSP_COMP_DBID || flit.opcode == RSP_DBID) begin
        // the exclusive result only counts on CompDBIDResp
        logic ex;
        ex = excl_tbl[TAG_W'(flit.txn_id)] && flit.opcode == RSP_COMP_DBID;
        expected.push_back('{tag: TAG_W'(flit.txn_id),
                             error: ex ? (flit.resp_err != 2'b01) : (flit.resp_err != 2'b00),
                             src: flit.src_id, dbid: flit.dbid});
      end
    end
    check(credits <= 15 && credits >= 0, "credit count within 0..15");
    check(we == (st_valid && st_ack), "WDAT table written exactly on an accepted store response");
    if (st_valid && !st_ack) vpu_stalls++;
    if (st_valid && st_ack) begin
      if (expected.size() == 0) check(1'b0, "store response without a DBID response");
      else begin
        check(st.tag == expected[0].tag && st.error == expected[0].error, "store response tag/error");
        check(wr_addr == expected[0].tag && tgt_id == expected[0].src && txn_id == expected[0].dbid,
              "WDAT table entry: tag, TgtID=SrcID, TxnID=DBID");
        void'(expected.pop_front());
      end
      received++;
    end
  end

  always @(negedge clk) st_ack <= ($urandom_range(0, 99) < ack_rate);

  task automatic make_flit();
    int k;
    flit = '0;
    k = $urandom_range(0, 9);
    flit.opcode = (k < 4) ? RSP_COMP_DBID : (k < 7) ? RSP_DBID : (k < 9) ? RSP_COMP : RSP_READ_RECEIPT;
    flit.txn_id   = 8'($urandom);
    flit.src_id   = 7'($urandom);
    flit.dbid     = 8'($urandom);
    flit.resp_err = ($urandom_range(0, 2) == 0) ? 2'($urandom) : 2'b00;
    if (flit.opcode == RSP_COMP) n_comp++;
    else if (flit.opcode == RSP_DBID) n_dbid++;
    else if (flit.opcode == RSP_COMP_DBID) n_compdbid++;
    if (flit.opcode == RSP_COMP_DBID || flit.opcode == RSP_DBID) supported++;
  endtask

  initial begin
    flitv = 0; flit = '0; rd_dat = 0;
    for (int i = 0; i < 256; i++) excl_tbl[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    repeat (20) @(negedge clk);
    check(credits == 15, "15 credits granted after reset");
    ack_rate = 0;
    @(negedge clk);
    make_flit(); flit.opcode = RSP_DBID; flitv = 1'b1; n_dbid++; supported++;
    @(negedge clk); flitv = 1'b0; sent++;
    check(!st_valid, "no store response 1 cycle after the flit");
    @(negedge clk);
    check(st_valid, "store response 2 cycles after the flit");
    while (sent < N) begin
      @(negedge clk);
      ack_rate = ((sent / 300) % 2 == 1) ? 5 : 80;
      if (credits > 0 && $urandom_range(0, 3) != 0) begin
        make_flit(); flitv = 1'b1; sent++;
      end else begin
        if (credits == 0) credit_starved++;
        flitv = 1'b0;
      end
    end
    @(negedge clk); flitv = 1'b0;
    ack_rate = 100;
    while (received < supported) @(negedge clk);
    repeat (20) @(negedge clk);
    check(expected.size() == 0, "all store responses delivered");
    check(credits == 15, "all credits returned, dropped flits included");
    check(n_comp > 0 && n_dbid > 0 && n_compdbid > 0, "Comp, DBIDResp and CompDBIDResp all seen");
    check(credit_starved > 0 && vpu_stalls > 0, "credit exhaustion and VPU stall happened");
    $display("flits=%0d comp=%0d dbid=%0d compdbid=%0d starved=%0d stalls=%0d",
             sent, n_comp, n_dbid, n_compdbid, credit_starved, vpu_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
