// tb_rni_wdat: self-checking test of the WDAT module.
// The test fills the WriteData table through the RSP-side write port with random
// TgtID/DBID per tag while a VPU model sends store data (random tag, byte
// enables, data, and Kill on about one in four) and an interconnect model grants
// TXDAT credits at a changing rate. Checks: data is accepted exactly when valid
// and a credit is held; the flit leaves exactly one cycle after the acknowledge,
// with FLITPEND high in the cycle before; TgtID/TxnID are the table entry of the
// tag at acknowledge time; Kill gives WriteDataCancel with zero byte enables,
// otherwise NonCopyBackWrData with the VPU byte enables; data and SrcID carried.
module tb_rni_wdat;
  import rni_pkg::*;
  logic clk = 1'b0, rsn = 1'b0;
  logic [NODEID_W-1:0] src_id = 7'h05;
  logic wr_en, valid, ack, pend, flitv, lcrdv;
  logic [TAG_W-1:0] wr_tag;
  logic [NODEID_W-1:0] wr_src;
  logic [TXNID_W-1:0] wr_dbid;
  vpu_wdat_t wd;
  chi_dat_flit_t flit;
  wdat_info_t info [256];
  chi_dat_flit_t expected [$];
  int checks = 0, failures = 0, credits = 0, sent = 0, kills = 0, stalls = 0, rate = 60;
  int buffers_free = 15, occupied = 0;
  bit prev_ack = 0;
  localparam int N = 2000;

  rni_wdat dut (
    .clk_i(clk), .rsn_i(rsn), .src_id_i(src_id),
    .rxrsp_to_txdat_wr_en_i(wr_en), .rxrsp_to_txdat_wr_txn_id_i(wr_tag),
    .rxrsp_to_txdat_src_id_i(wr_src), .rxrsp_to_txdat_db_id_i(wr_dbid),
    .vpu_wdat_valid_i(valid), .vpu_wdat_i(wd), .st_data_ack_o(ack),
    .noc_chi_txdatflitpend_o(pend), .noc_chi_txdatflitv_o(flitv), .noc_chi_txdatflit_o(flit),
    .noc_chi_txdatlcrdv_i(lcrdv));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rsn) begin
    chi_dat_flit_t e;
    check(ack == (valid && credits > 0), "data accepted iff valid and credit");
    check(pend == ack, "FLITPEND is the acknowledge");
    check(flitv == prev_ack, "flit one cycle after acknowledge");
    if (flitv) begin
      if (expected.size() == 0) check(1'b0, "flit without data");
      else begin
        check(flit == expected[0], "write-data flit contents");
        void'(expected.pop_front());
      end
      occupied++;
    end
    if (ack) begin
      e = '0;
      e.tgt_id = info[wd.tag].tgt_id;
      e.txn_id = info[wd.tag].txn_id;
      e.src_id = src_id;
      e.opcode = wd.kill ? DAT_WRITE_DATA_CANCEL : DAT_NON_COPYBACK_WR;
      e.be     = wd.kill ? '0 : wd.be;
      e.data   = wd.data;
      expected.push_back(e);
      credits--; sent++;
      if (wd.kill) kills++;
    end
    if (wr_en) info[wr_tag] = '{tgt_id: wr_src, txn_id: wr_dbid};
    if (lcrdv) begin credits++; buffers_free--; end
    if (occupied > 0 && $urandom_range(0, 99) < rate) begin occupied--; buffers_free++; end
    if (valid && credits == 0) stalls++;
    prev_ack = ack;
  end
  always @(negedge clk) lcrdv <= rsn && (buffers_free > 0) && ($urandom_range(0, 1) == 1);

  task automatic new_data();
    wd.tag  = 8'($urandom_range(0, 31));
    wd.kill = ($urandom_range(0, 3) == 0);
    wd.be   = {$urandom, $urandom};
    for (int w = 0; w < DATA_W / 32; w++) wd.data[w*32 +: 32] = $urandom;
  endtask

  initial begin
    valid = 0; wd = '0; wr_en = 0; wr_tag = 0; wr_src = 0; wr_dbid = 0; lcrdv = 0;
    for (int i = 0; i < 256; i++) info[i] = '0;
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    while (sent < N) begin
      @(negedge clk);
      if (prev_ack) valid = 1'b0;     // previous data taken at the last edge
      rate = ((sent / 400) % 2 == 1) ? 8 : 70;
      wr_en   = 1'($urandom_range(0, 1));
      wr_tag  = 8'($urandom_range(0, 31));
      wr_src  = 7'($urandom);
      wr_dbid = 8'($urandom);
      if (!valid && $urandom_range(0, 3) != 0) begin new_data(); valid = 1'b1; end
    end
    @(negedge clk); valid = 1'b0; wr_en = 1'b0;
    repeat (5) @(negedge clk);
    check(expected.size() == 0, "every accepted data word sent");
    check(kills > 0 && stalls > 0, "cancellation and credit exhaustion happened");
    $display("sent=%0d kills=%0d credit_stalls=%0d", sent, kills, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
