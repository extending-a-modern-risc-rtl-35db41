// tb_rni_multi: two RN-Is sharing one home node, each driven by its own test
// pattern. This is the "multiple request nodes" set-up of a small 2x2 mesh:
// two RN-Is, one home node with its memory, and no other traffic.
//
// Both rni_top instances use their default parameters and differ only in their
// node ID (1 and 2). Each is driven by a tb_vpu_pattern with its own ID. The
// patterns use disjoint address regions and data sets, and each checks that
// every load returns its own last store. The home-node model in this file
// serves both nodes:
//   * it takes requests from both TXREQ channels into one queue and serves them
//     in random order;
//   * it sends each CompData or DBIDResp/CompDBIDResp/Comp to the node named by
//     the request's SrcID, so a wrong SrcID shows up as a lost or misrouted
//     response;
//   * it hands out DBIDs from one shared pool and checks that write data
//     arrives from the node the DBID was given to;
//   * it grants and counts L-credits per node and per channel. Its credit rate
//     alternates between fast and slow phases.
// The system address map sends every address to a single home node (ID 4)
// during the first half of the operations. In the second half it spreads the
// lines over sixteen home-node IDs (0x20-0x2F, line address bits [9:6]), as in
// a larger mesh with many home nodes. The model then answers for each of them
// under that node's ID, and the test checks that write data goes to the node
// that issued its DBID.
// The test counts cycles in which the home node holds requests from both nodes
// at once, credit stalls, exhausted receive credits, dropped Comps and
// WriteDataCancels, and fails if any of them never happened.
module tb_rni_multi;
  import rni_pkg::*;

  localparam int NRN = 2;
  localparam logic [NODEID_W-1:0] HN_ID   = 7'h04;  // the single home node
  localparam logic [NODEID_W-1:0] HN_BASE = 7'h20;  // first of sixteen home nodes

  logic clk = 1'b0, rsn = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // per-node signals
  logic          req_valid [NRN], req_ack [NRN], rdat_valid [NRN], rdat_ack [NRN];
  logic          rsp_valid [NRN], rsp_ack [NRN], wdat_valid [NRN], wdat_ack [NRN];
  vpu_req_t      req [NRN];
  vpu_rdat_t     rdat [NRN];
  vpu_rsp_t      rsp [NRN];
  vpu_wdat_t     wdat [NRN];
  logic          txreqpend [NRN], txreqv [NRN], txreqlcrdv [NRN];
  logic          rxrspv [NRN], rxrsplcrdv [NRN], rxdatv [NRN], rxdatlcrdv [NRN];
  logic          txdatpend [NRN], txdatv [NRN], txdatlcrdv [NRN];
  chi_req_flit_t txreq [NRN];
  chi_rsp_flit_t rxrsp [NRN];
  chi_dat_flit_t rxdat [NRN], txdat [NRN];
  logic [VPU_ADDR_W-1:0] sam_addr [NRN];
  logic [NODEID_W-1:0]   sam_tgt [NRN];
  bit                    many_hn = 1'b0;   // second half: sixteen home nodes

  // system address map: one home node, or sixteen interleaved on line bits [9:6]
  function automatic logic [NODEID_W-1:0] sam(input logic [CHI_ADDR_W-1:0] a);
    return many_hn ? (HN_BASE | NODEID_W'(a[9:6])) : HN_ID;
  endfunction
  always_comb for (int n = 0; n < NRN; n++) sam_tgt[n] = sam(CHI_ADDR_W'(sam_addr[n]));
  logic          done [NRN];
  int            p_checks [NRN], p_failures [NRN], p_cancels [NRN], p_ops [NRN];

  for (genvar i = 0; i < NRN; i++) begin : g_node
    rni_top u_rni (
      .clk_i(clk), .rsn_i(rsn), .src_id_i(NODEID_W'(i + 1)),
      .vpu_req_valid_i(req_valid[i]), .vpu_req_i(req[i]), .vpu_req_ack_o(req_ack[i]),
      .vpu_rdat_valid_o(rdat_valid[i]), .vpu_rdat_o(rdat[i]), .vpu_rdat_ack_i(rdat_ack[i]),
      .vpu_rsp_valid_o(rsp_valid[i]), .vpu_rsp_o(rsp[i]), .vpu_rsp_ack_i(rsp_ack[i]),
      .vpu_wdat_valid_i(wdat_valid[i]), .vpu_wdat_i(wdat[i]), .vpu_wdat_ack_o(wdat_ack[i]),
      .sam_target_addr_o(sam_addr[i]), .sam_tgt_id_i(sam_tgt[i]),
      .txreqflitpend_o(txreqpend[i]), .txreqflitv_o(txreqv[i]), .txreqflit_o(txreq[i]),
      .txreqlcrdv_i(txreqlcrdv[i]),
      .rxrspflitpend_i(1'b1), .rxrspflitv_i(rxrspv[i]), .rxrspflit_i(rxrsp[i]),
      .rxrsplcrdv_o(rxrsplcrdv[i]),
      .rxdatflitpend_i(1'b1), .rxdatflitv_i(rxdatv[i]), .rxdatflit_i(rxdat[i]),
      .rxdatlcrdv_o(rxdatlcrdv[i]),
      .txdatflitpend_o(txdatpend[i]), .txdatflitv_o(txdatv[i]), .txdatflit_o(txdat[i]),
      .txdatlcrdv_i(txdatlcrdv[i]));

    tb_vpu_pattern #(.ID(i)) u_pattern (
      .clk_i(clk), .rsn_i(rsn),
      .req_valid_o(req_valid[i]), .req_o(req[i]), .req_ack_i(req_ack[i]),
      .rdat_valid_i(rdat_valid[i]), .rdat_i(rdat[i]), .rdat_ack_o(rdat_ack[i]),
      .rsp_valid_i(rsp_valid[i]), .rsp_i(rsp[i]), .rsp_ack_o(rsp_ack[i]),
      .wdat_valid_o(wdat_valid[i]), .wdat_o(wdat[i]), .wdat_ack_i(wdat_ack[i]),
      .done_o(done[i]), .checks_o(p_checks[i]), .failures_o(p_failures[i]),
      .cancels_o(p_cancels[i]), .ops_o(p_ops[i]));
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks[0] + p_checks[1],
             failures + p_failures[0] + p_failures[1]);
    $finish;
  end

  // =================================================================== home node model
  typedef logic [CHI_ADDR_W-7:0] line_t;
  logic [DATA_W-1:0] hn_mem [line_t];
  chi_req_flit_t     hn_reqs [$];
  chi_rsp_flit_t     rsp_out0 [$], rsp_out1 [$];
  chi_dat_flit_t     dat_out0 [$], dat_out1 [$];
  int  req_free [NRN], dat_free [NRN], rsp_cred [NRN], dcred [NRN];
  bit  dbid_busy [256];
  line_t dbid_line [256];
  int  dbid_rn [256];
  logic [NODEID_W-1:0] dbid_hn [256];
  bit  hn_seen [32];
  logic [7:0] next_dbid = 0;
  int  cycle = 0, credit_rate = 60;
  int  c_both = 0, c_req_stall = 0, c_dat_stall = 0, c_rx_starved = 0, c_comp_drop = 0;

  function automatic logic [DATA_W-1:0] mem_rd(input line_t l);
    return hn_mem.exists(l) ? hn_mem[l] : '0;
  endfunction

  function automatic int queued_rsp(input int n);
    return (n == 0) ? rsp_out0.size() : rsp_out1.size();
  endfunction
  function automatic int queued_dat(input int n);
    return (n == 0) ? dat_out0.size() : dat_out1.size();
  endfunction

  task automatic push_rsp(input int n, input chi_rsp_flit_t r);
    if (n == 0) rsp_out0.push_back(r); else rsp_out1.push_back(r);
  endtask
  task automatic push_dat(input int n, input chi_dat_flit_t d);
    if (n == 0) dat_out0.push_back(d); else dat_out1.push_back(d);
  endtask

  always @(posedge clk) if (rsn) begin
    bit from [NRN];
    cycle++;
    credit_rate = ((cycle / 400) % 2 == 0) ? 60 : 5;
    for (int n = 0; n < NRN; n++) begin
      if (req_valid[n] && !req_ack[n]) c_req_stall++;
      if (wdat_valid[n] && !wdat_ack[n]) c_dat_stall++;
      if (txdatv[n]) begin
        line_t l;
        dat_free[n]++;
        check(txdat[n].tgt_id == dbid_hn[txdat[n].txn_id] && txdat[n].src_id == NODEID_W'(n + 1),
              "write data goes to the home node that gave the DBID");
        check(dbid_busy[txdat[n].txn_id] && dbid_rn[txdat[n].txn_id] == n,
              "write data uses a DBID given to this node");
        l = dbid_line[txdat[n].txn_id];
        if (txdat[n].opcode == DAT_WRITE_DATA_CANCEL) begin
          check(txdat[n].be == '0, "WriteDataCancel has no byte enables");
        end else begin
          logic [DATA_W-1:0] d;
          check(txdat[n].opcode == DAT_NON_COPYBACK_WR, "write data opcode");
          d = mem_rd(l);
          for (int b = 0; b < BE_W; b++) if (txdat[n].be[b]) d[b*8 +: 8] = txdat[n].data[b*8 +: 8];
          hn_mem[l] = d;
        end
        dbid_busy[txdat[n].txn_id] = 1'b0;
      end
      if (txreqv[n]) begin
        check(txreq[n].src_id == NODEID_W'(n + 1) && txreq[n].tgt_id == sam(txreq[n].addr),
              "request node IDs");
        hn_seen[int'(txreq[n].tgt_id) % 32] = 1'b1;
        hn_reqs.push_back(txreq[n]);
      end
      if (rxrsplcrdv[n]) rsp_cred[n]++;
      if (rxdatlcrdv[n]) dcred[n]++;
      if (rxrspv[n]) rsp_cred[n]--;
      if (rxdatv[n]) dcred[n]--;
      check(rsp_cred[n] inside {[0:15]} && dcred[n] inside {[0:15]}, "receive credits within 0..15");
      if ((queued_rsp(n) != 0 && rsp_cred[n] == 0) || (queued_dat(n) != 0 && dcred[n] == 0))
        c_rx_starved++;
    end
    from[0] = 1'b0;
    from[1] = 1'b0;
    foreach (hn_reqs[k]) if (hn_reqs[k].src_id inside {7'd1, 7'd2}) from[int'(hn_reqs[k].src_id) - 1] = 1'b1;
    if (from[0] && from[1]) c_both++;
    // serve one waiting request, chosen at random
    if (hn_reqs.size() != 0 && $urandom_range(0, 99) < 70) begin
      int k, n;
      chi_req_flit_t f;
      k = $urandom_range(0, hn_reqs.size() - 1);
      f = hn_reqs[k];
      hn_reqs.delete(k);
      n = int'(f.src_id) - 1;
      req_free[n]++;
      if (f.opcode == REQ_READ_NO_SNP || f.opcode == REQ_READ_ONCE) begin
        chi_dat_flit_t d;
        d = '0;
        d.opcode = DAT_COMP_DATA;
        d.tgt_id = f.src_id;
        d.src_id = f.tgt_id;
        d.txn_id = f.txn_id;
        d.data   = mem_rd(f.addr[CHI_ADDR_W-1:6]);
        push_dat(n, d);
      end else begin
        chi_rsp_flit_t r;
        int guard;
        guard = 0;
        while (dbid_busy[next_dbid] && guard < 300) begin next_dbid++; guard++; end
        dbid_busy[next_dbid] = 1'b1;
        dbid_line[next_dbid] = f.addr[CHI_ADDR_W-1:6];
        dbid_rn[next_dbid]   = n;
        dbid_hn[next_dbid]   = f.tgt_id;
        r = '0;
        r.tgt_id = f.src_id;
        r.src_id = f.tgt_id;
        r.txn_id = f.txn_id;
        r.dbid   = next_dbid;
        next_dbid++;
        if ($urandom_range(0, 1) == 0) begin
          r.opcode = RSP_COMP_DBID;
          push_rsp(n, r);
        end else begin
          chi_rsp_flit_t c;
          c = r;
          c.opcode = RSP_COMP;
          c.dbid   = '0;
          r.opcode = RSP_DBID;
          if ($urandom_range(0, 1) == 0) begin push_rsp(n, c); push_rsp(n, r); end
          else begin push_rsp(n, r); push_rsp(n, c); end
          c_comp_drop++;
        end
      end
    end
  end

  // home-node outputs change at the falling edge
  always @(negedge clk) begin
    for (int n = 0; n < NRN; n++) begin
      txreqlcrdv[n] <= 1'b0;
      txdatlcrdv[n] <= 1'b0;
      rxrspv[n]     <= 1'b0;
      rxdatv[n]     <= 1'b0;
      if (rsn) begin
        if (req_free[n] > 0 && $urandom_range(0, 99) < credit_rate) begin
          txreqlcrdv[n] <= 1'b1; req_free[n]--;
        end
        if (dat_free[n] > 0 && $urandom_range(0, 99) < credit_rate) begin
          txdatlcrdv[n] <= 1'b1; dat_free[n]--;
        end
        if (queued_rsp(n) != 0 && rsp_cred[n] > 0 && $urandom_range(0, 3) != 0) begin
          rxrspv[n] <= 1'b1;
          rxrsp[n]  <= (n == 0) ? rsp_out0.pop_front() : rsp_out1.pop_front();
        end
        if (queued_dat(n) != 0 && dcred[n] > 0 && $urandom_range(0, 3) != 0) begin
          rxdatv[n] <= 1'b1;
          rxdat[n]  <= (n == 0) ? dat_out0.pop_front() : dat_out1.pop_front();
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NRN; n++) begin
      req_free[n] = 15; dat_free[n] = 15; rsp_cred[n] = 0; dcred[n] = 0;
      rxrsp[n] = '0; rxdat[n] = '0;
    end
    for (int i = 0; i < 256; i++) dbid_busy[i] = 1'b0;
    for (int i = 0; i < 32; i++) hn_seen[i] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rsn = 1'b1;
    // switch to sixteen home nodes once half of the operations have been issued
    while (p_ops[0] + p_ops[1] < 512) @(negedge clk);
    many_hn = 1'b1;
    while (!(done[0] && done[1])) @(negedge clk);
    repeat (50) @(negedge clk);

    check(hn_reqs.size() == 0 && queued_rsp(0) == 0 && queued_rsp(1) == 0 &&
          queued_dat(0) == 0 && queued_dat(1) == 0, "home node idle at end");
    for (int n = 0; n < NRN; n++)
      check(rsp_cred[n] == 15 && dcred[n] == 15, "each node's receive credits all returned");
    // the two regions never overlap: every line written lies in one of them
    foreach (hn_mem[l]) check((l >> 18) == line_t'(1) || (l >> 18) == line_t'(2), "writes stay in the two regions");

    check(c_both > 0, "home node held requests from both nodes at once");
    check(hn_seen[int'(HN_ID)], "requests to the single home node");
    for (int h = 0; h < 16; h++) check(hn_seen[int'(HN_BASE) + h], "requests to each of sixteen home nodes");
    check(c_req_stall > 0, "REQ credit stall");
    check(c_dat_stall > 0, "TXDAT credit stall");
    check(c_rx_starved > 0, "RN-I receive credits exhausted");
    check(c_comp_drop > 0, "separate Comp dropped");
    check(p_cancels[0] + p_cancels[1] > 0, "WriteDataCancel");
    $display("ops=%0d+%0d cycles=%0d both=%0d req_stall=%0d dat_stall=%0d rx_starved=%0d comp_dropped=%0d cancels=%0d",
             p_ops[0], p_ops[1], cycle, c_both, c_req_stall, c_dat_stall, c_rx_starved, c_comp_drop,
             p_cancels[0] + p_cancels[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + p_checks[0] + p_checks[1],
             failures + p_failures[0] + p_failures[1]);
    $finish;
  end
endmodule
