// tb_rni_top: end-to-end test of the RN-I at its default parameters.
//
// The RN-I sits between two models kept in this file:
//   * a VPU load/store-unit model that issues Load, Write and WritePtl requests
//     (Device and Cacheable, some exclusive), answers store responses with write
//     data (WritePtl sometimes killed), keeps a reference copy of memory and
//     checks every load response (tag, data, error);
//   * a CHI home-node model that grants L-credits on TXREQ/TXDAT, keeps the
//     memory, serves requests out of order after random delays, answers reads
//     with CompData and writes with either CompDBIDResp or DBIDResp plus a
//     separate Comp, applies NonCopyBackWrData with its byte enables and ignores
//     WriteDataCancel, and only sends on RXRSP/RXDAT while it holds the RN-I's
//     credits.
// Phase 1 is a store sequence followed by loads of the same lines (the base
// test); phase 2 is mixed random traffic with receive and credit rates that
// swing between fast and slow. The test counts each mechanism of the design and
// fails if one never happened: REQ and TXDAT credit stalls, RN-I receive credits
// exhausted, VPU back-pressure on RDAT and RSP, Comp dropped, DBIDResp,
// CompDBIDResp, WriteDataCancel, exclusive success and failure, error
// responses, and all six opcode/attr mappings.
module tb_rni_top;
  import rni_pkg::*;

  localparam logic [NODEID_W-1:0] RNI_ID = 7'h01;
  localparam logic [NODEID_W-1:0] HN_BASE = 7'h10;
  localparam int NLINES = 64;            // lines of the test region
  localparam int N_BASE = 32;            // base test: stores then loads
  localparam int N_RANDOM = 1500;        // mixed random operations

  logic clk = 1'b0, rsn = 1'b0;

  // DUT signals
  logic req_valid, req_ack, rdat_valid, rdat_ack, rsp_valid, rsp_ack, wdat_valid, wdat_ack;
  vpu_req_t req;
  vpu_rdat_t rdat;
  vpu_rsp_t rsp;
  vpu_wdat_t wdat;
  logic [VPU_ADDR_W-1:0] sam_addr;
  logic [NODEID_W-1:0] sam_tgt;
  logic txreqpend, txreqv, txreqlcrdv, rxrspv, rxrsplcrdv, rxdatv, rxdatlcrdv;
  logic txdatpend, txdatv, txdatlcrdv;
  chi_req_flit_t txreq;
  chi_rsp_flit_t rxrsp;
  chi_dat_flit_t rxdat, txdat;

  rni_top dut (
    .clk_i(clk), .rsn_i(rsn), .src_id_i(RNI_ID),
    .vpu_req_valid_i(req_valid), .vpu_req_i(req), .vpu_req_ack_o(req_ack),
    .vpu_rdat_valid_o(rdat_valid), .vpu_rdat_o(rdat), .vpu_rdat_ack_i(rdat_ack),
    .vpu_rsp_valid_o(rsp_valid), .vpu_rsp_o(rsp), .vpu_rsp_ack_i(rsp_ack),
    .vpu_wdat_valid_i(wdat_valid), .vpu_wdat_i(wdat), .vpu_wdat_ack_o(wdat_ack),
    .sam_target_addr_o(sam_addr), .sam_tgt_id_i(sam_tgt),
    .txreqflitpend_o(txreqpend), .txreqflitv_o(txreqv), .txreqflit_o(txreq), .txreqlcrdv_i(txreqlcrdv),
    .rxrspflitpend_i(1'b1), .rxrspflitv_i(rxrspv), .rxrspflit_i(rxrsp), .rxrsplcrdv_o(rxrsplcrdv),
    .rxdatflitpend_i(1'b1), .rxdatflitv_i(rxdatv), .rxdatflit_i(rxdat), .rxdatlcrdv_o(rxdatlcrdv),
    .txdatflitpend_o(txdatpend), .txdatflitv_o(txdatv), .txdatflit_o(txdat), .txdatlcrdv_i(txdatlcrdv));

  // system address map: four home nodes interleaved on line address bits [7:6]
  assign sam_tgt = HN_BASE | NODEID_W'(sam_addr[7:6]);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ helpers
  function automatic logic [DATA_W-1:0] init_line(input int line);
    logic [DATA_W-1:0] d;
    for (int w = 0; w < DATA_W / 32; w++) d[w*32 +: 32] = 32'(line * 32'h9E37_79B9) ^ 32'(w * 32'h0101_0101);
    return d;
  endfunction

  function automatic logic [DATA_W-1:0] merge(input logic [DATA_W-1:0] old, input logic [DATA_W-1:0] nw,
                                              input logic [BE_W-1:0] be);
    for (int b = 0; b < BE_W; b++) if (be[b]) old[b*8 +: 8] = nw[b*8 +: 8];
    return old;
  endfunction

  function automatic logic [DATA_W-1:0] rand_line();
    logic [DATA_W-1:0] d;
    for (int w = 0; w < DATA_W / 32; w++) d[w*32 +: 32] = $urandom;
    return d;
  endfunction

  // line address -> VPU address: region at 0x1234_0000; lines with index >= 56
  // lie in an "error" window at bit 20 where the home node answers with DERR
  function automatic logic [VPU_ADDR_W-1:0] line_addr(input int line);
    logic [VPU_ADDR_W-1:0] a;
    a = 56'h00_0012_3400_0000 | (VPU_ADDR_W'(line) << 6);
    if (line >= 56) a[20] = 1'b1;
    return a;
  endfunction

  function automatic int addr_line(input logic [CHI_ADDR_W-1:0] a);
    return int'(a[11:6]);
  endfunction

  // ------------------------------------------------------------------ counters
  int c_req_stall = 0, c_dat_stall = 0, c_rx_starved = 0, c_rdat_bp = 0, c_rsp_bp = 0;
  int c_comp_drop = 0, c_dbid = 0, c_compdbid = 0, c_cancel = 0, c_ex_ok = 0, c_ex_fail = 0;
  int c_err = 0;
  int c_combo [6];

  // =================================================================== home node model
  logic [DATA_W-1:0] hn_mem [NLINES];
  chi_req_flit_t hn_reqs [$];
  chi_rsp_flit_t hn_rsp_out [$];
  chi_dat_flit_t hn_dat_out [$];
  int hn_req_free = 15, hn_dat_free = 15, rn_rsp_cred = 0, rn_dat_cred = 0;
  int hn_serve_rate = 50, hn_credit_rate = 50;
  bit dbid_busy [256];
  int dbid_line [256];
  logic [7:0] next_dbid = 0;
  logic exp_err [256];               // error the VPU must see, per tag (set when answered)

  function automatic logic [1:0] hn_resp_err(input chi_req_flit_t f, input int tag);
    logic [1:0] re;
    logic err;
    if (f.addr[20]) begin re = RESPERR_DERR; err = 1'b1; c_err++; end
    else if (f.excl) begin
      if ($urandom_range(0, 3) == 0) begin re = RESPERR_OK; err = 1'b1; c_ex_fail++; end
      else begin re = RESPERR_EXOK; err = 1'b0; c_ex_ok++; end
    end else begin re = RESPERR_OK; err = 1'b0; end
    exp_err[tag] = err;
    return re;
  endfunction

  always @(posedge clk) if (rsn) begin
    // incoming write data first, so a later request sees it
    if (txdatv) begin
      hn_dat_free++;
      check((txdat.tgt_id == (HN_BASE | NODEID_W'(dbid_line[txdat.txn_id] % 4))) && dbid_busy[txdat.txn_id],
            "write data: TgtID is the responder, TxnID a live DBID");
      check(txdat.src_id == RNI_ID, "write data: SrcID");
      if (txdat.opcode == DAT_WRITE_DATA_CANCEL) begin
        check(txdat.be == '0, "WriteDataCancel has no byte enables");
      end else begin
        check(txdat.opcode == DAT_NON_COPYBACK_WR, "write data opcode");
        hn_mem[dbid_line[txdat.txn_id]] = merge(hn_mem[dbid_line[txdat.txn_id]], txdat.data, txdat.be);
      end
      dbid_busy[txdat.txn_id] = 1'b0;
    end
    if (txreqv) begin
      check(txreq.src_id == RNI_ID, "request SrcID");
      check(txreq.tgt_id == (HN_BASE | NODEID_W'(txreq.addr[7:6])), "request TgtID from the SAM");
      check(txreq.size == SIZE_64B && txreq.exp_comp_ack == 1'b0, "request Size and ExpCompAck");
      hn_reqs.push_back(txreq);
    end
    if (rxrsplcrdv) rn_rsp_cred++;
    if (rxdatlcrdv) rn_dat_cred++;
    if (rxrspv) rn_rsp_cred--;
    if (rxdatv) rn_dat_cred--;
    check(rn_rsp_cred <= 15 && rn_dat_cred <= 15 && rn_rsp_cred >= 0 && rn_dat_cred >= 0,
          "RN-I receive credits within 0..15");
    // serve one request, chosen at random among those waiting
    if (hn_reqs.size() != 0 && $urandom_range(0, 99) < hn_serve_rate) begin
      int k;
      chi_req_flit_t f;
      k = $urandom_range(0, hn_reqs.size() - 1);
      f = hn_reqs[k];
      hn_reqs.delete(k);
      hn_req_free++;
      if (f.opcode == REQ_READ_NO_SNP || f.opcode == REQ_READ_ONCE) begin
        chi_dat_flit_t d;
        d = '0;
        d.opcode   = DAT_COMP_DATA;
        d.tgt_id   = f.src_id;
        d.src_id   = f.tgt_id;
        d.txn_id   = f.txn_id;
        d.resp_err = hn_resp_err(f, int'(f.txn_id));
        d.data     = hn_mem[addr_line(f.addr)];
        hn_dat_out.push_back(d);
      end else begin
        chi_rsp_flit_t r;
        int guard;
        guard = 0;
        while (dbid_busy[next_dbid] && guard < 300) begin next_dbid++; guard++; end
        dbid_busy[next_dbid] = 1'b1;
        dbid_line[next_dbid] = addr_line(f.addr);
        r = '0;
        r.tgt_id   = f.src_id;
        r.src_id   = f.tgt_id;
        r.txn_id   = f.txn_id;
        r.dbid     = next_dbid;
        r.resp_err = hn_resp_err(f, int'(f.txn_id));
        next_dbid++;
        if ($urandom_range(0, 1) == 0) begin
          r.opcode = RSP_COMP_DBID;
          hn_rsp_out.push_back(r);
          c_compdbid++;
        end else begin
          chi_rsp_flit_t c;
          // a separate DBIDResp carries no exclusive result
          if (f.excl && !f.addr[20]) begin r.resp_err = RESPERR_OK; exp_err[f.txn_id] = 1'b0; end
          c = r;
          c.opcode = RSP_COMP;
          c.dbid   = '0;
          r.opcode = RSP_DBID;
          if ($urandom_range(0, 1) == 0) begin hn_rsp_out.push_back(c); hn_rsp_out.push_back(r); end
          else begin hn_rsp_out.push_back(r); hn_rsp_out.push_back(c); end
          c_dbid++;
          c_comp_drop++;
        end
      end
    end
    if ((hn_rsp_out.size() != 0 && rn_rsp_cred == 0) || (hn_dat_out.size() != 0 && rn_dat_cred == 0))
      c_rx_starved++;
  end

  // home-node outputs change at the falling edge
  always @(negedge clk) begin
    txreqlcrdv <= 1'b0;
    txdatlcrdv <= 1'b0;
    rxrspv <= 1'b0;
    rxdatv <= 1'b0;
    if (rsn) begin
      if (hn_req_free > 0 && $urandom_range(0, 99) < hn_credit_rate) begin
        txreqlcrdv <= 1'b1; hn_req_free--;
      end
      if (hn_dat_free > 0 && $urandom_range(0, 99) < hn_credit_rate) begin
        txdatlcrdv <= 1'b1; hn_dat_free--;
      end
      if (hn_rsp_out.size() != 0 && rn_rsp_cred > 0 && $urandom_range(0, 3) != 0) begin
        rxrspv <= 1'b1; rxrsp <= hn_rsp_out.pop_front();
      end
      if (hn_dat_out.size() != 0 && rn_dat_cred > 0 && $urandom_range(0, 3) != 0) begin
        rxdatv <= 1'b1; rxdat <= hn_dat_out.pop_front();
      end
    end
  end

  // =================================================================== VPU model
  logic [DATA_W-1:0] ref_mem [NLINES];
  int line_busy_until [NLINES];          // cycle from which the line may be used again (-1: op in flight)
  bit tag_busy [256];
  vpu_op_e tag_op [256];
  int tag_line [256];
  logic tag_excl [256];
  int wq [$];                            // tags whose write data may now be sent
  int cycle = 0, done_ops = 0, issued = 0;
  int rdat_rate = 80, rsp_rate = 80;
  bit req_fired, wdat_fired;
  bit wdat_kill_pending;

  always @(posedge clk) if (rsn) begin
    cycle++;
    req_fired  = req_valid && req_ack;
    wdat_fired = wdat_valid && wdat_ack;
    if (req_valid && !req_ack) c_req_stall++;
    if (wdat_valid && !wdat_ack) c_dat_stall++;
    if (rdat_valid && !rdat_ack) c_rdat_bp++;
    if (rsp_valid && !rsp_ack) c_rsp_bp++;
    if (rdat_valid && rdat_ack) begin
      int t;
      t = int'(rdat.tag);
      check(tag_busy[t] && tag_op[t] == VPU_LOAD, "load response for an outstanding load");
      check(rdat.error == exp_err[t], "load response error");
      if (!rdat.error) check(rdat.data == ref_mem[tag_line[t]], "load data matches memory");
      tag_busy[t] = 1'b0;
      line_busy_until[tag_line[t]] = cycle;
      done_ops++;
    end
    if (rsp_valid && rsp_ack) begin
      int t;
      t = int'(rsp.tag);
      check(tag_busy[t] && tag_op[t] != VPU_LOAD, "store response for an outstanding store");
      check(rsp.error == exp_err[t], "store response error");
      wq.push_back(t);
    end
    if (wdat_fired) begin
      int t;
      t = int'(wdat.tag);
      if (!wdat.kill) ref_mem[tag_line[t]] = merge(ref_mem[tag_line[t]], wdat.data, wdat.be);
      else c_cancel++;
      tag_busy[t] = 1'b0;
      line_busy_until[tag_line[t]] = cycle + 3;
      done_ops++;
    end
  end

  always @(negedge clk) begin
    rdat_ack <= ($urandom_range(0, 99) < rdat_rate);
    rsp_ack  <= ($urandom_range(0, 99) < rsp_rate);
  end

  // pick a free tag and line; returns 0 when none is free
  function automatic bit pick(output int tag, output int line, input int lo, input int hi);
    int tries = 0;
    tag = $urandom_range(0, 255);
    while (tag_busy[tag] && tries < 512) begin tag = (tag + 1) % 256; tries++; end
    if (tag_busy[tag]) return 0;
    tries = 0;
    line = $urandom_range(lo, hi);
    while ((line_busy_until[line] < 0 || line_busy_until[line] > cycle) && tries < 2 * NLINES) begin
      line = (line == hi) ? lo : line + 1; tries++;
    end
    return !(line_busy_until[line] < 0 || line_busy_until[line] > cycle);
  endfunction

  // issue one request (held until acknowledged)
  task automatic issue(input vpu_op_e op, input logic attr, input logic excl, input int tag, input int line);
    req.tag    = TAG_W'(tag);
    req.opcode = op;
    req.attr   = attr;
    req.excl   = excl;
    req.addr   = line_addr(line);
    req_valid  = 1'b1;
    tag_busy[tag] = 1'b1;
    tag_op[tag]   = op;
    tag_line[tag] = line;
    tag_excl[tag] = excl;
    line_busy_until[line] = -1;
    c_combo[int'(op) * 2 + int'(attr)]++;
    issued++;
    @(posedge clk);
    #1;
    while (!req_fired) begin
      @(posedge clk);
      #1;
    end
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  // write-data sender; in burst mode it holds the data back until 16 words
  // (or 200 cycles) have queued up and then sends them back to back
  bit wdat_burst = 0;
  int held = 0;
  initial begin
    wdat_valid = 1'b0;
    wdat = '0;
    forever begin
      bit go;
      @(negedge clk);
      if (wdat_valid && wdat_fired) wdat_valid = 1'b0;
      if (wdat_burst) begin
        if (wq.size() >= 16 || held > 200) held = -1000;   // release: send the whole queue
        else if (held >= 0 || wq.size() == 0) held = (wq.size() == 0) ? 0 : held + 1;
        go = (held < 0) && wq.size() != 0;
        if (held < 0 && wq.size() == 0) held = 0;
      end else begin
        go = $urandom_range(0, 3) != 0;
      end
      if (!wdat_valid && wq.size() != 0 && go) begin
        int t;
        t = wq.pop_front();
        wdat.tag  = TAG_W'(t);
        wdat.data = rand_line();
        if (tag_op[t] == VPU_WRITE) begin
          wdat.be   = '1;
          wdat.kill = 1'b0;
        end else begin
          wdat.be   = {$urandom, $urandom};
          wdat.kill = ($urandom_range(0, 3) == 0);
        end
        wdat_valid = 1'b1;
      end
    end
  end

  initial begin
    int tag, line, expect_done;
    req_valid = 1'b0; req = '0; rxrsp = '0; rxdat = '0;
    for (int i = 0; i < NLINES; i++) begin
      hn_mem[i] = init_line(i); ref_mem[i] = init_line(i); line_busy_until[i] = 0;
    end
    for (int i = 0; i < 256; i++) begin tag_busy[i] = 0; dbid_busy[i] = 0; exp_err[i] = 0; end
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    repeat (2) @(negedge clk);

    // ---- phase 1: base test, full-line stores then loads of the same lines
    for (int i = 0; i < N_BASE; i++) begin
      while (!pick(tag, line, i, i)) @(negedge clk);
      issue(VPU_WRITE, 1'(i % 2), 1'b0, tag, line);
    end
    while (done_ops < N_BASE) @(negedge clk);
    for (int i = 0; i < N_BASE; i++) begin
      while (!pick(tag, line, i, i)) @(negedge clk);
      issue(VPU_LOAD, 1'(i % 2), 1'b0, tag, line);
    end
    while (done_ops < 2 * N_BASE) @(negedge clk);
    $display("base test done at cycle %0d", cycle);

    // ---- phase 2: mixed random traffic, rates swinging between fast and slow
    for (int n = 0; n < N_RANDOM; n++) begin
      vpu_op_e op;
      logic attr, excl;
      case ((n / 250) % 3)
        0: begin hn_serve_rate = 60; hn_credit_rate = 60; rdat_rate = 90; rsp_rate = 90; end
        1: begin hn_serve_rate = 80; hn_credit_rate = 5;  rdat_rate = 90; rsp_rate = 90; end
        default: begin hn_serve_rate = 90; hn_credit_rate = 60; rdat_rate = 3; rsp_rate = 5; end
      endcase
      case ((n / 250) % 4)
        3: wdat_burst = 1;
        default: wdat_burst = 0;
      endcase
      op   = vpu_op_e'($urandom_range(0, 2));
      attr = 1'($urandom_range(0, 1));
      excl = (attr == ATTR_DEVICE) && ($urandom_range(0, 3) == 0);
      while (!pick(tag, line, 0, NLINES - 1)) @(negedge clk);
      issue(op, attr, excl, tag, line);
    end
    rdat_rate = 100; rsp_rate = 100; hn_serve_rate = 100; hn_credit_rate = 100; wdat_burst = 0;
    expect_done = 2 * N_BASE + N_RANDOM;
    while (done_ops < expect_done) @(negedge clk);
    repeat (50) @(negedge clk);

    // final memory comparison: the home node's memory must equal the reference
    for (int i = 0; i < NLINES; i++) check(hn_mem[i] == ref_mem[i], "final memory contents");
    check(hn_reqs.size() == 0 && hn_rsp_out.size() == 0 && hn_dat_out.size() == 0, "home node idle at end");
    check(rn_rsp_cred == 15 && rn_dat_cred == 15, "RN-I receive credits all returned");

    // every mechanism must have happened
    check(c_req_stall > 0, "REQ credit stall");
    check(c_dat_stall > 0, "TXDAT credit stall");
    check(c_rx_starved > 0, "RN-I receive credits exhausted");
    check(c_rdat_bp > 0, "VPU back-pressure on load responses");
    check(c_rsp_bp > 0, "VPU back-pressure on store responses");
    check(c_comp_drop > 0, "separate Comp dropped");
    check(c_dbid > 0 && c_compdbid > 0, "DBIDResp and CompDBIDResp");
    check(c_cancel > 0, "WriteDataCancel");
    check(c_ex_ok > 0 && c_ex_fail > 0, "exclusive success and failure");
    check(c_err > 0, "error responses");
    for (int i = 0; i < 6; i++) check(c_combo[i] > 0, "opcode/attr mapping exercised");
    $display("ops=%0d cycles=%0d req_stall=%0d dat_stall=%0d rx_starved=%0d rdat_bp=%0d rsp_bp=%0d",
             issued, cycle, c_req_stall, c_dat_stall, c_rx_starved, c_rdat_bp, c_rsp_bp);
    $display("comp_dropped=%0d dbidresp=%0d compdbidresp=%0d cancel=%0d excl_ok=%0d excl_fail=%0d errors=%0d",
             c_comp_drop, c_dbid, c_compdbid, c_cancel, c_ex_ok, c_ex_fail, c_err);
    $display("combos: %0d %0d %0d %0d %0d %0d", c_combo[0], c_combo[1], c_combo[2], c_combo[3],
             c_combo[4], c_combo[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
