// tb_rni_req: self-checking test of the REQ module.
// A VPU model issues random requests (all opcode/attr combinations, random tag,
// address, excl on Device only) and holds each until acknowledged. An
// interconnect model grants TXREQ L-credits at a random, sometimes very low,
// rate and keeps its own credit count. Every cycle the test checks that a flit
// is sent exactly when a request is valid and a credit is held (zero-cycle
// forwarding), that ack, flitv and the lookup-table write agree, and that every
// flit field equals the value worked out here from the request. It counts the
// cycles stalled for lack of credit and fails if there were none.
module tb_rni_req;
  import rni_pkg::*;
  logic clk = 1'b0, rsn = 1'b0;
  logic [NODEID_W-1:0] src_id = 7'h21, sam_tgt_id;
  logic vpu_req_valid, vpu_req_ack;
  vpu_req_t vpu_req;
  logic [VPU_ADDR_W-1:0] sam_addr;
  logic flitpend, flitv, lcrdv;
  chi_req_flit_t flit;
  logic lk_we, lk_d;
  logic [TAG_W-1:0] lk_addr;
  int checks = 0, failures = 0, credits = 0, stalls = 0, sent = 0;
  int combo_seen [6];
  bit fired;

  rni_req dut (
    .clk_i(clk), .rsn_i(rsn), .src_id_i(src_id),
    .vpu_req_valid_i(vpu_req_valid), .vpu_req_i(vpu_req), .vpu_req_ack_o(vpu_req_ack),
    .sam_target_addr_o(sam_addr), .sam_tgt_id_i(sam_tgt_id),
    .chi_txreqflitpend_o(flitpend), .chi_txreqflitv_o(flitv), .chi_txreqflit_o(flit),
    .noc_chi_txreqlcrdv_i(lcrdv),
    .lkpt_wr_en_o(lk_we), .lkpt_wr_addr_o(lk_addr), .lkpt_wr_d_o(lk_d));

  // system address map model: node ID from address bits [13:12]
  assign sam_tgt_id = 7'h40 | 7'(sam_addr[13:12]);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [5:0] exp_opcode(input logic [1:0] op, input logic attr);
    case ({op, attr})
      3'b00_0: return 6'h04;
      3'b00_1: return 6'h03;
      3'b01_0: return 6'h1D;
      3'b01_1: return 6'h19;
      3'b10_0: return 6'h1C;
      default: return 6'h18;
    endcase
  endfunction

  task automatic new_request();
    vpu_req.tag    = 8'($urandom);
    vpu_req.opcode = vpu_op_e'($urandom_range(0, 2));
    vpu_req.attr   = 1'($urandom_range(0, 1));
    vpu_req.excl   = (vpu_req.attr == 1'b0) ? 1'($urandom_range(0, 1)) : 1'b0;
    vpu_req.addr   = {24'($urandom), 32'($urandom)};
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interconnect credit model: the receiver has 15 buffers and frees them at a
  // rate that changes over time
  int buffers_free = 15, occupied = 0;
  int rate;
  always @(posedge clk) begin
    if (rsn) begin
      if (flitv) begin credits--; occupied++; end
      if (lcrdv) begin credits++; buffers_free--; end
      if (occupied > 0 && $urandom_range(0, 99) < rate) begin occupied--; buffers_free++; end
    end
  end
  always @(negedge clk) lcrdv <= rsn && (buffers_free > 0) && ($urandom_range(0, 1) == 1);

  initial begin
    vpu_req_valid = 0; vpu_req = '0; lcrdv = 0; rate = 50;
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    for (int n = 0; n < 2000; ) begin
      @(negedge clk);
      rate = ((n / 500) % 2 == 1) ? 10 : 60;     // periods of scarce credit
      if (!vpu_req_valid && $urandom_range(0, 3) != 0) begin
        new_request();
        vpu_req_valid = 1'b1;
      end
      #1;
      check(flitv == (vpu_req_valid && credits > 0), "flit sent iff request and credit");
      check(vpu_req_ack == flitv && lk_we == flitv, "ack, flitv and table write agree");
      check(flitpend == 1'b1, "flitpend held high");
      if (vpu_req_valid && credits == 0) stalls++;
      if (flitv) begin
        check(flit.opcode == exp_opcode(vpu_req.opcode, vpu_req.attr), "opcode");
        check(flit.mem_attr == (vpu_req.attr ? 4'b0100 : 4'b0010), "MemAttr");
        check(flit.txn_id == vpu_req.tag && lk_addr == vpu_req.tag, "TxnID and table address");
        check(flit.addr == vpu_req.addr[CHI_ADDR_W-1:0], "address");
        check(sam_addr == vpu_req.addr, "SAM address");
        check(flit.tgt_id == (7'h40 | 7'(vpu_req.addr[13:12])), "TgtID from SAM");
        check(flit.src_id == src_id, "SrcID");
        check(flit.excl == vpu_req.excl && lk_d == vpu_req.excl, "Excl and table data");
        check(flit.size == 3'b110 && flit.exp_comp_ack == 1'b0 && flit.order == 2'b00,
              "Size, ExpCompAck, Order");
        combo_seen[vpu_req.opcode * 2 + 32'(vpu_req.attr)]++;
        sent++; n++;
      end
      fired = flitv;
      @(posedge clk);
      #1;
      if (fired) vpu_req_valid = 1'b0;
    end
    for (int i = 0; i < 6; i++) check(combo_seen[i] > 0, "every opcode/attr combination issued");
    check(stalls > 0, "credit exhaustion stall happened");
    check(credits <= 15, "never more than 15 credits held");
    $display("requests=%0d credit_stall_cycles=%0d", sent, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
