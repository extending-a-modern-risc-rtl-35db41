// tb_rni_rdat: self-checking test of the RDAT module.
// An interconnect model sends CompData flits (random tag, data and RespErr)
// only while it holds RXDAT L-credits from the module; a table model answers the
// lookup-table reads one cycle later with a random Excl bit per tag; a VPU model
// acknowledges load responses at a rate that changes from fast to very slow.
// Checks: responses come out in arrival order with the right tag and data and an
// error bit worked out here from RespErr and Excl; the first response arrives 2
// cycles after its flit; the module never grants more than 15 credits, grants
// all 15 after reset and gets them all back at the end; the FIFO fills (credit
// exhaustion) and the VPU stalls responses at least once each.
module tb_rni_rdat;
  import rni_pkg::*;
  logic clk = 1'b0, rsn = 1'b0;
  logic flitv, lcrdv, rd_en, txn_info, resp_valid, resp_ack;
  chi_dat_flit_t flit;
  logic [TAG_W-1:0] rd_addr;
  vpu_rdat_t resp;
  logic excl_tbl [256];
  vpu_rdat_t expected [$];
  int checks = 0, failures = 0, credits = 0, received = 0;
  int credit_starved = 0, vpu_stalls = 0, ack_rate = 80, sent = 0;
  localparam int N = 1500;

  rni_rdat dut (
    .clk_i(clk), .rsn_i(rsn),
    .chi_rxdatflitv_i(flitv), .chi_rxdatflit_i(flit), .chi_rxdatlcrdv_o(lcrdv),
    .lkpt_rd1_en_o(rd_en), .lkpt_rd1_addr_o(rd_addr), .lkpt_txn_info_i(txn_info),
    .ld_resp_valid_o(resp_valid), .ld_resp_o(resp), .ld_resp_ack_i(resp_ack));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic exp_error(input logic excl, input logic [1:0] re);
    if (excl) return re != 2'b01;
    return re != 2'b00;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lookup table model, one-cycle read
  always @(posedge clk) if (rd_en) txn_info <= excl_tbl[rd_addr];

  // credit accounting, response checking
  always @(posedge clk) if (rsn) begin
    if (lcrdv) credits++;
    if (flitv) begin
      credits--;
      expected.push_back('{tag: TAG_W'(flit.txn_id),
                           error: exp_error(excl_tbl[TAG_W'(flit.txn_id)], flit.resp_err),
                           data: flit.data});
    end
    check(credits <= 15 && credits >= 0, "credit count within 0..15");
    if (resp_valid && !resp_ack) vpu_stalls++;
    if (resp_valid && resp_ack) begin
      if (expected.size() == 0) check(1'b0, "response without a flit");
      else begin
        check(resp == expected[0], "load response tag/error/data");
        void'(expected.pop_front());
      end
      received++;
    end
  end

  // VPU acknowledge
  always @(negedge clk) resp_ack <= ($urandom_range(0, 99) < ack_rate);

  task automatic make_flit();
    flit = '0;
    flit.opcode   = DAT_COMP_DATA;
    flit.txn_id   = 8'($urandom);
    flit.resp_err = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b00;
    flit.src_id   = 7'h10;
    for (int w = 0; w < DATA_W / 32; w++) flit.data[w*32 +: 32] = $urandom;
  endtask

  initial begin
    flitv = 0; flit = '0; txn_info = 0;
    for (int i = 0; i < 256; i++) excl_tbl[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    // wait for the initial credit grant
    repeat (20) @(negedge clk);
    check(credits == 15, "15 credits granted after reset");
    // latency: one flit into an empty module, VPU not acknowledging
    ack_rate = 0;
    @(negedge clk);
    make_flit(); flitv = 1'b1;
    @(negedge clk); flitv = 1'b0; sent++;
    check(!resp_valid, "no response 1 cycle after the flit");
    @(negedge clk);
    check(resp_valid, "response 2 cycles after the flit");
    ack_rate = 100;
    // random traffic
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
    while (received < N) @(negedge clk);
    repeat (20) @(negedge clk);
    check(expected.size() == 0, "all responses delivered");
    check(credits == 15, "all credits returned");
    check(credit_starved > 0, "receive FIFO filled (credits exhausted)");
    check(vpu_stalls > 0, "VPU stalled load responses");
    $display("flits=%0d credit_starved=%0d vpu_stalls=%0d", sent, credit_starved, vpu_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
