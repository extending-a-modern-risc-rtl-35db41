// tb_vpu_pattern: behavioural test-pattern source standing in for a vector
// unit's load/store unit on the four VPU channels of one RN-I (not synthesizable).
//
// Each instance owns its own address region and data set. The ID parameter
// places the region at (ID + 1) << 24 and puts ID + 1 in the top byte of every
// 32-bit data word. Two instances on one interconnect can therefore never read
// each other's data by accident. The pattern runs N_ROUNDS rounds:
//   1. a store to every line of the region. Round 0 uses full Writes with
//      alternating Device/Cacheable attributes; later rounds use Write or
//      WritePtl with random byte enables, and a quarter of the WritePtl
//      transfers are killed.
//   2. once every store has sent its data, a Load of every line. The load data
//      is compared with a reference copy kept here.
// Requests are issued back to back and many are outstanding at once. Load and
// store responses are acknowledged at random: at 75 %, but at 5 % in every
// third block of 300 cycles. Write data is sent, at a random rate, as soon as
// the store response for its tag has arrived.
// Interface: the RN-I's VPU channels seen from the VPU, plus done_o and running
// counts of checks, failures, killed writes and issued operations.
// Timing: outputs change on the falling edge; handshakes are sampled on the
// rising edge.
module tb_vpu_pattern
  import rni_pkg::*;
#(
  parameter int unsigned ID       = 0,
  parameter int unsigned N_LINES  = 32,   // lines of the region (at most 64)
  parameter int unsigned N_ROUNDS = 8
) (
  input  logic      clk_i,
  input  logic      rsn_i,
  output logic      req_valid_o,
  output vpu_req_t  req_o,
  input  logic      req_ack_i,
  input  logic      rdat_valid_i,
  input  vpu_rdat_t rdat_i,
  output logic      rdat_ack_o,
  input  logic      rsp_valid_i,
  input  vpu_rsp_t  rsp_i,
  output logic      rsp_ack_o,
  output logic      wdat_valid_o,
  output vpu_wdat_t wdat_o,
  input  logic      wdat_ack_i,
  output logic      done_o,
  output int        checks_o,
  output int        failures_o,
  output int        cancels_o,
  output int        ops_o
);
  localparam logic [VPU_ADDR_W-1:0] BASE = VPU_ADDR_W'(ID + 1) << 24;

  int checks = 0, failures = 0, cancels = 0, ops = 0;
  assign checks_o   = checks;
  assign failures_o = failures;
  assign cancels_o  = cancels;
  assign ops_o      = ops;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t pattern %0d: %s", $time, ID, what);
    end
  endtask

  function automatic logic [DATA_W-1:0] pattern_line();
    logic [DATA_W-1:0] d;
    for (int w = 0; w < DATA_W / 32; w++) d[w*32 +: 32] = {8'(ID + 1), 24'($urandom)};
    return d;
  endfunction

  function automatic logic [DATA_W-1:0] merge(input logic [DATA_W-1:0] old, input logic [DATA_W-1:0] nw,
                                              input logic [BE_W-1:0] be);
    for (int b = 0; b < BE_W; b++) if (be[b]) old[b*8 +: 8] = nw[b*8 +: 8];
    return old;
  endfunction

  logic [DATA_W-1:0] ref_mem [N_LINES];
  bit      tag_busy [256];
  vpu_op_e tag_op [256];
  int      tag_line [256];
  int      wq [$];
  int      stores_done = 0, loads_done = 0;
  bit      req_fired, wdat_fired;

  // responses and write-data handshakes, sampled at the rising edge
  always @(posedge clk_i) if (rsn_i) begin
    req_fired  = req_valid_o && req_ack_i;
    wdat_fired = wdat_valid_o && wdat_ack_i;
    if (rdat_valid_i && rdat_ack_o) begin
      int t;
      t = int'(rdat_i.tag);
      check(tag_busy[t] && tag_op[t] == VPU_LOAD, "load response for an outstanding load");
      check(!rdat_i.error, "load response without error");
      check(rdat_i.data == ref_mem[tag_line[t]], "load data is this pattern's last store");
      tag_busy[t] = 1'b0;
      loads_done++;
    end
    if (rsp_valid_i && rsp_ack_o) begin
      int t;
      t = int'(rsp_i.tag);
      check(tag_busy[t] && tag_op[t] != VPU_LOAD, "store response for an outstanding store");
      check(!rsp_i.error, "store response without error");
      wq.push_back(t);
    end
    if (wdat_fired) begin
      int t;
      t = int'(wdat_o.tag);
      if (!wdat_o.kill) ref_mem[tag_line[t]] = merge(ref_mem[tag_line[t]], wdat_o.data, wdat_o.be);
      else cancels++;
      tag_busy[t] = 1'b0;
      stores_done++;
    end
  end

  // responses are acknowledged at 75 %, except in every third block of 300
  // cycles, where the rate drops to 5 % so that the RN-I's buffers fill up
  int cycle = 0;
  always @(negedge clk_i) begin
    int rate;
    cycle++;
    rate = ((cycle / 300) % 3 == 2) ? 5 : 75;
    rdat_ack_o <= ($urandom_range(0, 99) < rate);
    rsp_ack_o  <= ($urandom_range(0, 99) < rate);
  end

  // write-data sender
  initial begin
    wdat_valid_o = 1'b0;
    wdat_o       = '0;
    forever begin
      @(negedge clk_i);
      if (wdat_valid_o && wdat_fired) wdat_valid_o = 1'b0;
      if (!wdat_valid_o && wq.size() != 0 && $urandom_range(0, 2) != 0) begin
        int t;
        t = wq.pop_front();
        wdat_o.tag  = TAG_W'(t);
        wdat_o.data = pattern_line();
        if (tag_op[t] == VPU_WRITE) begin
          wdat_o.be   = '1;
          wdat_o.kill = 1'b0;
        end else begin
          wdat_o.be   = {$urandom, $urandom};
          wdat_o.kill = ($urandom_range(0, 3) == 0);
        end
        wdat_valid_o = 1'b1;
      end
    end
  end

  task automatic issue(input vpu_op_e op, input logic attr, input int tag, input int line);
    req_o.tag    = TAG_W'(tag);
    req_o.opcode = op;
    req_o.attr   = attr;
    req_o.excl   = 1'b0;
    req_o.addr   = BASE | (VPU_ADDR_W'(line) << 6);
    req_valid_o  = 1'b1;
    tag_busy[tag] = 1'b1;
    tag_op[tag]   = op;
    tag_line[tag] = line;
    ops++;
    @(posedge clk_i);
    #1;
    while (!req_fired) begin
      @(posedge clk_i);
      #1;
    end
    @(negedge clk_i);
    req_valid_o = 1'b0;
  endtask

  initial begin
    req_valid_o = 1'b0;
    req_o       = '0;
    done_o      = 1'b0;
    for (int i = 0; i < int'(N_LINES); i++) ref_mem[i] = '0;
    for (int i = 0; i < 256; i++) tag_busy[i] = 1'b0;
    @(posedge rsn_i);
    repeat (2) @(negedge clk_i);
    for (int r = 0; r < int'(N_ROUNDS); r++) begin
      for (int l = 0; l < int'(N_LINES); l++) begin
        if (r == 0) issue(VPU_WRITE, 1'(l % 2), l, l);
        else        issue(vpu_op_e'($urandom_range(1, 2)), 1'($urandom_range(0, 1)), l, l);
      end
      while (stores_done < (r + 1) * int'(N_LINES)) @(negedge clk_i);
      repeat (4) @(negedge clk_i);
      for (int l = 0; l < int'(N_LINES); l++) issue(VPU_LOAD, 1'($urandom_range(0, 1)), 64 + l, l);
      while (loads_done < (r + 1) * int'(N_LINES)) @(negedge clk_i);
    end
    done_o = 1'b1;
  end
endmodule
