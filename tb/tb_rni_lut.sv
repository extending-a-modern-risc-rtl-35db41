// tb_rni_lut: random writes and two-port reads of the lookup table against a
// reference array. Checks the one-cycle read latency, read-old-data on a same-
// cycle write, that a port keeps its output when not enabled, and reset to zero.
module tb_rni_lut;
  localparam int unsigned DEPTH = 256, WIDTH = 15, NRD = 2;
  logic clk = 1'b0, rsn = 1'b0;
  logic wr_en;
  logic [7:0] wr_addr;
  logic [WIDTH-1:0] wr_data;
  logic [NRD-1:0] rd_en;
  logic [NRD-1:0][7:0] rd_addr;
  logic [NRD-1:0][WIDTH-1:0] rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [NRD-1:0][WIDTH-1:0] expect_q;
  int checks = 0, failures = 0;

  rni_lut #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(NRD)) dut (
    .clk_i(clk), .rsn_i(rsn), .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_en = 0; rd_addr = '0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    expect_q = '0;
    repeat (2) @(posedge clk);
    rsn = 1'b1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      // outputs produced by the previous cycle's reads
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd_data[p] != expect_q[p]) begin
          failures++;
          $display("FAIL: cycle %0d port %0d got %h expected %h", cyc, p, rd_data[p], expect_q[p]);
        end
      end
      wr_en   = 1'($urandom_range(0, 1));
      wr_addr = 8'($urandom_range(0, 15));   // small range: many address collisions
      wr_data = WIDTH'($urandom);
      for (int p = 0; p < NRD; p++) begin
        rd_en[p]   = $urandom_range(0, 3) != 0;
        rd_addr[p] = ($urandom_range(0, 1) == 1) ? wr_addr : 8'($urandom_range(0, 15));
      end
      @(posedge clk);
      for (int p = 0; p < NRD; p++) if (rd_en[p]) expect_q[p] = ref_mem[rd_addr[p]];
      if (wr_en) ref_mem[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
