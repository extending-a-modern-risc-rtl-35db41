// tb_rni_fwft_fifo: random pushes and pops of the FWFT FIFO against a queue
// model. Checks that the head is visible without a read request, valid/full
// flags, ordering, and that a pushed word appears one cycle after the push.
module tb_rni_fwft_fifo;
  localparam int unsigned WIDTH = 16, DEPTH = 15;
  logic clk = 1'b0, rsn = 1'b0;
  logic wr_en, rd_en, valid, full;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [$];
  int checks = 0, failures = 0, max_fill = 0;

  rni_fwft_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rsn_i(rsn), .wr_en_i(wr_en), .wr_data_i(wr_data), .rd_en_i(rd_en),
    .rd_data_o(rd_data), .valid_o(valid), .full_o(full));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rsn = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      check(valid == (model.size() != 0), "valid flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      // phases: mostly-fill, mostly-drain, mixed
      case ((cyc / 500) % 3)
        0: begin wr_en = $urandom_range(0, 3) != 0; rd_en = $urandom_range(0, 3) == 0; end
        1: begin wr_en = $urandom_range(0, 3) == 0; rd_en = $urandom_range(0, 3) != 0; end
        default: begin wr_en = 1'($urandom_range(0, 1)); rd_en = 1'($urandom_range(0, 1)); end
      endcase
      if (full && !(rd_en && valid)) wr_en = 1'b0;   // never push into a full FIFO
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      if (model.size() > max_fill) max_fill = model.size();
    end
    check(max_fill == DEPTH, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
