// tb_rni_credit: self-checking test of the L-credit counter. Random lcrdv and
// flitv (flitv only while a credit is held) are applied; a reference count is
// kept in the testbench and have_credit must equal (count != 0) every cycle.
// Also checks reset to zero credits and saturation at MAX.
module tb_rni_credit;
  localparam int unsigned MAX = 15;
  logic clk = 1'b0, rsn = 1'b0, lcrdv = 1'b0, flitv = 1'b0, have_credit;
  int checks = 0, failures = 0;
  int ref_count = 0;

  rni_credit #(.MAX(MAX)) dut (.clk_i(clk), .rsn_i(rsn), .lcrdv_i(lcrdv), .flitv_i(flitv),
                               .have_credit_o(have_credit));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (ref=%0d)", what, ref_count); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rsn = 1'b1;
    @(negedge clk);
    check(!have_credit, "no credit after reset");
    // fill to saturation
    for (int i = 0; i < MAX + 5; i++) begin
      lcrdv = 1'b1; flitv = 1'b0;
      @(posedge clk); if (ref_count < MAX) ref_count++;
      @(negedge clk);
      check(have_credit == (ref_count != 0), "fill");
    end
    // drain completely
    lcrdv = 1'b0;
    while (have_credit) begin
      flitv = 1'b1;
      @(posedge clk); ref_count--;
      @(negedge clk);
      check(have_credit == (ref_count != 0), "drain");
    end
    flitv = 1'b0;
    check(ref_count == 0, "drained exactly MAX credits");
    // random traffic
    for (int i = 0; i < 5000; i++) begin
      lcrdv = ($urandom_range(0, 2) == 0) && (ref_count < MAX);
      flitv = have_credit && ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (lcrdv && !flitv) ref_count++;
      else if (flitv && !lcrdv) ref_count--;
      @(negedge clk);
      check(have_credit == (ref_count != 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
