// tb_rni_vpu_to_chi: exhaustive test of the combinational VPU-to-CHI mapping.
// Every 2-bit opcode and attr value is applied; after 1 time unit the CHI
// opcode and MemAttr must equal the literal values written out below, which
// are copied from the mapping table (CHI issue C opcode numbers). The six
// Load/Write/WritePtl rows are the design's mapping; the two rows for the
// unused opcode value 3 (treated like Load) check this design's own choice.
module tb_rni_vpu_to_chi;
  import rni_pkg::*;
  vpu_op_e     op;
  logic        attr;
  chi_req_op_e opcode;
  logic [3:0]  mem_attr;
  int checks = 0, failures = 0;

  rni_vpu_to_chi dut (.vpu_opcode_i(op), .vpu_attr_i(attr), .opcode_o(opcode), .mem_attr_o(mem_attr));

  task automatic expect_map(input logic [1:0] o, input logic a, input logic [5:0] exp_op,
                            input logic [3:0] exp_ma);
    op = vpu_op_e'(o); attr = a;
    #1;
    checks++;
    if (opcode != exp_op || mem_attr != exp_ma) begin
      failures++;
      $display("FAIL: op=%0d attr=%0d -> opcode=%h memattr=%b, expected %h %b",
               o, a, opcode, mem_attr, exp_op, exp_ma);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_map(2'd0, 1'b0, 6'h04, 4'b0010);  // Load     Device    -> ReadNoSnp
    expect_map(2'd0, 1'b1, 6'h03, 4'b0100);  // Load     Cacheable -> ReadOnce
    expect_map(2'd1, 1'b0, 6'h1D, 4'b0010);  // Write    Device    -> WriteNoSnpFull
    expect_map(2'd1, 1'b1, 6'h19, 4'b0100);  // Write    Cacheable -> WriteUniqueFull
    expect_map(2'd2, 1'b0, 6'h1C, 4'b0010);  // WritePtl Device    -> WriteNoSnpPtl
    expect_map(2'd2, 1'b1, 6'h18, 4'b0100);  // WritePtl Cacheable -> WriteUniquePtl
    expect_map(2'd3, 1'b0, 6'h04, 4'b0010);  // unused value, treated like Load
    expect_map(2'd3, 1'b1, 6'h03, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
