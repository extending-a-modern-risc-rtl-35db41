// rni_vpu_to_chi: maps a VPU request opcode and attr bit to a CHI REQ opcode
// and MemAttr value. Purely combinational.
//
//   VPU opcode  attr        CHI opcode        MemAttr
//   Load        0 (Device)  ReadNoSnp         0010
//   Load        1 (Cache)   ReadOnce          0100
//   Write       0           WriteNoSnpFull    0010
//   Write       1           WriteUniqueFull   0100
//   WritePtl    0           WriteNoSnpPtl     0010
//   WritePtl    1           WriteUniquePtl    0100
//
// The table is the design's own mapping. The numeric VPU encodings are this
// design's choice: Load=0, Write=1, WritePtl=2, and attr 0 = Device,
// 1 = Cacheable, the order in which the mapping lists them. The unused VPU
// opcode value 3 is treated like Load here; the upstream LSU never issues it.
module rni_vpu_to_chi
  import rni_pkg::*;
(
  input  vpu_op_e     vpu_opcode_i,
  input  logic        vpu_attr_i,
  output chi_req_op_e opcode_o,
  output logic [3:0]  mem_attr_o
);
  always_comb begin
    mem_attr_o = (vpu_attr_i == ATTR_CACHEABLE) ? MEMATTR_CACHEABLE : MEMATTR_DEVICE;
    unique case (vpu_opcode_i)
      VPU_WRITE:     opcode_o = vpu_attr_i ? REQ_WRITE_UNIQUE_FULL : REQ_WRITE_NO_SNP_FULL;
      VPU_WRITE_PTL: opcode_o = vpu_attr_i ? REQ_WRITE_UNIQUE_PTL  : REQ_WRITE_NO_SNP_PTL;
      default:       opcode_o = vpu_attr_i ? REQ_READ_ONCE         : REQ_READ_NO_SNP;
    endcase
  end
endmodule
