// rni_vpu_error: turns the 2-bit CHI RespErr of a received flit into the single
// error bit the VPU sees, taking into account whether the transaction was
// exclusive. Purely combinational.
//
// For an exclusive transaction the only success is EXOK: a plain OK means the
// exclusive access failed, and DERR/NDERR are errors. For a normal transaction
// only OK is success. That the error depends on RespErr and the Excl bit follows
// the design description; the exact rule is this design's reading of the CHI
// RespErr encoding (00 OK, 01 EXOK, 10 DERR, 11 NDERR).
module rni_vpu_error
  import rni_pkg::*;
(
  input  logic       excl_i,
  input  logic [1:0] resp_err_i,
  output logic       error_o
);
  assign error_o = excl_i ? (resp_err_i != RESPERR_EXOK)
                          : (resp_err_i != RESPERR_OK);
endmodule
