// mpa_rd_mux: a 16-to-1 register multiplexer feeding one unit.
//
// Every unit that reads the register bank (the two multiplier operands, the
// two adder/subtractor operands, the unloader and the register-to-register
// path) has its own multiplexer, driven by one of Ctrl16..Ctrl20 or CtrlUL.
// It passes the selected register's sign, size and the limb that register
// returns on this read port. The limb memories read synchronously, so the
// limb belongs to the address presented one cycle earlier; the select must
// be held for the whole operation, which the decoder does. Combinational.
module mpa_rd_mux
  import mpa_pkg::*;
(
  input  ridx_t  sel,                 // register index
  input  limb_t  reg_data [NREGS],    // limb read by each register on this port
  input  logic   reg_sign [NREGS],
  input  lsize_t reg_size [NREGS],
  output limb_t  data,
  output logic   sign,
  output lsize_t size
);

  assign data = reg_data[sel];
  assign sign = reg_sign[sel];
  assign size = reg_size[sel];

endmodule
