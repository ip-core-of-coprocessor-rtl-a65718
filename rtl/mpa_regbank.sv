// mpa_regbank: the bank of 16 registers (Reg0..Reg15) with their 5-to-1
// input multiplexers and the six 16-to-1 output multiplexers.
//
// Write side: each register has an mpa_wr_mux driven by its control word
// (Ctrl0..Ctrl15) that selects one of the write streams DBusA, DBusB, ResM,
// ResAS and RegM. Read side: read port p has a register select (Ctrl16..20,
// CtrlUL) and a limb address; the address goes to all registers and the
// port's mpa_rd_mux picks the selected register's limb, sign and size. Limbs
// arrive one cycle after their address; sign and size are current values.
// Port order is given by mpa_pkg::rport_e. The multiplexer structure follows
// the source design's architecture drawing; the synchronous memories and the
// per-port addresses are this design's own.
module mpa_regbank
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic   clk,
  input  logic   rst,
  input  wctl_t  wctl  [NREGS],   // Ctrl0..Ctrl15
  input  wr_t    src   [NSRC],    // DBusA, DBusB, ResM, ResAS, RegM
  input  ridx_t  rsel  [NRP],     // Ctrl16..Ctrl20, CtrlUL
  input  laddr_t raddr [NRP],
  output limb_t  rdata [NRP],
  output logic   rsign [NRP],
  output lsize_t rsize [NRP]
);

  limb_t  reg_rdata [NRP][NREGS];
  logic   reg_sign  [NREGS];
  lsize_t reg_size  [NREGS];

  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    wr_t   wr;
    limb_t rd [NRP];

    mpa_wr_mux u_wmux (
      .ctrl (wctl[r]),
      .src  (src),
      .wr   (wr)
    );

    mpa_register #(.LIMBS(LIMBS)) u_reg (
      .clk   (clk),
      .rst   (rst),
      .wr    (wr),
      .raddr (raddr),
      .rdata (rd),
      .sign  (reg_sign[r]),
      .size  (reg_size[r])
    );

    for (genvar p = 0; p < NRP; p++) begin : g_rp
      assign reg_rdata[p][r] = rd[p];
    end
  end

  for (genvar p = 0; p < NRP; p++) begin : g_rmux
    mpa_rd_mux u_rmux (
      .sel      (rsel[p]),
      .reg_data (reg_rdata[p]),
      .reg_sign (reg_sign),
      .reg_size (reg_size),
      .data     (rdata[p]),
      .sign     (rsign[p]),
      .size     (rsize[p])
    );
  end

endmodule
