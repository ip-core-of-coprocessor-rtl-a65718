// mpa_coprocessor: coprocessor for integer multiple-precision arithmetic
// (MPA), top level.
//
// The host feeds a program over an 8-bit AXI Stream bus and operands over two
// 64-bit AXI Stream buses (A and B); results come back over a 64-bit AXI
// Stream output bus (O). Numbers are sign-magnitude, 64-bit limbs, up to
// LIMBS limbs (512 = 32 kbit), held in a bank of 16 registers. The
// instruction decoder runs one instruction at a time:
//   loaa X / loab X      X = number from bus A / bus B
//   loaab X, Y           X = number from bus A and Y = number from bus B
//   unl X                bus O = X
//   mult X, Y, Z         Z = X * Y    (Z must differ from X and Y)
//   add X, Y, Z / sub    Z = X + Y / Z = X - Y
// Structure, as in the source design's architecture: two data loaders
// (DBusA, DBusB), a register bank whose registers each have a 5-to-1 input
// multiplexer (DBusA, DBusB, ResM, ResAS, RegM), 16-to-1 operand
// multiplexers in front of the multiplier (Ctrl16, Ctrl17), the
// adder/subtractor (Ctrl18, Ctrl19), the unloader (CtrlUL) and the RegM path
// (Ctrl20). No instruction of the set uses the RegM register-to-register
// path, so its write stream is idle and the register it reads (rm_sel) and
// the limb it returns are brought out for observation only.
//
// Status: 'busy' is high while an instruction executes; 'overflow' is sticky
// (cleared by reset) and records that a result or a loaded number did not
// fit into LIMBS limbs and was truncated. Reset 'rst' is synchronous and
// active high. Instruction encoding and bus framing: see mpa_pkg,
// mpa_loader and mpa_unloader.
module mpa_coprocessor
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic       clk,
  input  logic       rst,
  // program bus
  input  logic [7:0] s_prog_tdata,
  input  logic       s_prog_tvalid,
  output logic       s_prog_tready,
  input  logic       s_prog_tlast,
  // data bus A
  input  limb_t      s_a_tdata,
  input  logic       s_a_tvalid,
  output logic       s_a_tready,
  input  logic       s_a_tlast,
  input  logic       s_a_tuser,
  // data bus B
  input  limb_t      s_b_tdata,
  input  logic       s_b_tvalid,
  output logic       s_b_tready,
  input  logic       s_b_tlast,
  input  logic       s_b_tuser,
  // output bus O
  output limb_t      m_o_tdata,
  output logic       m_o_tvalid,
  input  logic       m_o_tready,
  output logic       m_o_tlast,
  output logic       m_o_tuser,
  // RegM path (Ctrl20), no instruction drives it
  input  ridx_t      rm_sel,
  input  laddr_t     rm_raddr,
  output limb_t      rm_rdata,
  // status
  output logic       busy,
  output logic       overflow
);

  wctl_t  wctl  [NREGS];
  ridx_t  rsel  [NRP];
  ridx_t  dsel  [NRP];
  wr_t    src   [NSRC];
  laddr_t raddr [NRP];
  limb_t  rdata [NRP];
  logic   rsign [NRP];
  lsize_t rsize [NRP];

  logic ld_a_start, ld_b_start, ul_start, m_start, as_start, as_sub;
  logic ld_a_done, ld_b_done, ul_done, m_done, as_done;
  logic ld_a_ovf, ld_b_ovf, m_ovf, as_ovf;
  laddr_t m_a_raddr, m_b_raddr, as_raddr, ul_raddr;

  logic unused_tlast;
  assign unused_tlast = s_prog_tlast;

  mpa_decoder u_dec (
    .clk        (clk),
    .rst        (rst),
    .s_tdata    (s_prog_tdata),
    .s_tvalid   (s_prog_tvalid),
    .s_tready   (s_prog_tready),
    .wctl       (wctl),
    .rsel       (dsel),
    .ld_a_start (ld_a_start),
    .ld_b_start (ld_b_start),
    .ul_start   (ul_start),
    .m_start    (m_start),
    .as_start   (as_start),
    .as_sub     (as_sub),
    .ld_a_done  (ld_a_done),
    .ld_b_done  (ld_b_done),
    .ul_done    (ul_done),
    .m_done     (m_done),
    .as_done    (as_done),
    .busy       (busy)
  );

  // Ctrl20 comes from outside; the others from the decoder
  always_comb begin
    rsel        = dsel;
    rsel[RP_RM] = rm_sel;
  end

  mpa_loader #(.LIMBS(LIMBS)) u_ld_a (
    .clk (clk), .rst (rst), .start (ld_a_start), .done (ld_a_done), .ovf (ld_a_ovf),
    .s_tdata (s_a_tdata), .s_tvalid (s_a_tvalid), .s_tready (s_a_tready),
    .s_tlast (s_a_tlast), .s_tuser (s_a_tuser), .wr (src[SRC_DBUSA])
  );

  mpa_loader #(.LIMBS(LIMBS)) u_ld_b (
    .clk (clk), .rst (rst), .start (ld_b_start), .done (ld_b_done), .ovf (ld_b_ovf),
    .s_tdata (s_b_tdata), .s_tvalid (s_b_tvalid), .s_tready (s_b_tready),
    .s_tlast (s_b_tlast), .s_tuser (s_b_tuser), .wr (src[SRC_DBUSB])
  );

  mpa_mult #(.LIMBS(LIMBS)) u_mult (
    .clk (clk), .rst (rst), .start (m_start), .done (m_done), .ovf (m_ovf),
    .a_raddr (m_a_raddr), .a_data (rdata[RP_MA]), .a_sign (rsign[RP_MA]), .a_size (rsize[RP_MA]),
    .b_raddr (m_b_raddr), .b_data (rdata[RP_MB]), .b_sign (rsign[RP_MB]), .b_size (rsize[RP_MB]),
    .wr (src[SRC_RESM])
  );

  mpa_addsub #(.LIMBS(LIMBS)) u_addsub (
    .clk (clk), .rst (rst), .start (as_start), .sub (as_sub), .done (as_done), .ovf (as_ovf),
    .raddr (as_raddr),
    .a_data (rdata[RP_ASA]), .a_sign (rsign[RP_ASA]), .a_size (rsize[RP_ASA]),
    .b_data (rdata[RP_ASB]), .b_sign (rsign[RP_ASB]), .b_size (rsize[RP_ASB]),
    .wr (src[SRC_RESAS])
  );

  mpa_unloader u_unl (
    .clk (clk), .rst (rst), .start (ul_start), .done (ul_done),
    .raddr (ul_raddr), .rdata (rdata[RP_UL]), .rsign (rsign[RP_UL]), .rsize (rsize[RP_UL]),
    .m_tdata (m_o_tdata), .m_tvalid (m_o_tvalid), .m_tready (m_o_tready),
    .m_tlast (m_o_tlast), .m_tuser (m_o_tuser)
  );

  assign src[SRC_REGM] = WR_IDLE;

  always_comb begin
    raddr         = '{default: '0};
    raddr[RP_MA]  = m_a_raddr;
    raddr[RP_MB]  = m_b_raddr;
    raddr[RP_ASA] = as_raddr;
    raddr[RP_ASB] = as_raddr;
    raddr[RP_UL]  = ul_raddr;
    raddr[RP_RM]  = rm_raddr;
  end

  assign rm_rdata = rdata[RP_RM];

  mpa_regbank #(.LIMBS(LIMBS)) u_bank (
    .clk   (clk),
    .rst   (rst),
    .wctl  (wctl),
    .src   (src),
    .rsel  (rsel),
    .raddr (raddr),
    .rdata (rdata),
    .rsign (rsign),
    .rsize (rsize)
  );

  always_ff @(posedge clk) begin
    if (rst) overflow <= 1'b0;
    else if (ld_a_ovf || ld_b_ovf || m_ovf || as_ovf) overflow <= 1'b1;
  end

endmodule
