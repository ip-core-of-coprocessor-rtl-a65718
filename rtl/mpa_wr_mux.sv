// mpa_wr_mux: the 5-to-1 multiplexer in front of one register.
//
// Each register of the bank can be written from five sources: data loader A
// (DBusA), data loader B (DBusB), the multiplier (ResM), the adder/subtractor
// (ResAS) and the register-to-register path (RegM). The register's control
// word (one of Ctrl0..Ctrl15) enables the register and picks the source; a
// disabled register sees an idle write stream, so a unit's writes reach only
// the register the current instruction names as its destination. The five
// inputs and their order follow the architecture drawing of the source
// design; the enable bit is this design's own. Purely combinational.
module mpa_wr_mux
  import mpa_pkg::*;
(
  input  wctl_t ctrl,            // enable and source select
  input  wr_t   src [NSRC],      // write streams, indexed by wsrc_e
  output wr_t   wr               // selected stream into the register
);

  always_comb begin
    wr = WR_IDLE;
    if (ctrl.en) begin
      unique case (ctrl.src)
        SRC_DBUSA: wr = src[0];
        SRC_DBUSB: wr = src[1];
        SRC_RESM:  wr = src[2];
        SRC_RESAS: wr = src[3];
        SRC_REGM:  wr = src[4];
        default:   wr = WR_IDLE;
      endcase
    end
  end

endmodule
