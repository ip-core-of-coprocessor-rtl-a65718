// mpa_register: one register of the bank, holding a number of up to
// LIMBS x 64 bits in sign-magnitude form.
//
// The magnitude sits in a limb memory with one write port and one synchronous
// read port per consumer (NRP ports, each with its own address), the form a
// multi-copy block RAM takes. Sign and size are flip-flops, reset to the
// value zero (size 0, sign 0); the limb memory is not reset, since no unit
// reads limbs at or above the size. A write stream with 'meta_we' set updates
// sign and size. Read data appears one cycle after its address.
module mpa_register
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic   clk,
  input  logic   rst,
  input  wr_t    wr,
  input  laddr_t raddr [NRP],
  output limb_t  rdata [NRP],
  output logic   sign,
  output lsize_t size
);

  limb_t mem [LIMBS];

  always_ff @(posedge clk) begin
    if (wr.we && (int'(wr.addr) < LIMBS)) mem[wr.addr] <= wr.data;
  end

  for (genvar p = 0; p < NRP; p++) begin : g_rd
    always_ff @(posedge clk) rdata[p] <= mem[raddr[p]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sign <= 1'b0;
      size <= '0;
    end else if (wr.meta_we) begin
      sign <= wr.sign;
      size <= wr.size;
    end
  end

endmodule
