// tb_mpa_mult: self-checking test of the basecase multiplier.
// The two operand registers are modelled as synchronous-read limb arrays.
// Random operands of 0..8 limbs (with limbs biased to 0, 1 and all-ones to
// provoke long carry chains) are multiplied; the captured result stream is
// compared with a product formed by the simulator's own wide arithmetic,
// including sign, size and the cycle count na*nb + 4 from start to done.
// The unit is built with LIMBS = 8, so products longer than 8 limbs must
// be truncated and raise 'ovf'.
module tb_mpa_mult;
  import mpa_pkg::*;

  localparam int L = 8;

  logic   clk = 0, rst = 1, start = 0;
  logic   done, ovf;
  laddr_t a_raddr, b_raddr;
  limb_t  a_data, b_data;
  logic   a_sign, b_sign;
  lsize_t a_size, b_size;
  wr_t    wr;

  limb_t  amem [2**AW];
  limb_t  bmem [2**AW];
  limb_t  rmem [2**AW];
  lsize_t r_size;
  logic   r_sign, r_meta, r_ovf;
  int     checks = 0, failures = 0;

  mpa_mult #(.LIMBS(L)) dut (
    .clk(clk), .rst(rst), .start(start), .done(done), .ovf(ovf),
    .a_raddr(a_raddr), .a_data(a_data), .a_sign(a_sign), .a_size(a_size),
    .b_raddr(b_raddr), .b_data(b_data), .b_sign(b_sign), .b_size(b_size),
    .wr(wr));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    a_data <= amem[a_raddr];
    b_data <= bmem[b_raddr];
    if (wr.we) rmem[wr.addr] <= wr.data;
    if (wr.meta_we) begin r_size <= wr.size; r_sign <= wr.sign; r_meta <= 1'b1; end
    if (ovf) r_ovf <= 1'b1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic limb_t rand_limb();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return limb_t'(1);
      2, 3: return '1;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int na, int nb, bit sa, bit sb);
    logic [2*L*LIMB_W-1:0] x, y, p;
    int   exp_size, cyc;
    bit   exp_ovf;
    x = '0; y = '0;
    for (int i = 0; i < na; i++) begin amem[i] = rand_limb(); x[i*LIMB_W +: LIMB_W] = amem[i]; end
    for (int i = 0; i < nb; i++) begin bmem[i] = rand_limb(); y[i*LIMB_W +: LIMB_W] = bmem[i]; end
    // keep operands normalised: a non-zero top limb
    if (na > 0 && amem[na-1] == '0) begin amem[na-1] = limb_t'(3); x[(na-1)*LIMB_W +: LIMB_W] = 3; end
    if (nb > 0 && bmem[nb-1] == '0) begin bmem[nb-1] = limb_t'(5); y[(nb-1)*LIMB_W +: LIMB_W] = 5; end
    for (int i = 0; i < 2**AW; i++) rmem[i] = {$urandom, $urandom};
    p = x * y;
    exp_ovf = 1'b0;
    for (int i = L; i < 2*L; i++) if (p[i*LIMB_W +: LIMB_W] != '0) exp_ovf = 1'b1;
    exp_size = 0;
    for (int i = 0; i < L; i++) if (p[i*LIMB_W +: LIMB_W] != '0) exp_size = i + 1;
    a_size = lsize_t'(na); b_size = lsize_t'(nb); a_sign = sa && na > 0; b_sign = sb && nb > 0;
    r_meta = 0; r_ovf = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(r_meta, "sign/size written");
    check(int'(r_size) == exp_size, $sformatf("size %0d exp %0d (na=%0d nb=%0d)", r_size, exp_size, na, nb));
    check(r_sign == ((sa ^ sb) && exp_size > 0), $sformatf("sign (na=%0d nb=%0d)", na, nb));
    for (int i = 0; i < exp_size; i++)
      check(rmem[i] == p[i*LIMB_W +: LIMB_W], $sformatf("limb %0d (na=%0d nb=%0d)", i, na, nb));
    check(r_ovf == exp_ovf, $sformatf("ovf %0d exp %0d", r_ovf, exp_ovf));
    if (na > 0 && nb > 0)
      check(cyc == na*nb + 4, $sformatf("cycles %0d exp %0d", cyc, na*nb + 4));
  endtask

  initial begin
    a_size = '0; b_size = '0; a_sign = 0; b_sign = 0;
    r_meta = 0; r_ovf = 0; r_size = '0; r_sign = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 1, 0, 0);
    run(0, 3, 1, 0);
    run(2, 0, 0, 1);
    run(3, 2, 1, 1);
    run(4, 4, 1, 0);
    run(8, 8, 0, 1);
    run(1, 8, 0, 0);
    for (int t = 0; t < 200; t++)
      run($urandom_range(0, L), $urandom_range(0, L), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
