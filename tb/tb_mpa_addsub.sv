// tb_mpa_addsub: self-checking test of the sign-magnitude adder/subtractor.
// Operands X and Y of 0..8 limbs with random signs are added or subtracted;
// the reference is the simulator's own signed wide arithmetic. Directed
// cases cover equal magnitudes (zero result), operands that differ only in
// a low limb (long compare scan), a carry out of the top limb, and, with
// the unit built for LIMBS = 8, a carry that does not fit ('ovf'). Also
// checked: an operation whose destination register is one of its operands
// (modelled by writing the result into X's array) and the cycle count of
// an addition of equal-signed operands, max(na,nb) + 3 (+1 with a carry limb).
module tb_mpa_addsub;
  import mpa_pkg::*;

  localparam int L = 8;
  localparam int W = (L + 2) * LIMB_W;

  logic   clk = 0, rst = 1, start = 0, sub = 0;
  logic   done, ovf;
  laddr_t raddr;
  limb_t  a_data, b_data;
  logic   a_sign, b_sign;
  lsize_t a_size, b_size;
  wr_t    wr;

  limb_t  amem [2**AW];
  limb_t  bmem [2**AW];
  limb_t  rmem [2**AW];
  bit     alias_x;     // result is written into X's array
  lsize_t r_size;
  logic   r_sign, r_meta, r_ovf;
  int     checks = 0, failures = 0;
  int     n_scan = 0, n_zero = 0, n_carry = 0, n_ovf = 0;

  mpa_addsub #(.LIMBS(L)) dut (
    .clk(clk), .rst(rst), .start(start), .sub(sub), .done(done), .ovf(ovf),
    .raddr(raddr), .a_data(a_data), .a_sign(a_sign), .a_size(a_size),
    .b_data(b_data), .b_sign(b_sign), .b_size(b_size), .wr(wr));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    a_data <= amem[raddr];
    b_data <= bmem[raddr];
    if (wr.we) begin
      rmem[wr.addr] <= wr.data;
      if (alias_x) amem[wr.addr] <= wr.data;
    end
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

  // kind: 0 random, 1 Y = X (same size), 2 Y = X except limb 0, 3 all-ones X+Y
  task automatic run(int na, int nb, bit sa, bit sb, bit s, int kind, bit al);
    logic signed [W-1:0] x, y, z;
    logic [W-1:0] mag;
    int   exp_size, cyc;
    bit   exp_sign, exp_ovf;
    if (kind != 0) nb = na;
    for (int i = 0; i < na; i++) amem[i] = (kind == 3) ? '1 : rand_limb();
    for (int i = 0; i < nb; i++) bmem[i] = (kind == 3) ? '1 : (kind != 0) ? amem[i] : rand_limb();
    if (na > 0 && amem[na-1] == '0) amem[na-1] = limb_t'(7);
    if (nb > 0 && bmem[nb-1] == '0) bmem[nb-1] = (kind != 0) ? amem[nb-1] : limb_t'(9);
    if (kind == 2 && na > 0) bmem[0] = amem[0] + limb_t'($urandom_range(1, 2)) - limb_t'(2);
    for (int i = na; i < 2**AW; i++) amem[i] = {$urandom, $urandom};   // garbage above size
    for (int i = nb; i < 2**AW; i++) bmem[i] = {$urandom, $urandom};
    x = '0; y = '0;
    for (int i = 0; i < na; i++) x[i*LIMB_W +: LIMB_W] = amem[i];
    for (int i = 0; i < nb; i++) y[i*LIMB_W +: LIMB_W] = bmem[i];
    if (sa) x = -x;
    if (sb) y = -y;
    z = s ? x - y : x + y;
    exp_sign = z < 0;
    mag = exp_sign ? -z : z;
    exp_ovf = (mag >> (L*LIMB_W)) != '0;
    exp_size = 0;
    for (int i = 0; i < L; i++) if (mag[i*LIMB_W +: LIMB_W] != '0) exp_size = i + 1;
    a_size = lsize_t'(na); b_size = lsize_t'(nb);
    a_sign = sa && na > 0; b_sign = sb && nb > 0;
    sub = s; alias_x = al;
    r_meta = 0; r_ovf = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    if (na == nb && na > 0 && ((sa ^ sb) != s)) n_scan++;
    if (exp_size == 0 && (na > 0 || nb > 0)) n_zero++;
    if (exp_ovf) n_ovf++;
    check(r_meta, "sign/size written");
    check(int'(r_size) == exp_size, $sformatf("size %0d exp %0d (na=%0d nb=%0d sub=%0d kind=%0d)", r_size, exp_size, na, nb, s, kind));
    check(r_sign == (exp_sign && exp_size > 0), $sformatf("sign (na=%0d nb=%0d sub=%0d)", na, nb, s));
    for (int i = 0; i < exp_size; i++)
      check(rmem[i] == mag[i*LIMB_W +: LIMB_W], $sformatf("limb %0d (na=%0d nb=%0d sub=%0d kind=%0d)", i, na, nb, s, kind));
    check(r_ovf == exp_ovf, $sformatf("ovf %0d exp %0d", r_ovf, exp_ovf));
    if ((sa ^ sb) == s && (na > 0 || nb > 0)) begin
      int n, carry;
      n = (na > nb) ? na : nb;
      carry = (mag >> (n*LIMB_W)) != '0 ? 1 : 0;
      if (carry != 0) n_carry++;
      check(cyc == n + 3 + carry, $sformatf("cycles %0d exp %0d", cyc, n + 3 + carry));
    end
  endtask

  initial begin
    a_size = '0; b_size = '0; a_sign = 0; b_sign = 0; alias_x = 0;
    r_meta = 0; r_ovf = 0; r_size = '0; r_sign = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 1, 0, 0, 0, 0, 0);
    run(0, 0, 0, 0, 1, 0, 0);
    run(3, 0, 1, 0, 1, 0, 0);
    run(0, 3, 0, 0, 1, 0, 0);
    run(4, 4, 0, 0, 1, 1, 0);   // X - X = 0
    run(4, 4, 1, 0, 0, 1, 0);   // -X + X = 0
    run(5, 5, 0, 0, 1, 2, 0);   // differ only in limb 0
    run(5, 5, 1, 1, 1, 2, 0);
    run(3, 3, 0, 0, 0, 3, 0);   // carry limb
    run(8, 8, 1, 1, 0, 3, 0);   // carry beyond LIMBS
    run(6, 2, 0, 1, 1, 0, 1);   // destination = X
    for (int t = 0; t < 300; t++)
      run($urandom_range(0, L), $urandom_range(0, L), 1'($urandom), 1'($urandom),
          1'($urandom), $urandom_range(0, 3), 1'($urandom));
    check(n_scan > 0 && n_zero > 0 && n_carry > 0 && n_ovf > 0,
          $sformatf("coverage scan=%0d zero=%0d carry=%0d ovf=%0d", n_scan, n_zero, n_carry, n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
