// tb_mpa_coprocessor: end-to-end test of the coprocessor, built with
// LIMBS = 8 (512-bit registers) so that overflow is reachable.
//
// The testbench acts as the host. It builds a program, the numbers to send
// on buses A and B and the numbers it expects on bus O, all worked out by a
// reference model of the 16 registers that uses the simulator's own wide
// arithmetic. Then four processes run side by side: the program feeder and
// the two data feeders (each with random gaps) and the output collector
// (with random tready). Parts:
//   1. the factorial program of four from the source design, result 24;
//   2. a factorial program in the same register pattern for n = 60;
//   3. random programs of all seven instructions on signed numbers of up to
//      eight limbs, including loads of too-long numbers.
// Each mechanism is counted and must occur at least once: every opcode,
// program-bus stall, bus-O back-pressure, gaps on buses A/B, negative and
// zero results, the magnitude compare of a subtraction, a carry limb, and
// overflow (sticky flag checked against the model).
module tb_mpa_coprocessor;
  import mpa_pkg::*;

  localparam int L  = 8;
  localparam int MW = 2 * L * LIMB_W + LIMB_W;   // reference magnitude width

  typedef logic [MW-1:0] mag_t;

  logic       clk = 0, rst = 1;
  logic [7:0] s_prog_tdata = '0;
  logic       s_prog_tvalid = 0, s_prog_tready, s_prog_tlast = 0;
  limb_t      s_a_tdata = '0, s_b_tdata = '0;
  logic       s_a_tvalid = 0, s_a_tready, s_a_tlast = 0, s_a_tuser = 0;
  logic       s_b_tvalid = 0, s_b_tready, s_b_tlast = 0, s_b_tuser = 0;
  limb_t      m_o_tdata;
  logic       m_o_tvalid, m_o_tready = 0, m_o_tlast, m_o_tuser;
  ridx_t      rm_sel = '0;
  laddr_t     rm_raddr = '0;
  limb_t      rm_rdata;
  logic       busy, overflow;

  mpa_coprocessor #(.LIMBS(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- queues
  logic [7:0] prog_q [$];
  limb_t      a_q [$], b_q [$], o_q [$];
  bit         a_last [$], b_last [$], o_last [$];
  bit         a_user [$], b_user [$], o_user [$];
  int         o_expected;   // beats expected on bus O in this part

  // ------------------------------------------------------- reference model
  mag_t ref_mag [NREGS];
  bit   ref_sgn [NREGS];
  bit   ref_ovf;
  int   n_op [8];
  int   n_neg = 0, n_zero = 0, n_scan = 0, n_carry = 0, n_ovf_ev = 0;
  int   n_stall = 0, n_bp = 0, n_gap_a = 0, n_gap_b = 0;
  mag_t LIM_MOD;

  function automatic int nlimbs(mag_t m);
    int n = 0;
    for (int i = 0; i < MW / LIMB_W; i++) if (m[i*LIMB_W +: LIMB_W] != '0) n = i + 1;
    return n;
  endfunction

  function automatic void store(ridx_t r, mag_t m, bit s);
    if (m >= LIM_MOD) begin ref_ovf = 1; n_ovf_ev++; end
    m = m % LIM_MOD;
    ref_mag[r] = m;
    ref_sgn[r] = s && (m != '0);
    if (ref_sgn[r]) n_neg++;
    if (m == '0) n_zero++;
  endfunction

  // push a number of k beats (k >= 1) on bus A or B; returns the magnitude
  function automatic void push_num(bit bus_b, mag_t m, int k, bit s);
    for (int i = 0; i < k; i++) begin
      if (!bus_b) begin a_q.push_back(m[i*LIMB_W +: LIMB_W]); a_last.push_back(i == k-1); a_user.push_back(s); end
      else        begin b_q.push_back(m[i*LIMB_W +: LIMB_W]); b_last.push_back(i == k-1); b_user.push_back(s); end
    end
  endfunction

  function automatic mag_t rand_mag(int k);
    mag_t m = '0;
    for (int i = 0; i < k; i++)
      case ($urandom_range(0, 3))
        0: m[i*LIMB_W +: LIMB_W] = '1;
        1: m[i*LIMB_W +: LIMB_W] = limb_t'($urandom_range(0, 3));
        default: m[i*LIMB_W +: LIMB_W] = {$urandom, $urandom};
      endcase
    return m;
  endfunction

  // instruction emitters, each updating the model
  function automatic void i_load(opcode_e op, ridx_t x, ridx_t y, mag_t ma, int ka, bit sa,
                                 mag_t mb, int kb, bit sb);
    prog_q.push_back({op, x});
    n_op[op]++;
    if (op == OP_LOAAB) prog_q.push_back({y, 4'h0});
    if (op != OP_LOAB) push_num(1'b0, ma, ka, sa);
    if (op != OP_LOAA) push_num(1'b1, mb, kb, sb);
    if (op == OP_LOAA || op == OP_LOAAB) store(x, ma, sa);
    if (op == OP_LOAB) store(x, mb, sb);
    if (op == OP_LOAAB) store(y, mb, sb);
  endfunction

  function automatic void i_unl(ridx_t x);
    int k;
    prog_q.push_back({OP_UNL, x});
    n_op[OP_UNL]++;
    k = nlimbs(ref_mag[x]);
    if (k == 0) begin o_q.push_back('0); o_last.push_back(1); o_user.push_back(0); end
    for (int i = 0; i < k; i++) begin
      o_q.push_back(ref_mag[x][i*LIMB_W +: LIMB_W]);
      o_last.push_back(i == k-1);
      o_user.push_back(ref_sgn[x]);
    end
  endfunction

  function automatic void i_arith(opcode_e op, ridx_t x, ridx_t y, ridx_t z);
    mag_t mx, my, mz;
    bit   sx, sy, sz;
    prog_q.push_back({op, x});
    prog_q.push_back({y, z});
    n_op[op]++;
    mx = ref_mag[x]; my = ref_mag[y]; sx = ref_sgn[x]; sy = ref_sgn[y];
    if (op == OP_MULT) begin
      mz = mx * my; sz = sx ^ sy;
    end else begin
      if (op == OP_SUB) sy = ~sy;
      if (sx == sy) begin
        mz = mx + my; sz = sx;
        if (nlimbs(mz) > ((nlimbs(mx) > nlimbs(my)) ? nlimbs(mx) : nlimbs(my))) n_carry++;
      end else begin
        if (nlimbs(mx) == nlimbs(my) && mx != '0) n_scan++;
        if (mx >= my) begin mz = mx - my; sz = sx; end
        else          begin mz = my - mx; sz = sy; end
      end
    end
    store(z, mz, sz);
  endfunction

  // ------------------------------------------------------------ bus drivers
  bit run_en = 0;

  initial forever begin
    @(negedge clk);
    if (run_en && prog_q.size() > 0) begin
      if ($urandom_range(0, 3) == 0) continue;
      s_prog_tvalid = 1; s_prog_tdata = prog_q.pop_front(); s_prog_tlast = (prog_q.size() == 0);
      @(posedge clk);
      while (!s_prog_tready) begin n_stall++; @(posedge clk); end
      @(negedge clk);
      s_prog_tvalid = 0; s_prog_tlast = 0; s_prog_tdata = 8'($urandom);
    end
  end

  initial forever begin
    @(negedge clk);
    if (run_en && a_q.size() > 0) begin
      if ($urandom_range(0, 2) == 0) begin if (s_a_tready) n_gap_a++; continue; end
      s_a_tvalid = 1; s_a_tdata = a_q.pop_front(); s_a_tlast = a_last.pop_front(); s_a_tuser = a_user.pop_front();
      @(posedge clk);
      while (!s_a_tready) @(posedge clk);
      @(negedge clk);
      s_a_tvalid = 0; s_a_tlast = 0; s_a_tdata = {$urandom, $urandom};
    end
  end

  initial forever begin
    @(negedge clk);
    if (run_en && b_q.size() > 0) begin
      if ($urandom_range(0, 2) == 0) begin if (s_b_tready) n_gap_b++; continue; end
      s_b_tvalid = 1; s_b_tdata = b_q.pop_front(); s_b_tlast = b_last.pop_front(); s_b_tuser = b_user.pop_front();
      @(posedge clk);
      while (!s_b_tready) @(posedge clk);
      @(negedge clk);
      s_b_tvalid = 0; s_b_tlast = 0; s_b_tdata = {$urandom, $urandom};
    end
  end

  int o_seen;
  initial forever begin
    @(negedge clk);
    m_o_tready = ($urandom_range(0, 3) != 0);
    @(posedge clk);
    if (m_o_tvalid && !m_o_tready) n_bp++;
    if (m_o_tvalid && m_o_tready) begin
      if (o_q.size() == 0) check(0, "unexpected beat on bus O");
      else begin
        limb_t d; bit l, u;
        d = o_q.pop_front(); l = o_last.pop_front(); u = o_user.pop_front();
        check(m_o_tdata == d && m_o_tlast == l && m_o_tuser == u,
              $sformatf("bus O beat %0d: %h last %0d sign %0d, expected %h %0d %0d",
                        o_seen, m_o_tdata, m_o_tlast, m_o_tuser, d, l, u));
      end
      o_seen++;
    end
  end

  // run what has been queued and wait until it has completed
  task automatic execute(string name);
    int cyc = 0;
    o_expected = o_q.size();
    o_seen = 0;
    run_en = 1;
    while (prog_q.size() > 0 || busy || s_prog_tvalid || o_q.size() > 0) begin
      @(negedge clk); cyc++;
    end
    repeat (3) @(negedge clk);
    run_en = 0;
    check(o_seen == o_expected, $sformatf("%s: %0d of %0d output beats", name, o_seen, o_expected));
    check(a_q.size() == 0 && b_q.size() == 0, $sformatf("%s: all input data consumed", name));
    check(overflow == ref_ovf, $sformatf("%s: overflow flag %0d, model %0d", name, overflow, ref_ovf));
    $display("%s: %0d cycles", name, cyc);
  endtask

  // factorial in the register pattern of the source design's listing
  task automatic factorial(int n);
    mag_t one = mag_t'(1);
    bit   in_r1;
    ridx_t cnt, nxt, acc, dst;
    i_load(OP_LOAAB, 0, 2, one, 1, 0, one, 1, 0);   // reg0 = reg2 = 1
    i_load(OP_LOAA, 3, 0, one, 1, 0, '0, 0, 0);     // reg3 = 1
    cnt = 2; nxt = 4; acc = 0; dst = 1;
    for (int k = 2; k <= n; k++) begin
      i_arith(OP_ADD, cnt, 3, nxt);
      i_arith(OP_MULT, nxt, acc, dst);
      {cnt, nxt} = {nxt, cnt};
      {acc, dst} = {dst, acc};
    end
    i_unl(acc);
  endtask

  initial begin
    mag_t f;
    LIM_MOD = mag_t'(1) << (L * LIMB_W);
    for (int r = 0; r < NREGS; r++) begin ref_mag[r] = '0; ref_sgn[r] = 0; end
    for (int i = 0; i < 8; i++) n_op[i] = 0;
    ref_ovf = 0; o_expected = 0; o_seen = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);

    // 1. factorial of four (Table II program)
    factorial(4);
    check(ref_mag[1] == mag_t'(24), "model: 4! = 24 in reg1");
    execute("factorial 4");

    // 2. factorial of 60 (272 bits)
    factorial(60);
    f = mag_t'(1);
    for (int k = 2; k <= 60; k++) f = f * mag_t'(k);
    check(ref_mag[1] == f, "model: 60! in reg1");
    execute("factorial 60");

    // 3. random programs
    for (int p = 0; p < 12; p++) begin
      for (int t = 0; t < 40; t++) begin
        int    kind;
        ridx_t x, y, z;
        x = ridx_t'($urandom); y = ridx_t'($urandom); z = ridx_t'($urandom);
        kind = $urandom_range(0, 9);
        case (kind)
          0, 1: begin
            int ka, kb;
            opcode_e op;
            op = opcode_e'($urandom_range(1, 3));
            ka = $urandom_range(1, 3); kb = $urandom_range(1, 3);
            if ($urandom_range(0, 15) == 0) ka = L + 2;   // too long
            if (op == OP_LOAAB && x == y) y = x + 1'b1;
            i_load(op, x, y, rand_mag(ka), ka, 1'($urandom), rand_mag(kb), kb, 1'($urandom));
          end
          2: i_unl(x);
          3, 4: begin
            while (z == x || z == y) z = ridx_t'($urandom);
            i_arith(OP_MULT, x, y, z);
          end
          5, 6: i_arith(OP_ADD, x, ($urandom_range(0, 3) == 0) ? x : y, z);
          default: i_arith(OP_SUB, x, ($urandom_range(0, 4) == 0) ? x : y, z);
        endcase
      end
      for (int r = 0; r < NREGS; r++) i_unl(ridx_t'(r));
      execute($sformatf("random program %0d", p));
    end

    // every mechanism must have happened
    for (int o = 1; o <= 7; o++) check(n_op[o] > 0, $sformatf("opcode %0d used", o));
    check(n_stall > 0, "program bus stalled");
    check(n_bp > 0, "bus O back-pressure");
    check(n_gap_a > 0 && n_gap_b > 0, "gaps on buses A and B");
    check(n_neg > 0, "negative result");
    check(n_zero > 0, "zero result");
    check(n_scan > 0, "magnitude compare of equal sizes");
    check(n_carry > 0, "carry limb");
    check(n_ovf_ev > 0 && overflow, "overflow");
    $display("mechanisms: loaa %0d loab %0d loaab %0d unl %0d mult %0d add %0d sub %0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("  stall %0d backpressure %0d gapsA %0d gapsB %0d negative %0d zero %0d compare %0d carry %0d overflow %0d",
             n_stall, n_bp, n_gap_a, n_gap_b, n_neg, n_zero, n_scan, n_carry, n_ovf_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
