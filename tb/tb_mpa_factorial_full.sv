// tb_mpa_factorial_full: the factorial benchmark on the coprocessor with all
// parameters at their defaults (16 registers of 512 limbs = 32 kbit).
//
// The host side sends the factorial program in the register pattern of the
// published listing (reg0 = reg2 = reg3 = 1, then for k = 2..N an add that
// forms the next factor in reg2/reg4 and a mult that multiplies it into
// reg0/reg1), and collects the unloaded result. The expected value of N! is
// computed here limb by limb with multiply-by-small-integer arithmetic,
// independent of the coprocessor's algorithm. All buses run without gaps,
// so the cycle count is the coprocessor's own. N runs over 4 and 100, 200,
// ..., 1000, the range of the published timing sweep; each run's cycle
// count is printed, must grow with N, and for N = 1000 must not exceed
// 130560 cycles, the reported 326.4 us at the reported 400 MHz.
module tb_mpa_factorial_full;
  import mpa_pkg::*;

  logic       clk = 0, rst = 1;
  logic [7:0] s_prog_tdata = '0;
  logic       s_prog_tvalid = 0, s_prog_tready, s_prog_tlast = 0;
  limb_t      s_a_tdata = '0, s_b_tdata = '0;
  logic       s_a_tvalid = 0, s_a_tready, s_a_tlast = 0, s_a_tuser = 0;
  logic       s_b_tvalid = 0, s_b_tready, s_b_tlast = 0, s_b_tuser = 0;
  limb_t      m_o_tdata;
  logic       m_o_tvalid, m_o_tready = 1, m_o_tlast, m_o_tuser;
  ridx_t      rm_sel = '0;
  laddr_t     rm_raddr = '0;
  limb_t      rm_rdata;
  logic       busy, overflow;

  mpa_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] prog_q [$];
  limb_t      out_q [$];
  bit         out_last [$];

  // program and data feeders: one byte / one beat per cycle when ready
  initial forever begin
    @(negedge clk);
    if (prog_q.size() > 0) begin
      s_prog_tvalid = 1; s_prog_tdata = prog_q[0]; s_prog_tlast = (prog_q.size() == 1);
      @(posedge clk);
      if (s_prog_tready) void'(prog_q.pop_front());
    end else begin
      s_prog_tvalid = 0; s_prog_tlast = 0;
    end
  end

  always_ff @(posedge clk) if (m_o_tvalid && m_o_tready) begin
    out_q.push_back(m_o_tdata);
    out_last.push_back(m_o_tlast);
  end

  // the value 1 on bus A or B when the loader asks for it
  int a_left = 0, b_left = 0;
  always_comb begin
    s_a_tvalid = (a_left > 0); s_a_tdata = limb_t'(1); s_a_tlast = 1'b1; s_a_tuser = 1'b0;
    s_b_tvalid = (b_left > 0); s_b_tdata = limb_t'(1); s_b_tlast = 1'b1; s_b_tuser = 1'b0;
  end
  always @(posedge clk) begin
    if (s_a_tvalid && s_a_tready) a_left <= a_left - 1;
    if (s_b_tvalid && s_b_tready) b_left <= b_left - 1;
  end

  int prev_cyc = 0;

  task automatic run_factorial(int n, int max_cycles, output int cycles);
    limb_t ref_l [MAX_LIMBS];
    int    ref_n, cyc, acc;
    logic [2*LIMB_W-1:0] t;
    // reference n!
    ref_l[0] = limb_t'(1); ref_n = 1;
    for (int k = 2; k <= n; k++) begin
      limb_t c = '0;
      for (int i = 0; i < ref_n; i++) begin
        t = ref_l[i] * (2*LIMB_W)'(k) + (2*LIMB_W)'(c);
        ref_l[i] = t[LIMB_W-1:0]; c = t[2*LIMB_W-1:LIMB_W];
      end
      if (c != '0) begin ref_l[ref_n] = c; ref_n++; end
    end
    // program: loaab reg0, reg2; loaa reg3; (add; mult) x (n-1); unl
    prog_q.push_back({OP_LOAAB, 4'd0}); prog_q.push_back({4'd2, 4'd0});
    prog_q.push_back({OP_LOAA, 4'd3});
    for (int k = 2; k <= n; k++) begin
      bit odd = (k % 2) == 0;
      // odd step: add reg2,reg3,reg4; mult reg4,reg0,reg1
      // even step: add reg4,reg3,reg2; mult reg2,reg1,reg0
      prog_q.push_back({OP_ADD, odd ? 4'd2 : 4'd4}); prog_q.push_back({4'd3, odd ? 4'd4 : 4'd2});
      prog_q.push_back({OP_MULT, odd ? 4'd4 : 4'd2}); prog_q.push_back(odd ? 8'h01 : 8'h10);
    end
    acc = (n % 2 == 0) ? 1 : 0;
    prog_q.push_back({OP_UNL, 4'(acc)});
    a_left = 2; b_left = 1;
    out_q.delete(); out_last.delete();
    cyc = 0;
    while (out_q.size() == 0 || !out_last[out_last.size()-1]) begin
      @(posedge clk); cyc++;
    end
    check(out_q.size() == ref_n, $sformatf("%0d!: %0d limbs, expected %0d", n, out_q.size(), ref_n));
    for (int i = 0; i < ref_n && i < out_q.size(); i++)
      check(out_q[i] == ref_l[i], $sformatf("%0d!: limb %0d", n, i));
    check(!overflow, "no overflow");
    check(cyc <= max_cycles, $sformatf("%0d!: %0d cycles, limit %0d", n, cyc, max_cycles));
    $display("%0d! = %0d limbs in %0d cycles (%0.1f us at 400 MHz)", n, ref_n, cyc, real'(cyc) / 400.0);
    cycles = cyc;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int c;
    repeat (4) @(negedge clk);
    rst = 0;
    run_factorial(4, 200, c);
    check(out_q[0] == limb_t'(24), "4! = 0x18");
    for (int n = 100; n <= 1000; n += 100) begin
      run_factorial(n, 130560, c);
      check(c > prev_cyc, $sformatf("%0d!: cycle count grows with n", n));
      prev_cyc = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
