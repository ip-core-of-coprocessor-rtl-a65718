// tb_mpa_loader: self-checking test of the data loader.
// Sends numbers of 1..6 beats with random gaps in tvalid, some with leading
// zero limbs, some all zero, with random sign; checks every limb written,
// the stored size (leading zeros dropped), the sign (forced positive for
// zero), that tready is low outside a load, and, with the unit built for
// LIMBS = 4, that longer numbers are truncated and raise 'ovf'. With no
// gaps a number of k beats takes k + 2 cycles from start to done.
module tb_mpa_loader;
  import mpa_pkg::*;

  localparam int L = 4;

  logic  clk = 0, rst = 1, start = 0;
  logic  done, ovf;
  limb_t s_tdata;
  logic  s_tvalid = 0, s_tready, s_tlast = 0, s_tuser = 0;
  wr_t   wr;

  limb_t  rmem [2**AW];
  lsize_t r_size;
  logic   r_sign, r_meta, r_ovf;
  int     checks = 0, failures = 0;

  mpa_loader #(.LIMBS(L)) dut (
    .clk(clk), .rst(rst), .start(start), .done(done), .ovf(ovf),
    .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tready(s_tready),
    .s_tlast(s_tlast), .s_tuser(s_tuser), .wr(wr));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (wr.we) rmem[wr.addr] <= wr.data;
    if (wr.meta_we) begin r_size <= wr.size; r_sign <= wr.sign; r_meta <= 1'b1; end
    if (ovf) r_ovf <= 1'b1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode: 0 random limbs, 1 top limbs zero, 2 all zero
  task automatic run(int k, bit sg, int mode, bit gaps);
    limb_t v [8];
    int    exp_size, cyc;
    for (int i = 0; i < k; i++) v[i] = {$urandom, $urandom} | limb_t'(1);
    if (mode == 1) for (int i = k/2; i < k; i++) v[i] = '0;
    if (mode == 2) for (int i = 0; i < k; i++) v[i] = '0;
    exp_size = 0;
    for (int i = 0; i < k && i < L; i++) if (v[i] != '0) exp_size = i + 1;
    for (int i = 0; i < 2**AW; i++) rmem[i] = '0;
    r_meta = 0; r_ovf = 0;
    @(negedge clk);
    check(!s_tready, "tready low while idle");
    start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    fork
      begin
        for (int i = 0; i < k; i++) begin
          if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
          s_tvalid = 1; s_tdata = v[i]; s_tlast = (i == k-1); s_tuser = sg;
          @(posedge clk);
          while (!s_tready) @(posedge clk);
          @(negedge clk);
          s_tvalid = 0; s_tlast = 0; s_tdata = {$urandom, $urandom}; s_tuser = 1'($urandom);
        end
      end
      begin
        while (!done) begin @(negedge clk); cyc++; end
      end
    join
    @(negedge clk);
    check(r_meta, "sign/size written");
    check(int'(r_size) == exp_size, $sformatf("size %0d exp %0d (k=%0d mode=%0d)", r_size, exp_size, k, mode));
    check(r_sign == (sg && exp_size > 0), "sign");
    for (int i = 0; i < k && i < L; i++) check(rmem[i] == v[i], $sformatf("limb %0d", i));
    check(r_ovf == (k > L), $sformatf("ovf %0d (k=%0d)", r_ovf, k));
    if (!gaps) check(cyc == k + 2, $sformatf("cycles %0d exp %0d", cyc, k + 2));
  endtask

  initial begin
    s_tdata = '0;
    r_meta = 0; r_ovf = 0; r_size = '0; r_sign = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 0, 0, 0);
    run(3, 1, 0, 0);
    run(4, 1, 1, 0);
    run(2, 1, 2, 0);
    run(6, 0, 0, 0);
    for (int t = 0; t < 100; t++)
      run($urandom_range(1, 6), 1'($urandom), $urandom_range(0, 2), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
