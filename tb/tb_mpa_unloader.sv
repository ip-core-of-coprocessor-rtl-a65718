// tb_mpa_unloader: self-checking test of the data unloader.
// A register is modelled as a synchronous-read limb array with a sign and a
// size. The test unloads numbers of 0..12 limbs while the receiving side
// drops tready at random, and checks every beat's data, tlast and tuser,
// the beat count (one zero beat for size 0) and that a held beat does not
// change. With tready always high, k limbs take 2k + 2 cycles from start
// to done.
module tb_mpa_unloader;
  import mpa_pkg::*;

  logic   clk = 0, rst = 1, start = 0;
  logic   done;
  laddr_t raddr;
  limb_t  rdata;
  logic   rsign;
  lsize_t rsize;
  limb_t  m_tdata;
  logic   m_tvalid, m_tready = 0, m_tlast, m_tuser;

  limb_t mem [2**AW];
  int    checks = 0, failures = 0;

  mpa_unloader dut (
    .clk(clk), .rst(rst), .start(start), .done(done),
    .raddr(raddr), .rdata(rdata), .rsign(rsign), .rsize(rsize),
    .m_tdata(m_tdata), .m_tvalid(m_tvalid), .m_tready(m_tready),
    .m_tlast(m_tlast), .m_tuser(m_tuser));

  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= mem[raddr];

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

  task automatic run(int k, bit sg, bit stall);
    int    beats, cyc;
    bit    fin;
    limb_t held;
    bit    was_held;
    for (int i = 0; i < 2**AW; i++) mem[i] = {$urandom, $urandom};
    rsize = lsize_t'(k); rsign = sg && k > 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    beats = 0; cyc = 1; fin = 0; was_held = 0; held = '0;
    while (!fin) begin
      m_tready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (m_tvalid) begin
        if (was_held) check(m_tdata == held, "held beat unchanged");
        if (m_tready) begin
          check(m_tdata == ((k == 0) ? '0 : mem[beats]), $sformatf("beat %0d data (k=%0d)", beats, k));
          check(m_tlast == (beats == ((k == 0) ? 0 : k - 1)), $sformatf("beat %0d tlast", beats));
          check(m_tuser == (sg && k > 0), "tuser sign");
          beats++;
          was_held = 0;
        end else begin
          was_held = 1; held = m_tdata;
        end
      end
      @(negedge clk);
      cyc++;
      if (done) fin = 1;
    end
    m_tready = 0;
    check(beats == ((k == 0) ? 1 : k), $sformatf("beats %0d (k=%0d)", beats, k));
    if (!stall) check(cyc == 2*((k == 0) ? 1 : k) + 2, $sformatf("cycles %0d (k=%0d)", cyc, k));
  endtask

  initial begin
    rsize = '0; rsign = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 0, 0);
    run(0, 1, 0);
    run(5, 1, 0);
    run(7, 0, 1);
    for (int t = 0; t < 60; t++) run($urandom_range(0, 12), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
