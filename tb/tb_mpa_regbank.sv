// tb_mpa_regbank: self-checking test of the register bank.
// Every cycle it drives random control words (Ctrl0..Ctrl15), random write
// streams on all five sources and random register selects and addresses on
// all six read ports. A reference model of the 16 registers, kept by the
// testbench, gives the limb each read port must return one cycle after its
// address, and the sign and size each port must show. Only limbs the test
// has written are compared. Also checks that reset gives every register
// the value zero.
module tb_mpa_regbank;
  import mpa_pkg::*;

  localparam int NA = 16;   // limb addresses exercised

  logic   clk = 0, rst = 1;
  wctl_t  wctl  [NREGS];
  wr_t    src   [NSRC];
  ridx_t  rsel  [NRP];
  laddr_t raddr [NRP];
  limb_t  rdata [NRP];
  logic   rsign [NRP];
  lsize_t rsize [NRP];

  limb_t  ref_mem   [NREGS][NA];
  bit     ref_valid [NREGS][NA];
  logic   ref_sign  [NREGS];
  lsize_t ref_size  [NREGS];
  int     checks = 0, failures = 0, n_regm = 0;

  mpa_regbank dut (.clk(clk), .rst(rst), .wctl(wctl), .src(src), .rsel(rsel),
                   .raddr(raddr), .rdata(rdata), .rsign(rsign), .rsize(rsize));

  always #5 clk = ~clk;

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

  initial begin
    limb_t exp_rd [NRP];
    bit    exp_ok [NRP];
    for (int r = 0; r < NREGS; r++) begin
      wctl[r] = '{en: 1'b0, src: SRC_DBUSA};
      ref_sign[r] = 0; ref_size[r] = '0;
      for (int a = 0; a < NA; a++) ref_valid[r][a] = 0;
    end
    for (int s = 0; s < NSRC; s++) src[s] = WR_IDLE;
    for (int p = 0; p < NRP; p++) begin rsel[p] = '0; raddr[p] = '0; exp_ok[p] = 0; exp_rd[p] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NRP; p++)
      for (int r = 0; r < NREGS; r++) begin
        rsel[p] = ridx_t'(r);
        #1 check(rsize[p] == '0 && rsign[p] == 1'b0, "register is zero after reset");
      end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // results of the reads issued before the last edge
      for (int p = 0; p < NRP; p++)
        if (exp_ok[p]) check(rdata[p] == exp_rd[p], $sformatf("port %0d limb", p));
      // new stimulus
      for (int r = 0; r < NREGS; r++) begin
        wctl[r].en  = ($urandom_range(0, 3) == 0);
        wctl[r].src = wsrc_e'($urandom_range(0, NSRC-1));
      end
      for (int s = 0; s < NSRC; s++) begin
        src[s].we      = 1'($urandom);
        src[s].addr    = laddr_t'($urandom_range(0, NA-1));
        src[s].data    = {$urandom, $urandom};
        src[s].meta_we = ($urandom_range(0, 3) == 0);
        src[s].sign    = 1'($urandom);
        src[s].size    = lsize_t'($urandom_range(0, MAX_LIMBS));
      end
      for (int p = 0; p < NRP; p++) begin
        rsel[p]  = ridx_t'($urandom_range(0, NREGS-1));
        raddr[p] = laddr_t'($urandom_range(0, NA-1));
        exp_ok[p] = ref_valid[rsel[p]][raddr[p]];
        exp_rd[p] = ref_mem[rsel[p]][raddr[p]];
      end
      #1;
      for (int p = 0; p < NRP; p++)
        check(rsign[p] == ref_sign[rsel[p]] && rsize[p] == ref_size[rsel[p]], $sformatf("port %0d sign/size", p));
      // reference update at the coming edge
      for (int r = 0; r < NREGS; r++)
        if (wctl[r].en) begin
          wr_t w;
          w = src[int'(wctl[r].src)];
          if (wctl[r].src == SRC_REGM && (w.we || w.meta_we)) n_regm++;
          if (w.we) begin ref_mem[r][w.addr] = w.data; ref_valid[r][w.addr] = 1; end
          if (w.meta_we) begin ref_sign[r] = w.sign; ref_size[r] = w.size; end
        end
    end
    check(n_regm > 0, "RegM source used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
