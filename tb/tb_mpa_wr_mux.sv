// tb_mpa_wr_mux: self-checking test of the register input multiplexer.
// Drives random write streams on all five inputs and random control words
// and checks that the output equals the selected stream when enabled and an
// idle stream otherwise.
module tb_mpa_wr_mux;
  import mpa_pkg::*;

  wctl_t ctrl;
  wr_t   src [NSRC];
  wr_t   wr;
  int    checks = 0, failures = 0;

  mpa_wr_mux dut (.ctrl(ctrl), .src(src), .wr(wr));

  function automatic wr_t rand_wr();
    wr_t w;
    w = wr_t'({$urandom, $urandom, $urandom});
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      wr_t exp;
      for (int s = 0; s < NSRC; s++) src[s] = rand_wr();
      ctrl.en  = ($urandom_range(0, 3) != 0);
      ctrl.src = wsrc_e'($urandom_range(0, NSRC-1));
      #1;
      exp = ctrl.en ? src[int'(ctrl.src)] : WR_IDLE;
      checks++;
      if (wr !== exp) begin
        failures++;
        $display("mismatch: en=%0d src=%0d", ctrl.en, ctrl.src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
