// tb_mpa_decoder: self-checking test of the instruction decoder.
// Random instructions (all seven kinds, random registers) are encoded into
// bytes and offered on the program bus with random gaps; a few bytes that
// are not opcodes are mixed in and must be skipped. The testbench plays the
// units: it answers each start pulse with 'done' after a random delay. For
// each instruction it checks which units were started, the control word of
// every register (only the destination enabled, with the right source), the
// operand selects, the sub flag, and that the program bus stays stalled
// while the instruction runs.
module tb_mpa_decoder;
  import mpa_pkg::*;

  logic       clk = 0, rst = 1;
  logic [7:0] s_tdata = '0;
  logic       s_tvalid = 0, s_tready;
  wctl_t      wctl [NREGS];
  ridx_t      rsel [NRP];
  logic       ld_a_start, ld_b_start, ul_start, m_start, as_start, as_sub;
  logic       ld_a_done = 0, ld_b_done = 0, ul_done = 0, m_done = 0, as_done = 0;
  logic       busy;
  int         checks = 0, failures = 0, n_stall = 0;

  mpa_decoder dut (
    .clk(clk), .rst(rst), .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tready(s_tready),
    .wctl(wctl), .rsel(rsel), .ld_a_start(ld_a_start), .ld_b_start(ld_b_start),
    .ul_start(ul_start), .m_start(m_start), .as_start(as_start), .as_sub(as_sub),
    .ld_a_done(ld_a_done), .ld_b_done(ld_b_done), .ul_done(ul_done),
    .m_done(m_done), .as_done(as_done), .busy(busy));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_tvalid = 1; s_tdata = b;
    @(posedge clk);
    while (!s_tready) @(posedge clk);
    @(negedge clk);
    s_tvalid = 0; s_tdata = 8'($urandom);
  endtask

  task automatic run(opcode_e op, ridx_t x, ridx_t y, ridx_t z);
    logic [4:0] started, exp_start;
    int         d;
    send({op, x});
    if (op_len(op) == 2) send({y, z});
    // wait for the start pulses
    started = '0;
    while (started == '0) begin
      @(posedge clk); #1;
      started = {ld_a_start, ld_b_start, ul_start, m_start, as_start};
    end
    case (op)
      OP_LOAA:  exp_start = 5'b10000;
      OP_LOAB:  exp_start = 5'b01000;
      OP_LOAAB: exp_start = 5'b11000;
      OP_UNL:   exp_start = 5'b00100;
      OP_MULT:  exp_start = 5'b00010;
      default:  exp_start = 5'b00001;
    endcase
    check(started == exp_start, $sformatf("op %s: started %b", op.name(), started));
    for (int r = 0; r < NREGS; r++) begin
      wctl_t e;
      e = '{en: 1'b0, src: SRC_DBUSA};
      case (op)
        OP_LOAA:  if (r == x) e = '{en: 1'b1, src: SRC_DBUSA};
        OP_LOAB:  if (r == x) e = '{en: 1'b1, src: SRC_DBUSB};
        OP_LOAAB: if (r == y) e = '{en: 1'b1, src: SRC_DBUSB};
                  else if (r == x) e = '{en: 1'b1, src: SRC_DBUSA};
        OP_MULT:  if (r == z) e = '{en: 1'b1, src: SRC_RESM};
        OP_ADD, OP_SUB: if (r == z) e = '{en: 1'b1, src: SRC_RESAS};
        default: ;
      endcase
      check(wctl[r].en == e.en && (!e.en || wctl[r].src == e.src),
            $sformatf("op %s: Ctrl%0d", op.name(), r));
    end
    case (op)
      OP_UNL:  check(rsel[RP_UL] == x, "CtrlUL select");
      OP_MULT: check(rsel[RP_MA] == x && rsel[RP_MB] == y, "Ctrl16/17 selects");
      OP_ADD, OP_SUB: check(rsel[RP_ASA] == x && rsel[RP_ASB] == y && as_sub == (op == OP_SUB),
                            "Ctrl18/19 selects and sub");
      default: ;
    endcase
    // units work; the program bus must stay stalled
    d = $urandom_range(1, 6);
    for (int i = 0; i < d; i++) begin
      @(negedge clk);
      s_tvalid = 1;
      check(!s_tready && busy, "program bus stalled while executing");
      n_stall++;
    end
    s_tvalid = 0;
    {ld_a_done, ld_b_done, ul_done, m_done, as_done} = exp_start;
    @(negedge clk);
    {ld_a_done, ld_b_done, ul_done, m_done, as_done} = '0;
    @(negedge clk);
    for (int r = 0; r < NREGS; r++) check(!wctl[r].en, "control words released");
    check(s_tready && !busy, "ready for the next instruction");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(s_tready && !busy, "idle after reset");
    // factorial program of four, as a start
    run(OP_LOAAB, 0, 2, 0);
    run(OP_LOAA, 3, 0, 0);
    run(OP_ADD, 2, 3, 4);
    run(OP_MULT, 4, 0, 1);
    run(OP_SUB, 4, 3, 2);
    run(OP_UNL, 1, 0, 0);
    for (int t = 0; t < 300; t++) begin
      opcode_e op;
      if ($urandom_range(0, 9) == 0) send(8'($urandom_range(8, 15)) << 4);   // not an opcode
      op = opcode_e'($urandom_range(1, 7));
      run(op, ridx_t'($urandom), ridx_t'($urandom), ridx_t'($urandom));
    end
    check(n_stall > 0, "stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
