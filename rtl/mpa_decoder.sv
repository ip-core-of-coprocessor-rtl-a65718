// mpa_decoder: instruction decoder and sequencer of the coprocessor.
//
// It fetches instruction bytes from the 8-bit AXI Stream program bus, decodes
// the seven instructions (loaa, loab, loaab, unl, mult, add, sub) and drives
// the control lines of the datapath: Ctrl0..Ctrl15 (the input multiplexer of
// each register), the register selects of the operand multiplexers
// (Ctrl16..Ctrl20 and CtrlUL) and the start pulses of the loaders (CtrlL),
// the unloader, the multiplier and the adder/subtractor. The control lines
// are held until every unit the instruction started has reported 'done';
// only then is the next byte taken, so instructions run one at a time and
// the program bus is stalled (tready low) while one executes.
//
// Encoding (this design's own; the source gives only the mnemonics):
// byte 0 = {opcode, regX}; mult/add/sub/loaab add byte 1 = {regY, regZ}.
// A byte whose upper nibble is not an opcode is skipped. tlast on the program
// bus is not needed and is ignored. For loaab with regX == regY, bus B wins.
// rsel[RP_RM] (Ctrl20) stays 0: no instruction uses the RegM path, and the
// top replaces it with its own input.
// Timing: one cycle per instruction byte, one cycle to issue, then the units'
// own time, then one cycle to release the control lines.
module mpa_decoder
  import mpa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // program bus (AXI Stream slave, 8 bit)
  input  logic [7:0] s_tdata,
  input  logic       s_tvalid,
  output logic       s_tready,
  // control lines
  output wctl_t      wctl [NREGS],   // Ctrl0..Ctrl15
  output ridx_t      rsel [NRP],     // Ctrl16..Ctrl20, CtrlUL (see rport_e)
  output logic       ld_a_start,     // CtrlL, bus A
  output logic       ld_b_start,     // CtrlL, bus B
  output logic       ul_start,       // CtrlUL
  output logic       m_start,
  output logic       as_start,
  output logic       as_sub,
  // completion of the units
  input  logic       ld_a_done,
  input  logic       ld_b_done,
  input  logic       ul_done,
  input  logic       m_done,
  input  logic       as_done,
  output logic       busy
);

  typedef enum logic [1:0] {S_FETCH0, S_FETCH1, S_ISSUE, S_WAIT} state_e;
  state_e     state;
  opcode_e    op;
  ridx_t      rx, ry, rz;
  logic [4:0] pend;   // {ld_a, ld_b, ul, m, as} still running

  assign s_tready = (state == S_FETCH0) || (state == S_FETCH1);
  assign busy     = (state != S_FETCH0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_FETCH0;
      op         <= OP_LOAA;
      rx         <= '0;
      ry         <= '0;
      rz         <= '0;
      pend       <= '0;
      ld_a_start <= 1'b0;
      ld_b_start <= 1'b0;
      ul_start   <= 1'b0;
      m_start    <= 1'b0;
      as_start   <= 1'b0;
      as_sub     <= 1'b0;
      for (int r = 0; r < NREGS; r++) wctl[r] <= '{en: 1'b0, src: SRC_DBUSA};
      for (int p = 0; p < NRP; p++)   rsel[p] <= '0;
    end else begin
      ld_a_start <= 1'b0;
      ld_b_start <= 1'b0;
      ul_start   <= 1'b0;
      m_start    <= 1'b0;
      as_start   <= 1'b0;
      unique case (state)
        S_FETCH0: begin
          if (s_tvalid) begin
            op <= opcode_e'(s_tdata[7:4]);
            rx <= s_tdata[3:0];
            unique case (op_len(s_tdata[7:4]))
              1:       state <= S_ISSUE;
              2:       state <= S_FETCH1;
              default: state <= S_FETCH0;
            endcase
          end
        end
        S_FETCH1: begin
          if (s_tvalid) begin
            ry    <= s_tdata[7:4];
            rz    <= s_tdata[3:0];
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          state <= S_WAIT;
          unique case (op)
            OP_LOAA: begin
              wctl[rx]   <= '{en: 1'b1, src: SRC_DBUSA};
              ld_a_start <= 1'b1;
              pend       <= 5'b10000;
            end
            OP_LOAB: begin
              wctl[rx]   <= '{en: 1'b1, src: SRC_DBUSB};
              ld_b_start <= 1'b1;
              pend       <= 5'b01000;
            end
            OP_LOAAB: begin
              wctl[rx]   <= '{en: 1'b1, src: SRC_DBUSA};
              wctl[ry]   <= '{en: 1'b1, src: SRC_DBUSB};
              ld_a_start <= 1'b1;
              ld_b_start <= 1'b1;
              pend       <= 5'b11000;
            end
            OP_UNL: begin
              rsel[RP_UL] <= rx;
              ul_start    <= 1'b1;
              pend        <= 5'b00100;
            end
            OP_MULT: begin
              rsel[RP_MA] <= rx;
              rsel[RP_MB] <= ry;
              wctl[rz]    <= '{en: 1'b1, src: SRC_RESM};
              m_start     <= 1'b1;
              pend        <= 5'b00010;
            end
            OP_ADD, OP_SUB: begin
              rsel[RP_ASA] <= rx;
              rsel[RP_ASB] <= ry;
              wctl[rz]     <= '{en: 1'b1, src: SRC_RESAS};
              as_start     <= 1'b1;
              as_sub       <= (op == OP_SUB);
              pend         <= 5'b00001;
            end
            default: state <= S_FETCH0;
          endcase
        end
        S_WAIT: begin
          logic [4:0] left;
          left = pend & ~{ld_a_done, ld_b_done, ul_done, m_done, as_done};
          pend <= left;
          if (left == '0) begin
            for (int r = 0; r < NREGS; r++) wctl[r].en <= 1'b0;
            state <= S_FETCH0;
          end
        end
        default: state <= S_FETCH0;
      endcase
    end
  end

endmodule
