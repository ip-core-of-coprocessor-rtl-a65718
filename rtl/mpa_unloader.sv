// mpa_unloader: data unloader, sends one register to the host on the 64-bit
// AXI Stream output bus (BusO).
//
// A 'start' pulse (CtrlUL) begins the transfer of the register chosen by the
// unloader's 16-to-1 multiplexer. The unloader addresses the register's
// limbs from 0 upward, least significant first, and presents each on tdata
// with tvalid until the host takes it; tlast marks the final limb and tuser
// carries the sign on every beat. A zero (size 0) is sent as a single zero
// beat. The read port is synchronous, so each limb costs two cycles when the
// host is always ready: one to read, one to hand over (the next read address
// is set while the current beat waits). 'done' pulses after the last
// handshake. The AXI Stream bus follows the source design; the framing is
// this design's own and matches mpa_loader.
module mpa_unloader
  import mpa_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  output logic   done,
  // register read port
  output laddr_t raddr,
  input  limb_t  rdata,
  input  logic   rsign,
  input  lsize_t rsize,
  // AXI Stream master
  output limb_t  m_tdata,
  output logic   m_tvalid,
  input  logic   m_tready,
  output logic   m_tlast,
  output logic   m_tuser
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LOAD, S_SEND} state_e;
  state_e state;
  lsize_t idx;      // index of the limb being sent
  lsize_t n;        // limbs to send (at least 1)
  logic   zero;     // the register holds zero

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      idx      <= '0;
      n        <= '0;
      zero     <= 1'b0;
      raddr    <= '0;
      m_tdata  <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      m_tuser  <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            idx   <= '0;
            raddr <= '0;
            zero  <= (rsize == '0);
            n     <= (rsize == '0) ? lsize_t'(1) : rsize;
            state <= S_READ;
          end
        end
        S_READ: state <= S_LOAD;   // address 'raddr' is being read
        S_LOAD: begin
          m_tdata  <= zero ? '0 : rdata;
          m_tvalid <= 1'b1;
          m_tlast  <= (idx + 1'b1 == n);
          m_tuser  <= rsign;
          raddr    <= laddr_t'(idx + 1'b1);   // prefetch the next limb
          state    <= S_SEND;
        end
        S_SEND: begin
          if (m_tready) begin
            m_tvalid <= 1'b0;
            m_tlast  <= 1'b0;
            if (idx + 1'b1 == n) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_LOAD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI Stream rule: a beat that is offered stays unchanged until taken.
  a_axis_hold: assert property (@(posedge clk) disable iff (rst)
    (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast)));

endmodule
