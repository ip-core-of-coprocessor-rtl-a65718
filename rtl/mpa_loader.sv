// mpa_loader: data loader, receives one number from a 64-bit AXI Stream bus
// and writes it into the register bank (the DBusA / DBusB write stream).
//
// A 'start' pulse from the decoder (CtrlL) opens the bus: tready is high
// until the beat with tlast has been taken. Beat k is limb k, least
// significant limb first; tuser carries the sign and is sampled on the tlast
// beat. Every beat becomes one limb write one cycle later; after the last
// beat one more cycle writes sign and size and pulses 'done'. The size is the
// index of the highest non-zero limb plus one, so leading zero limbs are
// dropped and zero is stored as size 0 with a positive sign. Beats beyond
// LIMBS are taken but not stored, and raise 'ovf'. The AXI Stream bus and the
// 64-bit limbs follow the source design; the framing (tlast ends a number,
// tuser is the sign) is this design's own.
module mpa_loader
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  done,
  output logic  ovf,
  // AXI Stream slave
  input  limb_t s_tdata,
  input  logic  s_tvalid,
  output logic  s_tready,
  input  logic  s_tlast,
  input  logic  s_tuser,
  // write stream into the register bank
  output wr_t   wr
);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_META} state_e;
  state_e state;
  logic [SW:0] cnt;      // beats received (one bit wider than a size)
  lsize_t      top_nz;   // highest non-zero limb index + 1
  logic        sign_q;

  assign s_tready = (state == S_RECV);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      cnt    <= '0;
      top_nz <= '0;
      sign_q <= 1'b0;
      wr     <= WR_IDLE;
      done   <= 1'b0;
      ovf    <= 1'b0;
    end else begin
      wr   <= WR_IDLE;
      done <= 1'b0;
      ovf  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_RECV;
            cnt    <= '0;
            top_nz <= '0;
          end
        end
        S_RECV: begin
          if (s_tvalid) begin
            if (cnt < (SW+1)'(LIMBS)) begin
              wr.we   <= 1'b1;
              wr.addr <= laddr_t'(cnt);
              wr.data <= s_tdata;
              if (s_tdata != '0) top_nz <= lsize_t'(cnt + 1'b1);
            end else begin
              ovf <= 1'b1;
            end
            if (cnt <= (SW+1)'(LIMBS)) cnt <= cnt + 1'b1;
            if (s_tlast) begin
              sign_q <= s_tuser;
              state  <= S_META;
            end
          end
        end
        S_META: begin
          wr.meta_we <= 1'b1;
          wr.size    <= top_nz;
          wr.sign    <= sign_q && (top_nz != '0);
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
