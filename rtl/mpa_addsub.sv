// mpa_addsub: adder/subtractor for sign-magnitude numbers of 64-bit limbs,
// O(n) in time.
//
// 'sub' selects Z = X - Y, otherwise Z = X + Y. With the effective sign of Y
// (its sign, inverted for a subtraction) equal to the sign of X, the
// magnitudes are added and the result takes X's sign. Otherwise the smaller
// magnitude is subtracted from the larger and the result takes the sign of
// the larger. Which magnitude is larger is decided by the sizes, or, for
// equal sizes, by a scan of the limbs from the most significant down that
// stops at the first limb that differs; equal magnitudes give zero
// directly. The add/subtract pass then goes from limb 0 upward with a
// carry/borrow, one limb per cycle, writing each result limb on the ResAS
// stream; an addition's final carry becomes one more limb. The source
// design gives the sign-magnitude format and that the unit adds and
// subtracts; the compare-then-subtract scheme is this design's own.
//
// Timing after 'start': compare scan (only for opposite effective signs and
// equal sizes) of up to n+1 cycles, then max(na,nb) + 2 cycles, one cycle for
// a carry limb, one for the sign/size write with 'done'. Each limb is read
// before its result limb is written, so the destination may equal an
// operand. A carry limb that does not fit in LIMBS raises 'ovf'.
module mpa_addsub
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   sub,
  output logic   done,
  output logic   ovf,
  // operand X (Ctrl18 port) and Y (Ctrl19 port), read at the same address
  output laddr_t raddr,
  input  limb_t  a_data,
  input  logic   a_sign,
  input  lsize_t a_size,
  input  limb_t  b_data,
  input  logic   b_sign,
  input  lsize_t b_size,
  // result stream (ResAS)
  output wr_t    wr
);

  typedef enum logic [2:0] {S_IDLE, S_CMP, S_RUN, S_DRAIN, S_CARRY, S_META} state_e;
  state_e state;

  lsize_t na, nb, n;
  logic   eff_sub;     // magnitudes are subtracted
  logic   swap;        // |Y| > |X|: compute |Y| - |X|
  logic   res_sign;
  laddr_t ai;          // limb address being issued
  logic   issuing;     // an address is issued this cycle
  logic   s1_valid, s1_last;
  laddr_t s1_idx;
  logic   cy;          // carry (add) or borrow (subtract)
  lsize_t top_nz;

  limb_t           xa, yb, x, y;
  logic [LIMB_W:0] r;

  assign raddr = ai;
  assign xa    = (lsize_t'(s1_idx) < na) ? a_data : '0;
  assign yb    = (lsize_t'(s1_idx) < nb) ? b_data : '0;
  assign x     = swap ? yb : xa;
  assign y     = swap ? xa : yb;
  assign r     = eff_sub ? ({1'b0, x} - {1'b0, y} - (LIMB_W+1)'(cy))
                         : ({1'b0, x} + {1'b0, y} + (LIMB_W+1)'(cy));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      na       <= '0;
      nb       <= '0;
      n        <= '0;
      eff_sub  <= 1'b0;
      swap     <= 1'b0;
      res_sign <= 1'b0;
      ai       <= '0;
      issuing  <= 1'b0;
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_idx   <= '0;
      cy       <= 1'b0;
      top_nz   <= '0;
      wr       <= WR_IDLE;
      done     <= 1'b0;
      ovf      <= 1'b0;
    end else begin
      wr       <= WR_IDLE;
      done     <= 1'b0;
      ovf      <= 1'b0;
      s1_valid <= issuing;
      s1_idx   <= ai;
      s1_last  <= (state == S_CMP) ? (ai == '0) : (lsize_t'(ai) + 1'b1 == n);

      unique case (state)
        S_IDLE: begin
          if (start) begin
            logic bs;
            bs       = b_sign ^ sub;
            na       <= a_size;
            nb       <= b_size;
            n        <= (a_size > b_size) ? a_size : b_size;
            eff_sub  <= a_sign ^ bs;
            cy       <= 1'b0;
            top_nz   <= '0;
            if (a_sign == bs) begin                 // add magnitudes
              swap     <= 1'b0;
              res_sign <= a_sign;
              ai       <= '0;
              issuing  <= (a_size != '0) || (b_size != '0);
              state    <= ((a_size != '0) || (b_size != '0)) ? S_RUN : S_META;
            end else if (a_size != b_size) begin    // sizes decide
              swap     <= (b_size > a_size);
              res_sign <= (b_size > a_size) ? bs : a_sign;
              ai       <= '0;
              issuing  <= 1'b1;
              state    <= S_RUN;
            end else if (a_size == '0) begin        // 0 - 0
              state    <= S_META;
            end else begin                          // scan from the top limb
              ai       <= laddr_t'(a_size - 1'b1);
              issuing  <= 1'b1;
              state    <= S_CMP;
            end
          end
        end
        S_CMP: begin
          if (issuing) begin
            if (ai == '0) issuing <= 1'b0;
            else          ai <= ai - 1'b1;
          end
          if (s1_valid) begin
            if (a_data != b_data) begin
              swap     <= (b_data > a_data);
              res_sign <= (b_data > a_data) ? ~a_sign : a_sign;
              ai       <= '0;
              issuing  <= 1'b1;
              s1_valid <= 1'b0;
              state    <= S_RUN;
            end else if (s1_last) begin             // equal magnitudes
              issuing  <= 1'b0;
              s1_valid <= 1'b0;
              state    <= S_META;
            end
          end
        end
        S_RUN: begin
          if (issuing) begin
            if (lsize_t'(ai) + 1'b1 == n) issuing <= 1'b0;
            else                          ai <= ai + 1'b1;
          end
          if (s1_valid) begin
            wr.we   <= 1'b1;
            wr.addr <= s1_idx;
            wr.data <= r[LIMB_W-1:0];
            cy      <= r[LIMB_W];
            if (r[LIMB_W-1:0] != '0) top_nz <= lsize_t'(s1_idx) + 1'b1;
            if (s1_last) state <= (!eff_sub && r[LIMB_W]) ? S_CARRY : S_META;
          end
        end
        S_CARRY: begin
          if (n < lsize_t'(LIMBS)) begin
            wr.we   <= 1'b1;
            wr.addr <= laddr_t'(n);
            wr.data <= limb_t'(1);
            top_nz  <= n + 1'b1;
          end else begin
            ovf <= 1'b1;
          end
          state <= S_META;
        end
        S_META: begin
          wr.meta_we <= 1'b1;
          wr.size    <= top_nz;
          wr.sign    <= res_sign && (top_nz != '0);
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
