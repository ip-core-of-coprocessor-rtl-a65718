// mpa_mult: basecase (schoolbook) multiplier for sign-magnitude numbers of
// 64-bit limbs, O(na*nb) in time.
//
// The source design states that multiplication uses the basecase method and
// that the result sign is the product of the operand signs; how the products
// are scheduled is this design's own. It uses column-wise (product-scanning)
// order: for result limb k = 0, 1, ... it multiplies every pair X[i]*Y[k-i]
// and adds the 128-bit products into a 192-bit accumulator; when column k is
// complete its low limb is written as result limb k and the accumulator is
// shifted right by 64 bits. The multiplier therefore reads only its two
// operand ports (the MULT inputs of the architecture) and writes each result
// limb exactly once, in order, on the ResM stream.
//
// Timing: one 64x64 product per cycle. After 'start', the operation takes
// na*nb cycles of products plus 4 cycles (drain, top limb, sign/size, done);
// 'done' pulses together with the sign/size write. A zero operand gives a
// zero result in 2 cycles. Operand reads are synchronous (data one cycle
// after the address). Result limbs at or above LIMBS are dropped and raise
// 'ovf'. The destination register must differ from both operands, because a
// result limb is written while lower operand limbs are still to be read.
module mpa_mult
  import mpa_pkg::*;
#(
  parameter int unsigned LIMBS = MAX_LIMBS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  output logic   done,
  output logic   ovf,
  // operand X (Ctrl16 port) and Y (Ctrl17 port)
  output laddr_t a_raddr,
  input  limb_t  a_data,
  input  logic   a_sign,
  input  lsize_t a_size,
  output laddr_t b_raddr,
  input  limb_t  b_data,
  input  logic   b_sign,
  input  lsize_t b_size,
  // result stream (ResM)
  output wr_t    wr
);

  localparam int unsigned KW   = SW + 1;           // column index width
  localparam int unsigned ACCW = 3 * LIMB_W;       // accumulator width

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_TOP, S_META} state_e;
  state_e state;

  lsize_t          na, nb;
  logic            sign_q;
  logic [KW-1:0]   gk;          // column being issued
  laddr_t          gi;          // operand X limb being issued
  logic            s1_valid, s1_last;
  logic [KW-1:0]   s1_col;
  logic [ACCW-1:0] acc;
  lsize_t          top_nz;      // highest non-zero result limb + 1

  // first and last X index of a column
  function automatic laddr_t col_lo(logic [KW-1:0] k, lsize_t n_b);
    return (k >= KW'(n_b)) ? laddr_t'(k - KW'(n_b) + 1'b1) : '0;
  endfunction
  function automatic laddr_t col_hi(logic [KW-1:0] k, lsize_t n_a);
    return (k < KW'(n_a)) ? laddr_t'(k) : laddr_t'(n_a - 1'b1);
  endfunction

  logic            issue, issue_last;
  logic [KW-1:0]   k_end;       // last column that has products to issue
  logic [ACCW-1:0] sum;

  assign issue      = (state == S_RUN);
  assign issue_last = (gi == col_hi(gk, na));
  assign k_end      = KW'(na) + KW'(nb) - KW'(2);
  assign a_raddr    = gi;
  assign b_raddr    = laddr_t'(gk - KW'(gi));
  assign sum        = acc + ACCW'(a_data * ACCW'(b_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      na       <= '0;
      nb       <= '0;
      sign_q   <= 1'b0;
      gk       <= '0;
      gi       <= '0;
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_col   <= '0;
      acc      <= '0;
      top_nz   <= '0;
      wr       <= WR_IDLE;
      done     <= 1'b0;
      ovf      <= 1'b0;
    end else begin
      wr       <= WR_IDLE;
      done     <= 1'b0;
      ovf      <= 1'b0;
      s1_valid <= issue;
      s1_last  <= issue_last;
      s1_col   <= gk;

      // product stage: data of the pair issued in the previous cycle
      if (s1_valid) begin
        if (s1_last) begin
          acc <= sum >> LIMB_W;
          if (s1_col < KW'(LIMBS)) begin
            wr.we   <= 1'b1;
            wr.addr <= laddr_t'(s1_col);
            wr.data <= sum[LIMB_W-1:0];
            if (sum[LIMB_W-1:0] != '0) top_nz <= lsize_t'(s1_col + 1'b1);
          end else begin
            ovf <= 1'b1;
          end
        end else begin
          acc <= sum;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            na     <= a_size;
            nb     <= b_size;
            sign_q <= a_sign ^ b_sign;
            gk     <= '0;
            gi     <= '0;
            acc    <= '0;
            top_nz <= '0;
            state  <= (a_size == '0 || b_size == '0) ? S_META : S_RUN;
          end
        end
        S_RUN: begin
          if (issue_last) begin
            if (gk == k_end) begin
              state <= S_DRAIN;
            end else begin
              gk <= gk + 1'b1;
              gi <= col_lo(gk + 1'b1, nb);
            end
          end else begin
            gi <= gi + 1'b1;
          end
        end
        S_DRAIN: state <= S_TOP;    // last product is accumulated now
        S_TOP: begin                // most significant limb: the carry left over
          if (k_end + 1'b1 < KW'(LIMBS)) begin
            wr.we   <= 1'b1;
            wr.addr <= laddr_t'(k_end + 1'b1);
            wr.data <= acc[LIMB_W-1:0];
            if (acc[LIMB_W-1:0] != '0) top_nz <= lsize_t'(k_end + KW'(2));
          end else if (acc[LIMB_W-1:0] != '0) begin
            ovf <= 1'b1;
          end
          state <= S_META;
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
