// tb_mpa_rd_mux: self-checking test of the 16-to-1 operand multiplexer.
// Gives every register a distinct random limb, sign and size and checks the
// output for every select value, several times over.
module tb_mpa_rd_mux;
  import mpa_pkg::*;

  ridx_t  sel;
  limb_t  reg_data [NREGS];
  logic   reg_sign [NREGS];
  lsize_t reg_size [NREGS];
  limb_t  data;
  logic   sign;
  lsize_t size;
  int     checks = 0, failures = 0;

  mpa_rd_mux dut (.sel(sel), .reg_data(reg_data), .reg_sign(reg_sign),
                  .reg_size(reg_size), .data(data), .sign(sign), .size(size));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < NREGS; r++) begin
        reg_data[r] = {$urandom, $urandom};
        reg_sign[r] = 1'($urandom);
        reg_size[r] = lsize_t'($urandom);
      end
      for (int s = 0; s < NREGS; s++) begin
        sel = ridx_t'(s);
        #1;
        checks++;
        if (data !== reg_data[s] || sign !== reg_sign[s] || size !== reg_size[s]) begin
          failures++;
          $display("mismatch at select %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
