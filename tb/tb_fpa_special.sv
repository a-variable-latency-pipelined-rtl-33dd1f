// tb_fpa_special: pairs of Inf, NaN (quiet and signalling), zero and finite
// operands under addition and subtraction. The special flag must be set
// exactly when an operand is Inf or NaN, and the result must match the
// reference model's conventions.
module tb_fpa_special;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
  logic [63:0]  a_raw, b_raw, result;
  fp_unpacked_t a, b;
  logic         special;
  int checks = 0, failures = 0;

  fpa_special dut (.*);

  function automatic logic [63:0] pick(int k);
    case (k)
      0: return {$urandom_range(0, 1) != 0, 11'h7FF, 52'd0};                      // Inf
      1: return {$urandom_range(0, 1) != 0, 11'h7FF, 1'b1, 51'($urandom())};      // qNaN
      2: return {$urandom_range(0, 1) != 0, 11'h7FF, 1'b0, 51'($urandom()) | 51'd1}; // sNaN
      3: return {$urandom_range(0, 1) != 0, 63'd0};                              // zero
      default: return {$urandom_range(0, 1) != 0, 11'($urandom_range(1, 2046)), 52'({$urandom(), $urandom()})};
    endcase
  endfunction

  initial begin
    logic sub;
    bit   es;
    for (int n = 0; n < 5000; n++) begin
      a_raw = pick($urandom_range(0, 5));
      b_raw = pick($urandom_range(0, 5));
      sub = $urandom_range(0, 1);
      a = fp_unpack(a_raw);
      b = fp_unpack(b_raw);
      b.sign = b.sign ^ sub;
      #1;
      es = (a_raw[62:52] == 11'h7FF) || (b_raw[62:52] == 11'h7FF);
      checks++;
      if (special != es || (es && result !== ref_add(a_raw, b_raw, sub, 2'd0))) begin
        failures++;
        $display("FAIL %h %s %h: special=%0d result=%h expected %h", a_raw, sub ? "-" : "+", b_raw,
                 special, result, ref_add(a_raw, b_raw, sub, 2'd0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
