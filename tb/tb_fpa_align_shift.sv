// tb_fpa_align_shift: checks the aligning shifter against a 180-bit shift
// worked out here: the top 55 places must match and the sticky place must be
// the OR of everything below them, for every shift distance 0..2047.
module tb_fpa_align_shift;
  logic [52:0] sig;
  logic [10:0] d;
  logic [55:0] aligned;
  int checks = 0, failures = 0;

  fpa_align_shift dut (.*);

  initial begin
    logic [179:0] wide;
    logic [55:0]  ev;
    for (int n = 0; n < 20000; n++) begin
      sig = {($urandom_range(0, 7) != 0), 52'({$urandom(), $urandom()})};
      if (n % 9 == 0) sig = 53'(1) << $urandom_range(0, 52);
      d   = (n % 3 == 0) ? 11'($urandom_range(0, 2047)) : 11'($urandom_range(0, 70));
      #1;
      wide = {sig, 127'd0} >> d;
      ev   = (d >= 127) ? {55'd0, |sig} : {wide[179:125], |wide[124:0]};
      checks++;
      if (aligned !== ev) begin
        failures++;
        $display("FAIL sig=%h d=%0d: got %h expected %h", sig, d, aligned, ev);
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
