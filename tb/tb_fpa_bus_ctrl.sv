// tb_fpa_bus_ctrl: exhaustive check of the result bus rule: the latest
// stage with a finished result drives the bus, every other finished result
// is piped on, and nothing drives when nothing is finished.
module tb_fpa_bus_ctrl;
  logic fin1, fin2, fin3, drv1, drv2, drv3, pipe1, pipe2;
  int checks = 0, failures = 0;

  fpa_bus_ctrl dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      bit e1, e2, e3;
      {fin3, fin2, fin1} = 3'(v);
      #1;
      e3 = fin3;
      e2 = fin2 && !fin3;
      e1 = fin1 && !fin2 && !fin3;
      checks++;
      if ({drv3, drv2, drv1} != {e3, e2, e1} ||
          pipe2 != (fin2 && !e2) || pipe1 != (fin1 && !e1)) begin
        failures++;
        $display("FAIL fin=%b drv=%b pipe=%b%b", v[2:0], {drv3, drv2, drv1}, pipe2, pipe1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
