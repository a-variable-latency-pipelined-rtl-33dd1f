// fpa_bus_ctrl: result bus control for the three-stage adder.
// Each stage may hold a finished result in a cycle (fin1..fin3). Only one
// may drive the shared result bus: the latest stage, holding the oldest
// operation, wins (stage 3, then 2, then 1). A finished result that loses is
// piped into the next stage and tries again there; stage 3 always wins, so
// no result waits beyond the third cycle and one operation can still enter
// every cycle. Combinational; an assertion checks that at most one stage
// drives the bus.
// Follows the adder's collision rule; a multiplexer select (drv*) stands in
// for the per-stage tri-state enables.
module fpa_bus_ctrl (
  input  logic fin1,
  input  logic fin2,
  input  logic fin3,
  output logic drv1,
  output logic drv2,
  output logic drv3,
  output logic pipe1,   // stage 1 result collided: carry it into stage 2
  output logic pipe2    // stage 2 result collided: carry it into stage 3
);

  always_comb begin
    drv3  = fin3;
    drv2  = fin2 & ~fin3;
    drv1  = fin1 & ~fin2 & ~fin3;
    pipe2 = fin2 & fin3;
    pipe1 = fin1 & (fin2 | fin3);
  end

  always_comb
    assert (!((drv1 && drv2) || (drv1 && drv3) || (drv2 && drv3)))
      else $error("fpa_bus_ctrl: more than one stage drives the result bus");

endmodule
