// sdram_pll: behavioural model of the PLL that clocks the SDRAM chip. Not
// synthesizable: a real design uses the FPGA's PLL block here.
//
// The SDRAM controller runs on the 50 MHz system clock, but board delays skew
// the clock seen by the SDRAM chip, so the chip gets a copy of the clock that
// leads the system clock by 3 ns. A clock that leads by 3 ns is the same
// waveform as one delayed by one period minus 3 ns, which is how this model
// makes it: each edge of inclk0 schedules the same edge on c0 after
// PERIOD_PS - LEAD_PS (a transport delay, so edges are never swallowed).
// Like a real PLL output it is only valid once the input has been running for
// a period; there is no lock output, matching the document's two-port
// component. The 50 MHz input and the 3 ns lead are the document's.
module sdram_pll #(
  parameter int unsigned PERIOD_PS = 20000,  // input period, 50 MHz
  parameter int unsigned LEAD_PS   = 3000    // how far c0 leads inclk0
) (
  input  logic inclk0,
  output logic c0
);
  initial c0 = 1'b0;

  always @(posedge inclk0) c0 <= #((PERIOD_PS - LEAD_PS) * 1ps) 1'b1;
  always @(negedge inclk0) c0 <= #((PERIOD_PS - LEAD_PS) * 1ps) 1'b0;

endmodule
