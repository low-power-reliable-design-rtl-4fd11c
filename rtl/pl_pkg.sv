// Shared definitions for the pulsed-latch designs.
//
// pulser_kind_e selects which of the two reconfigurable pulsers a 16-bit
// register uses: PULSER_SW lowers the supply of the pulser's delay path
// through header switches, PULSER_MUX switches between two delay chains.
// CLK_PERIOD_PS is the 500 MHz clock the register files are built for.
package pl_pkg;
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic {
    PULSER_SW  = 1'b0,
    PULSER_MUX = 1'b1
  } pulser_kind_e;

  localparam int unsigned CLK_PERIOD_PS = 2000;
endpackage
