// bd_pkg: constants and types shared by the bundled-data asynchronous circuits.
//
// All delays are in picoseconds (every file uses `timescale 1ps/1ps).  The
// target cycle time CT_PS = 1000 ps is the cycle of the synchronous circuit the
// asynchronous one replaces; the request delay element of every control module
// is CT - 1 = 999 ps, the one time unit left over being the delay of the
// control flip-flop.  These two numbers follow the document's simulation model.
// The 1 ps pulse-width delay PD_PS and the 32-bit data width of the example
// circuits are also the document's; the w0_mode_e encoding is this design's.
//
// Lint notes: linted on its own, the package reports DATA_W and SD_PS as
// unused; the modules use them as parameter defaults.
`timescale 1ps/1ps
package bd_pkg;

  // Data width of the example data-paths (32-bit registers and units).
  localparam int unsigned DATA_W = 32;

  // Target cycle time of the synchronous original, in ps.
  localparam int unsigned CT_PS = 1000;

  // Delay of the control flip-flop / pulse-width element pd_i, in ps.
  localparam int unsigned PD_PS = 1;

  // Request delay element sd_i: time_sd = CT - 1.
  localparam int unsigned SD_PS = CT_PS - PD_PS;

  // How a control module builds its internal request w0 from its inputs.
  typedef enum logic [1:0] {
    W0_XOR    = 2'd0,  // one predecessor, or several merged by XOR (two-phase OR)
    W0_CELEM  = 2'd1,  // primary start joined with the XOR of feedback requests
    W0_BRANCH = 2'd2   // predecessor's lclk AND branch condition toggles bDFF
  } w0_mode_e;

endpackage
