// sine_ref_pkg: reference values for the testbenches.
//
// sine_ref(a) is the expected lookup-table sample at address a,
// floor(32767 * sin(2*pi*a/20000)), computed in double precision.
// FIG_ADDR/FIG_DATA are the sample values the published table lists and
// serve as fixed golden points independent of the formula.
`timescale 1ns / 1ps
package sine_ref_pkg;

  localparam int N   = 20000;
  localparam int AMP = 32767;

  function automatic int sine_ref(int a);
    real x;
    x = 2.0 * 3.14159265358979323846 * real'(a) / real'(N);
    return $rtoi($floor(real'(AMP) * $sin(x)));
  endfunction

  // Listed entries that the floor rule reproduces.
  localparam int N_FIG = 12;
  localparam int FIG_ADDR [N_FIG] = '{0, 1, 2, 4999, 5000, 5001, 9999, 10000,
                                      14999, 15001, 19998, 19999};
  localparam int FIG_DATA [N_FIG] = '{0, 10, 20, 32766, 32767, 32766, 10, 0,
                                      -32767, -32767, -21, -11};

endpackage
