// meso_pkg: shared defaults of the mesochronous synchronizer.
//
// The synchronizer needs two numbers that depend on the target process and
// clock: the data width of the link and the delay ΔH that places the
// selection window behind each transmitted clock edge. Neither is fixed by
// the design itself; the defaults below assume a 1000 ps clock period with
// 50 ps flip-flop setup and hold times. ΔH = 200 ps then satisfies the three
// design rules: ΔH > t_hold, ΔH < T/2 - t_setup, and t_setup + t_hold < T/2.
// The single data line is the width drawn in the block diagram.
`timescale 1ps/1ps
package meso_pkg;
  localparam int unsigned DEFAULT_DATA_W     = 1;
  localparam int unsigned DEFAULT_DELTA_H_PS = 200;
endpackage
