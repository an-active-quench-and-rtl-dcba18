`timescale 1ns / 1ps
// aqr_pkg: constants shared by the active quench and reset (AQR) circuit.
//
// The hold-off time is set by an 8-bit code (Input7..Input0) that is compared
// with an 8-bit counter clocked by an on-chip ring oscillator. One count lasts
// one oscillator period, about 6.5 ns, so codes 1..255 give hold-off times from
// a few nanoseconds to about 1.66 us. The 8-bit width and the 6.5 ns step are
// the published figures; the analog delays below are this design's own
// behavioural-model choices, picked so that the shortest dead time (code 1)
// comes out close to the measured 28.4 ns.
package aqr_pkg;

  // Counter / code width (8 J-K flip-flops, Input7..Input0).
  localparam int unsigned COUNT_W = 8;

  // Ring-oscillator period: one hold-off step.
  localparam realtime OSC_PERIOD_NS = 6.5;

  // Behavioural-model delays (own choices, not published).
  localparam realtime COMP_DELAY_NS = 2.0;  // comparator response
  localparam realtime BUF_DELAY_NS  = 2.0;  // reset buffer chain

  // Supply and threshold used by the behavioural front end.
  // Vdd follows from the published bias: 30 V across the APD with -Vlow = -26.7 V.
  localparam real VDD_V  = 3.3;
  localparam real VREF_V = 2.5;           // own choice, not published

endpackage
