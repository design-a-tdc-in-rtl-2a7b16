// tdc_pkg: constants shared by the SiGe RPC front-end TDC.
//
// The TDC digitises the arrival time of a discriminator pulse ("event") by
// taking a snapshot of a free-running counter that is clocked by a local ring
// oscillator. Eight channels share one oscillator and one counter; each channel
// stores its snapshot and ships it to the acquisition FPGA over a one-wire
// serial link. The numbers below are the design's defaults: 8-bit time words,
// 8 channels, a 7-stage ring oscillator running at 2 GHz nominally.
`timescale 1ps / 1fs

package tdc_pkg;

  // Width of the time word: counter, event memories and serializers.
  localparam int unsigned TIME_W     = 8;
  // Number of event channels sharing the counter.
  localparam int unsigned N_CH       = 8;
  // Inverters in the ring oscillator.
  localparam int unsigned VCO_STAGES = 7;

  // Level of the serializer control input: 0 loads the parallel word,
  // 1 shifts it out one bit per sync clock.
  typedef enum logic {
    PISO_WRITE = 1'b0,
    PISO_SHIFT = 1'b1
  } piso_mode_e;

  // Reference time word for a given elapsed time: the counter advances by one
  // code every half period of the oscillator (the LSB is the oscillator
  // level itself), so the code is floor(2*t/T) modulo 2**TIME_W.
  function automatic logic [TIME_W-1:0] expected_code(longint unsigned t_fs,
                                                      longint unsigned period_fs);
    return TIME_W'((2 * t_fs) / period_fs);
  endfunction

endpackage
