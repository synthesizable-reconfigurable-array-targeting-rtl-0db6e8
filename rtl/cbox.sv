// cbox: connection box between the pins of one cluster and the tracks of one
// channel segment.
//
// Every 8-bit pin can be connected to any of the six 8-bit tracks and every
// 1-bit pin to any of the six 1-bit tracks, i.e. connection-box flexibility
// Fc = 6, with one configuration bit per pin-track switch. An input-pin
// switch passes the track to the pin; an output-pin switch drives the pin
// onto the track. An output pin may drive several tracks at once. When more
// than one track is switched onto one input pin, the pin sees their OR; a
// legal configuration switches at most one.
//
// The value an input pin receives from this box (pin_o) is ORed in the array
// with what the cluster's other C-box gives it. The value the box drives onto
// the segment (seg_o) is ORed with every other driver of that segment, which
// is equal to a tri-state bus as long as only one driver per track is on.
//
// Configuration: cbox_cfg_t (da_pkg), 108 bits. Purely combinational.
//
// Fc = 6, the one-bit-per-switch configuration and the option of one pin
// driving several tracks follow the architecture; the OR-resolved bus in
// place of tri-state nets is a choice of this implementation.
module cbox
  import da_pkg::*;
(
  input  cbox_cfg_t cfg,
  input  seg_t      seg_i,    // segment value
  input  pin_out_t  pin_i,    // cluster output pins
  output pin_in_t   pin_o,    // contribution to cluster input pins
  output seg_t      seg_o     // contribution driven onto the segment
);

  always_comb begin
    pin_o = '0;
    seg_o = '0;
    for (int t = 0; t < int'(N_TRK8); t++) begin
      for (int p = 0; p < int'(N_IN8); p++)
        if (cfg.in8[p][t]) pin_o.i8[p] |= seg_i.w8[t];
      for (int p = 0; p < int'(N_OUT8); p++)
        if (cfg.out8[p][t]) seg_o.w8[t] |= pin_i.o8[p];
    end
    for (int t = 0; t < int'(N_TRK1); t++) begin
      for (int p = 0; p < int'(N_IN1); p++)
        if (cfg.in1[p][t]) pin_o.i1[p] |= seg_i.w1[t];
      for (int p = 0; p < int'(N_OUT1); p++)
        if (cfg.out1[p][t]) seg_o.w1[t] |= pin_i.o1[p];
    end
  end

endmodule
