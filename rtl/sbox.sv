// sbox: switch box at the crossing of a horizontal and a vertical channel.
//
// Each of the twelve tracks (six 8-bit, six 1-bit) arriving on one side can
// be switched onto the track with the same index on each of the three other
// sides: switch-box flexibility Fs = 3 with the disjoint (same index)
// pattern. Every switch is a directional buffer with its own configuration
// bit, so a bidirectional connection between two sides costs two bits and
// the configuration chooses which way the signal flows.
//
// A buffer that is switched off contributes zeros; the value of a channel
// segment is the OR of every contribution made to it (see da_array). For a
// legal configuration, with at most one driver enabled per track, this is
// the same as the tri-state bus of the architecture, in which each switch is a
// tri-state buffer onto the segment.
//
// Configuration: bit ((t*4 + o)*3 + k) enables track t of side o to be driven
// from side (o + 1 + k) mod 4 (sides N=0, E=1, S=2, W=3). Purely
// combinational.
//
// Fs = 3, the track counts and switches built as buffers follow the
// architecture; the disjoint pattern, the bit order and the OR-resolved bus
// in place of tri-state nets are choices of this implementation.
module sbox
  import da_pkg::*;
(
  input  logic [SBOX_CFG_W-1:0] cfg,
  input  seg_t [3:0]            seg_i,   // segment value on each side
  output seg_t [3:0]            seg_o    // contribution driven onto each side
);

  always_comb begin
    seg_o = '0;
    for (int o = 0; o < 4; o++) begin
      for (int k = 0; k < 3; k++) begin
        for (int t = 0; t < int'(N_TRK8); t++) begin
          if (cfg[(t*4 + o)*3 + k])
            seg_o[o].w8[t] |= seg_i[(o + 1 + k) % 4].w8[t];
        end
        for (int t = 0; t < int'(N_TRK1); t++) begin
          if (cfg[((t + N_TRK8)*4 + o)*3 + k])
            seg_o[o].w1[t] |= seg_i[(o + 1 + k) % 4].w1[t];
        end
      end
    end
  end

endmodule
