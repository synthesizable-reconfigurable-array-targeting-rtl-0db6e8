// io_block: input/output block on one channel segment at the edge of the
// array, through which the host feeds data into the mesh and reads results
// back.
//
// For each of the twelve tracks of the segment one configuration bit lets the
// block drive the track from the matching bit of the array input io_in. The
// segment value itself is always visible on io_out, so any track, including
// one carrying a result routed to the edge, can be read. Combinational.
//
// Data entering and leaving the array through the host is described by the
// architecture; the edge I/O block with one drive bit per track is a choice
// of this implementation.
module io_block
  import da_pkg::*;
(
  input  logic [N_TRK-1:0] cfg,     // drive enable per track (0..5: 8-bit, 6..11: 1-bit)
  input  seg_t             io_in,   // values offered by the host
  input  seg_t             seg_i,   // segment value
  output seg_t             io_out,  // segment value seen by the host
  output seg_t             seg_o    // contribution driven onto the segment
);

  always_comb begin
    seg_o = '0;
    for (int t = 0; t < int'(N_TRK8); t++)
      if (cfg[t]) seg_o.w8[t] = io_in.w8[t];
    for (int t = 0; t < int'(N_TRK1); t++)
      if (cfg[N_TRK8 + t]) seg_o.w1[t] = io_in.w1[t];
  end

  assign io_out = seg_i;

endmodule
