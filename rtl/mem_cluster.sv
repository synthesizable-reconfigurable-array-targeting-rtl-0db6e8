// mem_cluster: a 2 Kbit memory cluster made of four 64 x 8 memory elements
// and the grouping logic that gives it the geometries
//   64 x 8 / 16 / 24 / 32,  128 x 8 / 16,  192 x 8,  256 x 8.
//
// Geometry: nwide = nwide_m1+1 elements sit side by side (word width
// 8*nwide) and ndeep = ndeep_m1+1 such rows are stacked (depth 64*ndeep).
// Element e = row*nwide + lane holds lane 'lane' of words 64*row .. 64*row+63.
// A read of logical address A picks row = A[7:6] and reads word A[5:0] of the
// nwide elements in that row; lane L of the result appears on read lane
// rd_lane[L]. Lanes beyond nwide, and rows beyond ndeep, read as zero.
// A combination with nwide*ndeep > 4 is not in the geometry table; elements
// with index above 3 do not exist and read as zero.
//
// The read address comes either from the 8-bit address pin or, bit by bit,
// from eight 1-bit pins (cfg.addr_bits); the second form lets the serial
// outputs of eight bit-serial shift registers address a DA lookup table
// directly. Reads are asynchronous.
//
// Writes come from the configuration port with the same logical addressing:
// (wr_addr, wr_lane) goes to element (wr_addr[7:6]*nwide + wr_lane), word
// wr_addr[5:0]. Each element has its own power enable, cfg.elem_on[e]; a
// switched-off element ignores writes and reads as zero.
//
// The element size, the four elements per cluster, the geometry table and
// the per-element power switch follow the architecture. The way the lanes
// and rows are mapped onto elements, the address pins and the logical write
// addressing are choices of this implementation.
//
// The read path is combinational from address pins to data lanes. In the
// full array the mesh can therefore route a lane back to an address pin, so
// lint tools report a combinational loop through rd_addr (UNOPTFLAT). Only a
// configuration that routes a table's output into its own address would
// close that loop, and no valid configuration does.
module mem_cluster
  import da_pkg::*;
(
  input  logic        clk,
  input  mem_cfg_t    cfg,
  // configuration write port
  input  logic        wr_en,
  input  logic [7:0]  wr_addr,
  input  logic [1:0]  wr_lane,
  input  logic [7:0]  wr_data,
  // read address sources
  input  logic [7:0]  rd_addr8,
  input  logic [7:0]  rd_addr_bits,
  // read data lanes
  output logic [3:0][7:0] rd_lane
);

  logic [2:0] nwide, ndeep;
  logic [7:0] rd_addr;
  logic [3:0][7:0] elem_q;
  logic [3:0] elem_wr;
  logic [4:0] wr_elem;

  assign nwide   = {1'b0, cfg.nwide_m1} + 3'd1;
  assign ndeep   = {1'b0, cfg.ndeep_m1} + 3'd1;
  assign rd_addr = cfg.addr_bits ? rd_addr_bits : rd_addr8;

  // element addressed by a configuration write
  assign wr_elem = 5'(wr_addr[7:6]) * 5'(nwide) + 5'(wr_lane);

  always_comb begin
    elem_wr = '0;
    if (wr_en && ({1'b0, wr_lane} < nwide) && ({1'b0, wr_addr[7:6]} < ndeep) && (wr_elem < 5'd4))
      elem_wr[wr_elem[1:0]] = 1'b1;
  end

  for (genvar e = 0; e < 4; e++) begin : g_elem
    mem_element u_elem (
      .clk     (clk),
      .on      (cfg.elem_on[e]),
      .wr_en   (elem_wr[e]),
      .wr_addr (wr_addr[5:0]),
      .wr_data (wr_data),
      .rd_addr (rd_addr[5:0]),
      .rd_data (elem_q[e])
    );
  end

  // read lane steering
  always_comb begin
    logic [4:0] e;
    rd_lane = '0;
    for (int l = 0; l < 4; l++) begin
      e = 5'(rd_addr[7:6]) * 5'(nwide) + 5'(l);
      if ((3'(l) < nwide) && ({1'b0, rd_addr[7:6]} < ndeep) && (e < 5'd4))
        rd_lane[l] = elem_q[e[1:0]];
    end
  end

endmodule
