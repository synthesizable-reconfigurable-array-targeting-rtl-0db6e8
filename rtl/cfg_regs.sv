// cfg_regs: the configuration memory of the array, built from flip-flops, and
// the decoder of the host's configuration writes.
//
// The host (a processor or DSP of the system-on-chip) writes 32-bit words on
// a simple synchronous write port: cfg_we with cfg_addr and cfg_wdata in the
// same cycle, no wait states. Address bit 15 clear selects configuration word
// cfg_addr[14:0]; the word is updated on the next rising clock edge and can
// be read back combinationally on cfg_rdata at the same address. Address bit
// 15 set is a lookup-table write: it is forwarded, in the same cycle, to the
// write port of memory cluster cfg_addr[14:10], lane cfg_addr[9:8], word
// cfg_addr[7:0], data cfg_wdata[7:0]. Writes may happen at any time, so the
// array can be reconfigured at run time.
//
// Reset (asynchronous, active low) clears every configuration word: every
// switch opens, every cluster is unconfigured and every memory element is
// switched off. While rst_n is low the outputs cfg_q are also forced to zero
// combinationally, so that before the registers have been cleared (at
// power-up, when flip-flops hold arbitrary values) no switch can close a
// combinational loop through the mesh and the clusters.
//
// Configuration held in flip-flops and written by the host follows the
// architecture; the word width, the address map (da_pkg) and the readback
// are choices of this implementation.
module cfg_regs
  import da_pkg::*;
#(
  parameter int unsigned NWORDS = 1024,
  parameter int unsigned NMEM   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [CFG_AW-1:0]        cfg_addr,
  input  logic [31:0]              cfg_wdata,
  output logic [31:0]              cfg_rdata,
  output logic [NWORDS-1:0][31:0]  cfg_q,
  // lookup-table writes to the memory clusters
  output logic [NMEM-1:0]          mem_we,
  output logic [7:0]               mem_waddr,
  output logic [1:0]               mem_wlane,
  output logic [7:0]               mem_wdata
);

  logic is_mem;
  logic [NWORDS-1:0][31:0] regs;

  assign is_mem = cfg_addr[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < int'(NWORDS); w++) regs[w] <= '0;
    end else if (cfg_we && !is_mem && (32'(cfg_addr[14:0]) < NWORDS)) begin
      regs[cfg_addr[14:0]] <= cfg_wdata;
    end
  end

  assign cfg_q     = rst_n ? regs : '0;
  assign cfg_rdata = (!is_mem && (32'(cfg_addr[14:0]) < NWORDS)) ? regs[cfg_addr[14:0]] : '0;

  always_comb begin
    mem_we = '0;
    for (int m = 0; m < int'(NMEM); m++)
      if (cfg_we && is_mem && (int'(cfg_addr[14:10]) == m)) mem_we[m] = 1'b1;
  end

  assign mem_waddr = cfg_addr[7:0];
  assign mem_wlane = cfg_addr[9:8];
  assign mem_wdata = cfg_wdata[7:0];

endmodule
