// addshift_cluster: four 4-bit add-shift modules grouped into one cluster,
// with configurable cascade switches between neighbouring modules so that
// they work as one 8-, 12- or 16-bit adder, shift register or accumulator,
// or as independent 4-bit units.
//
// Module m handles bits 4m+3..4m of the 16-bit operands A = {A1, A0} and
// B = {B1, B0} and of the 16-bit result Y = {Y1, Y0}. The cascade switches
// are the CIN_CHAIN and SIN_CHAIN settings of each module's configuration:
// they take the carry from module m-1, the right-shift bit from module m+1 and
// the left-shift bit from module m-1. Module 0 has no lower and module 3 no
// upper neighbour (those cascade inputs read zero). Wider operations span
// several clusters through the mesh, using the CIN/SIN/COUT/SOUT pins.
//
// Pins (see da_pkg): 8-bit inputs A0, A1, B0, B1; 8-bit outputs Y0, Y1
// (the other two 8-bit outputs drive zero); 1-bit inputs SIN, CIN, LD, SUB,
// EN, shared by all four modules; 1-bit outputs SOUT (serial output of the
// module chosen by cfg.sout_sel) and COUT (carry out of the module chosen by
// cfg.cout_sel). EN gates the modules when cfg.en_src = EN_PIN, otherwise
// they run every cycle.
//
// The four modules per cluster, their 4-bit width and the cascade switches
// follow the architecture; the pin list, the shared control pins and the
// output selects are choices of this implementation.
//
// The cascade signals are kept as 4-bit vectors (cout, shr, shl), where bit
// m feeds module m+1 or m-1. Lint tools that work per signal rather than
// per bit therefore see the vector feed itself and report a combinational
// loop (UNOPTFLAT). No real loop exists: the carry ripples upwards, the
// right-shift bits pass downwards and neither returns.
module addshift_cluster
  import da_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  as_cfg_t  cfg,
  input  pin_in_t  pin_i,
  output pin_out_t pin_o
);

  logic [15:0] a, b, y;
  logic [3:0]  cout, shr, shl, so;
  logic        en;

  assign a  = {pin_i.i8[AS_I8_A1], pin_i.i8[AS_I8_A0]};
  assign b  = {pin_i.i8[AS_I8_B1], pin_i.i8[AS_I8_B0]};
  assign en = (cfg.en_src == EN_PIN) ? pin_i.i1[AS_I1_EN] : 1'b1;

  for (genvar m = 0; m < 4; m++) begin : g_mod
    logic c_chain, sr_chain, sl_chain;
    if (m == 0) begin : g_lo
      assign c_chain  = 1'b0;
      assign sl_chain = 1'b0;
    end else begin : g_mid_lo
      assign c_chain  = cout[m-1];
      assign sl_chain = shl[m-1];
    end
    if (m == 3) begin : g_hi
      assign sr_chain = 1'b0;
    end else begin : g_mid_hi
      assign sr_chain = shr[m+1];
    end

    addshift_module u_mod (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg      (cfg.mods[m]),
      .a        (a[4*m +: 4]),
      .b        (b[4*m +: 4]),
      .ld       (pin_i.i1[AS_I1_LD]),
      .en       (en),
      .sub_pin  (pin_i.i1[AS_I1_SUB]),
      .cin_pin  (pin_i.i1[AS_I1_CIN]),
      .sin_pin  (pin_i.i1[AS_I1_SIN]),
      .c_chain  (c_chain),
      .sr_chain (sr_chain),
      .sl_chain (sl_chain),
      .cout     (cout[m]),
      .shr_out  (shr[m]),
      .shl_out  (shl[m]),
      .y        (y[4*m +: 4]),
      .so       (so[m])
    );
  end

  always_comb begin
    pin_o = '0;
    pin_o.o8[AS_O8_Y0]   = y[7:0];
    pin_o.o8[AS_O8_Y1]   = y[15:8];
    pin_o.o1[AS_O1_SOUT] = so[cfg.sout_sel];
    pin_o.o1[AS_O1_COUT] = cout[cfg.cout_sel];
  end

endmodule
