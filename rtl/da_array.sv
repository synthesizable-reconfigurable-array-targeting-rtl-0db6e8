// da_array: a reconfigurable array for distributed arithmetic (DA), meant to
// sit in a system-on-chip next to processors and DSPs as a synthesizable
// soft core.
//
// Structure. ROWS x COLS clusters arranged in columns with the repeating
// pattern  AS AS MEM AS AS AS MEM AS  (AS: add-shift cluster, MEM: memory
// cluster), i.e. three add-shift clusters per memory cluster. The clusters sit
// in an island-style mesh: horizontal channel segments H[r][c] (r = 0..ROWS,
// c = 0..COLS-1) run above and below every cluster row, vertical segments
// V[r][c] (r = 0..ROWS-1, c = 0..COLS) left and right of every cluster column,
// and a switch box S[i][j] (sbox) sits at every crossing, including the edge.
// Every segment carries six 8-bit and six 1-bit tracks. Cluster (r, c)
// reaches the mesh through two connection boxes (cbox): one on the vertical
// segment to its right, V[r][c+1], and one on the horizontal segment below
// it, H[r+1][c]. Every edge segment has an I/O block (io_block) through which
// the host drives tracks and reads them.
//
// Interconnect resolution. Each track of a segment is the OR of everything
// that can drive it: the switch boxes at both ends, the C-box of the adjacent
// cluster and, on the edge, the I/O block. With one driver enabled per track,
// this behaves as the tri-state bus of the architecture. The mesh contains
// combinational cycles by construction (any ring of switch boxes); a
// configuration must not close one, just as with tri-state routing fabric.
// Static timing and lint tools therefore report loops through the mesh.
//
// Configuration. The host writes 32-bit configuration words and lookup-table
// contents through cfg_regs (address map in da_pkg): per cluster tile 16
// words (cluster configuration, C-box right, C-box below), per switch box 8
// words, per edge I/O block one word. Memory clusters are numbered row by
// row, left to right, for lookup-table writes.
//
// Timing. All routing is combinational; the only state is in the add-shift
// modules, the memory elements and the configuration registers, all on clk.
// A bit-serial DA word of B bits therefore takes one load cycle plus B
// accumulate cycles.
//
// The cluster types, the 4 x 8 arrangement with three add-shift clusters per
// memory cluster, six 8-bit and six 1-bit tracks, Fc = 6 and Fs = 3 and
// flip-flop configuration memory follow the architecture. The position of
// the C-boxes follows the mesh drawing (right and below each cluster). The
// OR-resolved buses, the edge I/O blocks, the configuration address map and
// the cluster pin sets are choices of this implementation.
module da_array
  import da_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  localparam int unsigned NWORDS = cfg_words(ROWS, COLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host configuration port
  input  logic               cfg_we,
  input  logic [CFG_AW-1:0]  cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // edge I/O: one segment per cluster column (top, bottom) and row (left, right)
  input  seg_t [COLS-1:0]    io_top_i,
  output seg_t [COLS-1:0]    io_top_o,
  input  seg_t [COLS-1:0]    io_bot_i,
  output seg_t [COLS-1:0]    io_bot_o,
  input  seg_t [ROWS-1:0]    io_left_i,
  output seg_t [ROWS-1:0]    io_left_o,
  input  seg_t [ROWS-1:0]    io_right_i,
  output seg_t [ROWS-1:0]    io_right_o
);

  // number of memory clusters, and the index of the one at (r, c)
  function automatic int unsigned mem_index(int unsigned r, int unsigned c);
    int unsigned n = 0;
    for (int unsigned rr = 0; rr < ROWS; rr++)
      for (int unsigned cc = 0; cc < COLS; cc++)
        if ((rr < r) || (rr == r && cc < c))
          if (col_kind(cc) == CL_MEMORY) n++;
    return n;
  endfunction

  localparam int unsigned NMEM = mem_index(ROWS, 0);

  // ---------------------------------------------------------------------
  // Configuration registers
  // ---------------------------------------------------------------------
  logic [NWORDS-1:0][31:0] cfg_q;
  logic [NMEM-1:0]         mem_we;
  logic [7:0]              mem_waddr;
  logic [1:0]              mem_wlane;
  logic [7:0]              mem_wdata;

  cfg_regs #(.NWORDS(NWORDS), .NMEM(NMEM)) u_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (cfg_wdata),
    .cfg_rdata (cfg_rdata),
    .cfg_q     (cfg_q),
    .mem_we    (mem_we),
    .mem_waddr (mem_waddr),
    .mem_wlane (mem_wlane),
    .mem_wdata (mem_wdata)
  );

  // ---------------------------------------------------------------------
  // Channel segments and their drivers
  // ---------------------------------------------------------------------
  seg_t h_seg [ROWS+1][COLS];      // horizontal segments
  seg_t v_seg [ROWS][COLS+1];      // vertical segments
  seg_t sb_o  [ROWS+1][COLS+1][4]; // switch-box contributions, per side
  seg_t cb_r  [ROWS][COLS];        // C-box contributions to V[r][c+1]
  seg_t cb_b  [ROWS][COLS];        // C-box contributions to H[r+1][c]
  seg_t io_h  [ROWS+1][COLS];      // I/O-block contributions (edge rows only)
  seg_t io_v  [ROWS][COLS+1];      // I/O-block contributions (edge columns only)

  for (genvar r = 0; r <= ROWS; r++) begin : g_h
    for (genvar c = 0; c < COLS; c++) begin : g_hc
      seg_t from_above;
      if (r > 0) begin : g_cb
        assign from_above = cb_b[r-1][c];
      end else begin : g_nocb
        assign from_above = '0;
      end
      assign h_seg[r][c] = seg_t'(sb_o[r][c][SIDE_E] | sb_o[r][c+1][SIDE_W] | from_above | io_h[r][c]);
      if (r > 0 && r < ROWS) begin : g_noio
        assign io_h[r][c] = '0;
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_v
    for (genvar c = 0; c <= COLS; c++) begin : g_vc
      seg_t from_left;
      if (c > 0) begin : g_cb
        assign from_left = cb_r[r][c-1];
      end else begin : g_nocb
        assign from_left = '0;
      end
      assign v_seg[r][c] = seg_t'(sb_o[r][c][SIDE_S] | sb_o[r+1][c][SIDE_N] | from_left | io_v[r][c]);
      if (c > 0 && c < COLS) begin : g_noio
        assign io_v[r][c] = '0;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Switch boxes
  // ---------------------------------------------------------------------
  for (genvar i = 0; i <= ROWS; i++) begin : g_sbr
    for (genvar j = 0; j <= COLS; j++) begin : g_sb
      localparam int unsigned BASE = sbox_base(i, j, ROWS, COLS);
      seg_t [3:0] sin;
      seg_t [3:0] sout;
      logic [SBOX_WORDS*32-1:0] words;

      assign words = cfg_q[BASE +: SBOX_WORDS];

      if (i > 0)    begin : g_n assign sin[SIDE_N] = v_seg[i-1][j]; end
      else          begin : g_nn assign sin[SIDE_N] = '0; end
      if (i < ROWS) begin : g_s assign sin[SIDE_S] = v_seg[i][j]; end
      else          begin : g_ns assign sin[SIDE_S] = '0; end
      if (j > 0)    begin : g_w assign sin[SIDE_W] = h_seg[i][j-1]; end
      else          begin : g_nw assign sin[SIDE_W] = '0; end
      if (j < COLS) begin : g_e assign sin[SIDE_E] = h_seg[i][j]; end
      else          begin : g_ne assign sin[SIDE_E] = '0; end

      sbox u_sbox (
        .cfg   (words[SBOX_CFG_W-1:0]),
        .seg_i (sin),
        .seg_o (sout)
      );

      for (genvar s = 0; s < 4; s++) begin : g_side
        assign sb_o[i][j][s] = sout[s];
      end
    end
  end

  // ---------------------------------------------------------------------
  // Clusters and their connection boxes
  // ---------------------------------------------------------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned BASE = tile_base(r, c, COLS);
      pin_in_t  pins_i, pins_r, pins_b;
      pin_out_t pins_o;
      logic [127:0] cb_r_words, cb_b_words;
      logic [95:0]  cl_words;

      assign cl_words   = cfg_q[BASE + TW_CLUSTER +: 3];
      assign cb_r_words = cfg_q[BASE + TW_CBOX_R +: 4];
      assign cb_b_words = cfg_q[BASE + TW_CBOX_B +: 4];

      cbox u_cbox_r (
        .cfg   (cbox_cfg_t'(cb_r_words[CBOX_CFG_W-1:0])),
        .seg_i (v_seg[r][c+1]),
        .pin_i (pins_o),
        .pin_o (pins_r),
        .seg_o (cb_r[r][c])
      );

      cbox u_cbox_b (
        .cfg   (cbox_cfg_t'(cb_b_words[CBOX_CFG_W-1:0])),
        .seg_i (h_seg[r+1][c]),
        .pin_i (pins_o),
        .pin_o (pins_b),
        .seg_o (cb_b[r][c])
      );

      assign pins_i = pin_in_t'(pins_r | pins_b);

      if (col_kind(c) == CL_MEMORY) begin : g_mem
        localparam int unsigned MI = mem_index(r, c);
        logic [3:0][7:0] lanes;

        mem_cluster u_mem (
          .clk          (clk),
          .cfg          (mem_cfg_t'(cl_words[31:0])),
          .wr_en        (mem_we[MI]),
          .wr_addr      (mem_waddr),
          .wr_lane      (mem_wlane),
          .wr_data      (mem_wdata),
          .rd_addr8     (pins_i.i8[MEM_I8_ADDR]),
          .rd_addr_bits (pins_i.i1),
          .rd_lane      (lanes)
        );

        always_comb begin
          pins_o    = '0;
          pins_o.o8 = lanes;
        end
      end else begin : g_as
        addshift_cluster u_as (
          .clk   (clk),
          .rst_n (rst_n),
          .cfg   (as_cfg_t'(cl_words)),
          .pin_i (pins_i),
          .pin_o (pins_o)
        );
      end
    end
  end

  // ---------------------------------------------------------------------
  // Edge I/O blocks
  // ---------------------------------------------------------------------
  localparam int unsigned IOB = io_base(ROWS, COLS);

  for (genvar c = 0; c < COLS; c++) begin : g_io_tb
    io_block u_top (
      .cfg    (cfg_q[IOB + c][N_TRK-1:0]),
      .io_in  (io_top_i[c]),
      .seg_i  (h_seg[0][c]),
      .io_out (io_top_o[c]),
      .seg_o  (io_h[0][c])
    );
    io_block u_bot (
      .cfg    (cfg_q[IOB + COLS + c][N_TRK-1:0]),
      .io_in  (io_bot_i[c]),
      .seg_i  (h_seg[ROWS][c]),
      .io_out (io_bot_o[c]),
      .seg_o  (io_h[ROWS][c])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_io_lr
    io_block u_left (
      .cfg    (cfg_q[IOB + 2*COLS + r][N_TRK-1:0]),
      .io_in  (io_left_i[r]),
      .seg_i  (v_seg[r][0]),
      .io_out (io_left_o[r]),
      .seg_o  (io_v[r][0])
    );
    io_block u_right (
      .cfg    (cfg_q[IOB + 2*COLS + ROWS + r][N_TRK-1:0]),
      .io_in  (io_right_i[r]),
      .seg_i  (v_seg[r][COLS]),
      .io_out (io_right_o[r]),
      .seg_o  (io_v[r][COLS])
    );
  end

endmodule
