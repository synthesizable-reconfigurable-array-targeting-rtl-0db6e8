// da_pkg: types and constants shared by the distributed-arithmetic (DA)
// reconfigurable array.
//
// The array is built from two kinds of coarse-grain cluster (add-shift and
// memory) joined by a mesh of channel segments. Every channel segment holds
// six 8-bit tracks and six 1-bit tracks; these counts, the 4-bit add-shift
// module, the four modules per add-shift cluster, the 64 x 8 memory element
// and the four elements per memory cluster follow the published
// architecture. The configuration-field encodings, the pin set of a cluster
// and the configuration address map below are choices of this
// implementation: the architecture description gives none of them.
package da_pkg;

  // ---------------------------------------------------------------------
  // Interconnect
  // ---------------------------------------------------------------------
  localparam int unsigned N_TRK8 = 6;   // 8-bit tracks per channel segment
  localparam int unsigned N_TRK1 = 6;   // 1-bit tracks per channel segment
  localparam int unsigned N_TRK  = N_TRK8 + N_TRK1;  // track index 0..5: 8-bit, 6..11: 1-bit

  // One channel segment (or the contribution one switch block makes to it).
  typedef struct packed {
    logic [N_TRK1-1:0]          w1;
    logic [N_TRK8-1:0][7:0]     w8;
  } seg_t;

  localparam int unsigned SEG_W = $bits(seg_t);

  // Sides of a switch box.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // S-box: for every track, every output side, and every one of the three
  // other (input) sides, one switch bit. Input slot k of output side o is
  // side (o + 1 + k) mod 4.
  localparam int unsigned SBOX_CFG_W = N_TRK * 4 * 3;   // 144

  // ---------------------------------------------------------------------
  // Cluster pins (uniform for both cluster types)
  // ---------------------------------------------------------------------
  localparam int unsigned N_IN8  = 4;   // 8-bit input pins
  localparam int unsigned N_OUT8 = 4;   // 8-bit output pins
  localparam int unsigned N_IN1  = 8;   // 1-bit input pins
  localparam int unsigned N_OUT1 = 2;   // 1-bit output pins

  typedef struct packed {
    logic [N_IN1-1:0]        i1;
    logic [N_IN8-1:0][7:0]   i8;
  } pin_in_t;

  typedef struct packed {
    logic [N_OUT1-1:0]       o1;
    logic [N_OUT8-1:0][7:0]  o8;
  } pin_out_t;

  // Add-shift cluster pin assignment
  localparam int unsigned AS_I8_A0 = 0;  // operand A bits 7:0
  localparam int unsigned AS_I8_A1 = 1;  // operand A bits 15:8
  localparam int unsigned AS_I8_B0 = 2;  // operand B bits 7:0
  localparam int unsigned AS_I8_B1 = 3;  // operand B bits 15:8
  localparam int unsigned AS_O8_Y0 = 0;  // result bits 7:0
  localparam int unsigned AS_O8_Y1 = 1;  // result bits 15:8
  localparam int unsigned AS_I1_SIN = 0; // serial in
  localparam int unsigned AS_I1_CIN = 1; // carry in
  localparam int unsigned AS_I1_LD  = 2; // load / clear (start of a word)
  localparam int unsigned AS_I1_SUB = 3; // subtract select
  localparam int unsigned AS_I1_EN  = 4; // enable
  localparam int unsigned AS_O1_SOUT = 0; // serial out
  localparam int unsigned AS_O1_COUT = 1; // carry out

  // Memory cluster pin assignment: i8[0] is the 8-bit read address, i1[7:0]
  // are the read address bits taken one by one from 1-bit tracks, o8[3:0]
  // are the four 8-bit read-data lanes.
  localparam int unsigned MEM_I8_ADDR = 0;

  // C-box: one switch bit per (pin, track) pair of equal width.
  localparam int unsigned CBOX_CFG_W = (N_IN8 + N_OUT8) * N_TRK8 + (N_IN1 + N_OUT1) * N_TRK1; // 108

  typedef struct packed {
    logic [N_OUT1-1:0][N_TRK1-1:0] out1;  // output pin drives track
    logic [N_IN1-1:0] [N_TRK1-1:0] in1;   // input pin listens to track
    logic [N_OUT8-1:0][N_TRK8-1:0] out8;
    logic [N_IN8-1:0] [N_TRK8-1:0] in8;
  } cbox_cfg_t;

  // ---------------------------------------------------------------------
  // Add-shift module configuration (16 bits per module)
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    AS_OFF   = 2'd0,   // unconfigured: holds state, outputs zero
    AS_ADD   = 2'd1,   // adder / subtractor (parallel, digit- or bit-serial)
    AS_SHREG = 2'd2,   // shift register with parallel load
    AS_ACC   = 2'd3    // accumulator, optionally shift-accumulate
  } as_mode_e;

  typedef enum logic [1:0] {
    NEG_ADD = 2'd0,    // a + b
    NEG_SUB = 2'd1,    // a - b
    NEG_PIN = 2'd2     // a - b when the cluster SUB pin is 1, else a + b
  } as_neg_e;

  typedef enum logic [1:0] {
    CIN_DEFAULT = 2'd0, // 0 for addition, 1 for subtraction (two's complement)
    CIN_CHAIN   = 2'd1, // carry out of the next lower module
    CIN_PIN     = 2'd2  // cluster CIN pin
  } as_cin_e;

  typedef enum logic [1:0] {
    SIN_ZERO  = 2'd0,  // shift in a zero
    SIN_CHAIN = 2'd1,  // neighbour module (upper for right, lower for left shifts)
    SIN_PIN   = 2'd2,  // cluster SIN pin
    SIN_SIGN  = 2'd3   // sign: own MSB (shift register) or extended sum sign (accumulator)
  } as_sin_e;

  typedef struct packed {
    logic     [1:0] rsvd;
    logic           shacc;    // accumulator: shift-accumulate instead of plain accumulate
    logic           oreg;     // adder: registered output (0: combinational)
    logic           sdir_l;   // shift direction: 1 left (towards MSB), 0 right
    as_sin_e        sin_src;
    as_cin_e        cin_src;
    logic     [1:0] dw_m1;    // digit width minus one for serial adders (0: bit-serial)
    logic           serial;   // adder: digit/bit-serial with registered carry
    as_neg_e        neg;
    as_mode_e       mode;
  } as_mod_cfg_t;

  typedef enum logic {EN_ALWAYS = 1'b0, EN_PIN = 1'b1} as_en_e;

  // Add-shift cluster configuration (3 x 32 bits)
  typedef struct packed {
    logic [26:0]       rsvd;
    as_en_e            en_src;
    logic [1:0]        cout_sel;   // which module drives the COUT pin
    logic [1:0]        sout_sel;   // which module drives the SOUT pin
    as_mod_cfg_t [3:0] mods;
  } as_cfg_t;

  // Memory cluster configuration
  typedef struct packed {
    logic [22:0] rsvd;
    logic        addr_bits;   // 1: address from 1-bit pins i1[7:0], 0: from 8-bit pin
    logic [3:0]  elem_on;     // per-element power enable
    logic [1:0]  ndeep_m1;    // elements stacked in depth, minus one
    logic [1:0]  nwide_m1;    // elements side by side in width, minus one
  } mem_cfg_t;

  // ---------------------------------------------------------------------
  // Array geometry and configuration address map
  // ---------------------------------------------------------------------
  typedef enum logic {CL_ADDSHIFT = 1'b0, CL_MEMORY = 1'b1} cluster_kind_e;

  // Column pattern of the array (repeats every 8 columns): AS AS MEM AS AS AS MEM AS
  function automatic cluster_kind_e col_kind(int unsigned c);
    return ((c % 8) == 2 || (c % 8) == 6) ? CL_MEMORY : CL_ADDSHIFT;
  endfunction

  localparam int unsigned TILE_WORDS   = 16;  // words per cluster tile
  localparam int unsigned TW_CLUSTER   = 0;   // cluster configuration, 3 words
  localparam int unsigned TW_CBOX_R    = 4;   // C-box on the channel right of the cluster, 4 words
  localparam int unsigned TW_CBOX_B    = 8;   // C-box on the channel below the cluster, 4 words
  localparam int unsigned SBOX_WORDS   = 8;   // words per switch box (5 used)

  function automatic int unsigned tile_base(int unsigned r, int unsigned c, int unsigned ncols);
    return (r * ncols + c) * TILE_WORDS;
  endfunction

  function automatic int unsigned sbox_base(int unsigned i, int unsigned j,
                                             int unsigned nrows, int unsigned ncols);
    return nrows * ncols * TILE_WORDS + (i * (ncols + 1) + j) * SBOX_WORDS;
  endfunction

  // Periphery I/O blocks, one word each, order: top, bottom, left, right
  function automatic int unsigned io_base(int unsigned nrows, int unsigned ncols);
    return nrows * ncols * TILE_WORDS + (nrows + 1) * (ncols + 1) * SBOX_WORDS;
  endfunction

  function automatic int unsigned cfg_words(int unsigned nrows, int unsigned ncols);
    return io_base(nrows, ncols) + 2 * (nrows + ncols);
  endfunction

  // Host write address: bit 15 set selects a memory-cluster write,
  // addr[14:10] memory cluster index, addr[9:8] lane, addr[7:0] word.
  localparam int unsigned CFG_AW = 16;

endpackage
