// tb_da_array: end-to-end test of the whole array at its default size
// (4 x 8 clusters). It maps two 8-point 1-D DCTs onto the array, configures
// it through the host port, streams input vectors through the edge I/O
// blocks and checks every output against an integer model.
//
//   1. Plain DA DCT: eight 12-bit parallel-to-serial shift registers, eight
//      256 x 8 lookup tables addressed by the eight serial bits, eight 16-bit
//      LSB-first shift-accumulators (subtracting in the sign-bit cycle).
//   2. Odd-even DCT: eight 12-bit adders/subtractors in front
//      (x[i] + x[7-i] and x[i] - x[7-i]), the same shift registers, 16 x 8
//      tables in 64 x 8 memories with three elements switched off, and the
//      same accumulators. The array is reconfigured at run time between 1
//      and 2.
//
// Placement is fixed (shift registers in columns 0-1, adders in 4-5,
// accumulators in 3 and 7 next to their memories in 2 and 6). Routing is
// found by a small maze router in this file: every net stays on one track
// index (the switch boxes use the same-index pattern), grows as a tree from
// its source through free segments, and the switch-box directions are set
// from source to sinks. Inputs come from, and outputs go to, whichever edge
// segment the router reaches first.
//
// Checks: each output against a bit-exact model of the DA recursion
// acc <- (acc +/- LUT*256) >>> 1 over 12 bits, the model against the plain
// dot product (error below one output LSB), the output latency of exactly
// 12 cycles after the load cycle, and configuration readback. Every
// mechanism used (load, shift, lookup, sign-cycle subtraction, carry across
// modules, input add/subtract, elements switched off, switch-box and
// connection-box connections, run-time reconfiguration) is counted and must
// occur.
module tb_da_array;
  import da_pkg::*;

  localparam int ROWS = 4, COLS = 8;
  localparam int NH = (ROWS + 1) * COLS;
  localparam int NSEG = NH + ROWS * (COLS + 1);
  localparam int NIO = 2 * (ROWS + COLS);
  localparam int NWORDS = int'(cfg_words(ROWS, COLS));
  localparam int B = 12;                     // input word length
  localparam int MAXNET = 128, MAXSINK = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  logic [15:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  seg_t [COLS-1:0] io_top_i, io_top_o, io_bot_i, io_bot_o;
  seg_t [ROWS-1:0] io_left_i, io_left_o, io_right_i, io_right_o;

  da_array dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .io_top_i, .io_top_o, .io_bot_i, .io_bot_o,
    .io_left_i, .io_left_o, .io_right_i, .io_right_o
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // -------------------------------------------------------------------
  // Shadow configuration
  // -------------------------------------------------------------------
  as_cfg_t               asc [ROWS][COLS];
  mem_cfg_t              mcf [ROWS][COLS];
  cbox_cfg_t             cbr [ROWS][COLS];
  cbox_cfg_t             cbb [ROWS][COLS];
  logic [SBOX_CFG_W-1:0] sbc [ROWS+1][COLS+1];
  logic [N_TRK-1:0]      ioc [NIO];

  task automatic clear_shadow();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        asc[r][c] = '0; mcf[r][c] = '0; cbr[r][c] = '0; cbb[r][c] = '0;
      end
    for (int i = 0; i <= ROWS; i++) for (int j = 0; j <= COLS; j++) sbc[i][j] = '0;
    for (int k = 0; k < NIO; k++) ioc[k] = '0;
  endtask

  function automatic logic [31:0] shadow_word(int w);
    int unsigned sb0, io0;
    sb0 = sbox_base(0, 0, ROWS, COLS);
    io0 = io_base(ROWS, COLS);
    if (w < int'(sb0)) begin
      int tile, off, r, c;
      logic [127:0] v;
      tile = w / int'(TILE_WORDS); off = w % int'(TILE_WORDS);
      r = tile / COLS; c = tile % COLS;
      if (off < 4) begin
        v = (col_kind(c) == CL_MEMORY) ? 128'(mcf[r][c]) : 128'(asc[r][c]);
        return v[32*off +: 32];
      end else if (off < 8) begin
        v = 128'(cbr[r][c]); return v[32*(off-4) +: 32];
      end else if (off < 12) begin
        v = 128'(cbb[r][c]); return v[32*(off-8) +: 32];
      end
      return '0;
    end else if (w < int'(io0)) begin
      int sb, off;
      logic [255:0] v;
      sb = (w - int'(sb0)) / int'(SBOX_WORDS); off = (w - int'(sb0)) % int'(SBOX_WORDS);
      v = 256'(sbc[sb / (COLS + 1)][sb % (COLS + 1)]);
      return v[32*off +: 32];
    end else begin
      return 32'(ioc[w - int'(io0)]);
    end
  endfunction

  task automatic host_write(input int addr, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 16'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  int n_cfg_loads = 0;

  task automatic load_config();
    for (int w = 0; w < NWORDS; w++) host_write(w, shadow_word(w));
    // read back a sample of the words
    for (int w = 0; w < NWORDS; w += 7) begin
      @(negedge clk);
      cfg_addr = 16'(w); #1;
      check("config readback", cfg_rdata, shadow_word(w));
    end
    n_cfg_loads++;
  endtask

  // -------------------------------------------------------------------
  // Mesh graph
  // -------------------------------------------------------------------
  function automatic int hid(int r, int c); return r * COLS + c; endfunction
  function automatic int vid(int r, int c); return NH + r * (COLS + 1) + c; endfunction

  // segment on side s of switch box (i, j), or -1
  function automatic int seg_at(int i, int j, int s);
    case (s)
      0: return (i > 0)    ? vid(i - 1, j) : -1;
      1: return (j < COLS) ? hid(i, j)     : -1;
      2: return (i < ROWS) ? vid(i, j)     : -1;
      default: return (j > 0) ? hid(i, j - 1) : -1;
    endcase
  endfunction

  // the two switch-box ends of a segment: (i, j, side)
  function automatic void seg_ends(int s, output int e [2][3]);
    if (s < NH) begin
      int r, c;
      r = s / COLS; c = s % COLS;
      e[0] = '{r, c, 1}; e[1] = '{r, c + 1, 3};
    end else begin
      int r, c;
      r = (s - NH) / (COLS + 1); c = (s - NH) % (COLS + 1);
      e[0] = '{r, c, 2}; e[1] = '{r + 1, c, 0};
    end
  endfunction

  function automatic int io_index(int s);
    if (s < NH) begin
      int r, c;
      r = s / COLS; c = s % COLS;
      if (r == 0) return c;
      if (r == ROWS) return COLS + c;
    end else begin
      int r, c;
      r = (s - NH) / (COLS + 1); c = (s - NH) % (COLS + 1);
      if (c == 0) return 2 * COLS + r;
      if (c == COLS) return 2 * COLS + ROWS + r;
    end
    return -1;
  endfunction

  // -------------------------------------------------------------------
  // Nets and router
  // -------------------------------------------------------------------
  typedef enum int {EP_PIN, EP_IO} ep_kind_e;
  typedef struct {
    ep_kind_e kind;
    int r, c, pin;     // cluster pin
  } ep_t;

  int  occ [NSEG][N_TRK];
  int  net_w [MAXNET];          // 8 or 1
  ep_t net_src [MAXNET];
  ep_t net_snk [MAXNET][MAXSINK];
  int  net_nsnk [MAXNET];
  int  net_sig [MAXNET];        // signal tag for I/O endpoints
  int  nnets;
  // results
  int  net_trk [MAXNET];
  int  net_src_seg [MAXNET];
  int  net_snk_seg [MAXNET][MAXSINK];

  function automatic int add_net(int w, ep_t src, int sig);
    net_w[nnets] = w; net_src[nnets] = src; net_nsnk[nnets] = 0; net_sig[nnets] = sig;
    return nnets++;
  endfunction

  function automatic void add_sink(int n, ep_t e);
    net_snk[n][net_nsnk[n]] = e;
    net_nsnk[n]++;
  endfunction

  function automatic ep_t pin(int r, int c, int p);
    ep_t e; e.kind = EP_PIN; e.r = r; e.c = c; e.pin = p; return e;
  endfunction
  function automatic ep_t io();
    ep_t e; e.kind = EP_IO; e.r = 0; e.c = 0; e.pin = 0; return e;
  endfunction

  // is segment s a place where endpoint e can attach?
  function automatic bit ep_ok(ep_t e, int s);
    if (e.kind == EP_IO) return io_index(s) >= 0;
    return (s == vid(e.r, e.c + 1)) || (s == hid(e.r + 1, e.c));
  endfunction

  function automatic void set_sbox(int i, int j, int t, int from_side, int to_side);
    int k;
    k = (from_side - to_side - 1 + 8) % 4;
    sbc[i][j][(t * 4 + to_side) * 3 + k] = 1'b1;
  endfunction

  // grow net n on track t; returns 1 on success (shadow updated), 0 otherwise
  function automatic bit route_on(int n, int t);
    int bfs_d [NSEG];
    int pseg [NSEG];
    int psb [NSEG][4];          // i, j, from side, to side
    bit in_tree [NSEG];
    int q [$];
    int src_seg;
    src_seg = -1;
    for (int s = 0; s < NSEG; s++) in_tree[s] = 0;
    for (int k = 0; k < net_nsnk[n]; k++) begin
      int found;
      found = -1;
      q.delete();
      for (int s = 0; s < NSEG; s++) begin
        bfs_d[s] = -1;
        if (k == 0 ? (occ[s][t] < 0 && ep_ok(net_src[n], s)) : in_tree[s]) begin
          bfs_d[s] = 0; pseg[s] = -1; q.push_back(s);
        end
      end
      while (q.size() > 0 && found < 0) begin
        int s, e [2][3];
        s = q.pop_front();
        if (ep_ok(net_snk[n][k], s)) begin found = s; break; end
        seg_ends(s, e);
        for (int x = 0; x < 2; x++)
          for (int side = 0; side < 4; side++) begin
            int ns;
            if (side == e[x][2]) continue;
            ns = seg_at(e[x][0], e[x][1], side);
            if (ns < 0 || bfs_d[ns] >= 0 || occ[ns][t] >= 0) continue;
            bfs_d[ns] = bfs_d[s] + 1; pseg[ns] = s;
            psb[ns] = '{e[x][0], e[x][1], e[x][2], side};
            q.push_back(ns);
          end
      end
      if (found < 0) return 0;
      net_snk_seg[n][k] = found;
      // commit the path
      for (int s = found; s >= 0; s = pseg[s]) begin
        if (!in_tree[s] && pseg[s] < 0) src_seg = s;
        if (pseg[s] >= 0 && !in_tree[s]) set_sbox(psb[s][0], psb[s][1], t, psb[s][2], psb[s][3]);
        if (in_tree[s]) break;
        in_tree[s] = 1;
        occ[s][t] = n;
      end
    end
    net_trk[n] = t;
    net_src_seg[n] = src_seg;
    return 1;
  endfunction

  // connect the endpoints of a routed net through C-boxes and I/O blocks
  function automatic void attach(int n);
    int t, s;
    t = net_trk[n];
    s = net_src_seg[n];
    if (net_src[n].kind == EP_IO) ioc[io_index(s)][t] = 1'b1;
    else begin
      int r, c, p;
      r = net_src[n].r; c = net_src[n].c; p = net_src[n].pin;
      if (s == vid(r, c + 1)) begin
        if (t < 6) cbr[r][c].out8[p][t] = 1'b1; else cbr[r][c].out1[p][t-6] = 1'b1;
      end else begin
        if (t < 6) cbb[r][c].out8[p][t] = 1'b1; else cbb[r][c].out1[p][t-6] = 1'b1;
      end
    end
    for (int k = 0; k < net_nsnk[n]; k++) begin
      ep_t e;
      e = net_snk[n][k];
      s = net_snk_seg[n][k];
      if (e.kind == EP_PIN) begin
        if (s == vid(e.r, e.c + 1)) begin
          if (t < 6) cbr[e.r][e.c].in8[e.pin][t] = 1'b1; else cbr[e.r][e.c].in1[e.pin][t-6] = 1'b1;
        end else begin
          if (t < 6) cbb[e.r][e.c].in8[e.pin][t] = 1'b1; else cbb[e.r][e.c].in1[e.pin][t-6] = 1'b1;
        end
      end
    end
  endfunction

  int order [MAXNET];

  // one attempt over the nets in 'order'; returns the failing net or -1
  function automatic int route_once();
    for (int s = 0; s < NSEG; s++) for (int t = 0; t < int'(N_TRK); t++) occ[s][t] = -1;
    for (int i = 0; i <= ROWS; i++) for (int j = 0; j <= COLS; j++) sbc[i][j] = '0;
    for (int x = 0; x < nnets; x++) begin
      int n;
      bit ok;
      logic [SBOX_CFG_W-1:0] sbk [ROWS+1][COLS+1];
      n = order[x];
      ok = 0;
      for (int t0 = 0; t0 < 6 && !ok; t0++) begin
        int t;
        t = (net_w[n] == 8) ? t0 : t0 + 6;
        sbk = sbc;
        ok = route_on(n, t);
        if (!ok) begin  // undo a partial tree
          sbc = sbk;
          for (int s = 0; s < NSEG; s++) if (occ[s][t] == n) occ[s][t] = -1;
        end
      end
      if (!ok) return n;
    end
    return -1;
  endfunction

  // route every net; a net that fails moves to the front and all are rerouted
  function automatic bit route_all();
    for (int n = 0; n < nnets; n++) order[n] = n;
    for (int attempt = 0; attempt < 300; attempt++) begin
      int bad, pos;
      bad = route_once();
      if (bad < 0) begin
        for (int n = 0; n < nnets; n++) attach(n);
        $display("routed %0d nets after %0d attempt(s)", nnets, attempt + 1);
        return 1;
      end
      pos = 0;
      for (int x = 0; x < nnets; x++) if (order[x] == bad) pos = x;
      for (int x = pos; x > 0; x--) order[x] = order[x - 1];
      order[0] = bad;
    end
    $display("routing failed");
    return 0;
  endfunction

  function automatic int count_sbox_bits();
    int n;
    n = 0;
    for (int i = 0; i <= ROWS; i++) for (int j = 0; j <= COLS; j++) n += $countones(sbc[i][j]);
    return n;
  endfunction

  // -------------------------------------------------------------------
  // I/O access by signal tag
  // -------------------------------------------------------------------
  // tags: 0..7 x lo byte, 8..15 x hi nibble, 16 LD, 17 SUB, 32..39 y lo, 40..47 y hi
  localparam int SIG_XLO = 0, SIG_XHI = 8, SIG_LD = 16, SIG_SUB = 17, SIG_YLO = 32, SIG_YHI = 40;

  task automatic drive_sig(int sig, logic [7:0] v);
    for (int n = 0; n < nnets; n++)
      if (net_sig[n] == sig && net_src[n].kind == EP_IO) begin
        int k, t;
        k = io_index(net_src_seg[n]); t = net_trk[n];
        if (k < COLS) begin
          if (t < 6) io_top_i[k].w8[t] = v; else io_top_i[k].w1[t-6] = v[0];
        end else if (k < 2 * COLS) begin
          if (t < 6) io_bot_i[k-COLS].w8[t] = v; else io_bot_i[k-COLS].w1[t-6] = v[0];
        end else if (k < 2 * COLS + ROWS) begin
          if (t < 6) io_left_i[k-2*COLS].w8[t] = v; else io_left_i[k-2*COLS].w1[t-6] = v[0];
        end else begin
          if (t < 6) io_right_i[k-2*COLS-ROWS].w8[t] = v; else io_right_i[k-2*COLS-ROWS].w1[t-6] = v[0];
        end
      end
  endtask

  function automatic logic [7:0] read_sig(int sig);
    for (int n = 0; n < nnets; n++)
      if (net_sig[n] == sig) begin
        int k, t;
        seg_t sv;
        k = io_index(net_snk_seg[n][0]); t = net_trk[n];
        if (k < COLS) sv = io_top_o[k];
        else if (k < 2 * COLS) sv = io_bot_o[k-COLS];
        else if (k < 2 * COLS + ROWS) sv = io_left_o[k-2*COLS];
        else sv = io_right_o[k-2*COLS-ROWS];
        return sv.w8[t];
      end
    return 'x;
  endfunction

  // -------------------------------------------------------------------
  // Placement
  // -------------------------------------------------------------------
  // shift register k at (k/2, k%2); memory u at (u/2, 2 or 6);
  // accumulator u right of its memory; adder k at (k/2, 4 + k%2)
  function automatic int sr_r(int k); return k / 2; endfunction
  function automatic int sr_c(int k); return k % 2; endfunction
  function automatic int mem_r(int u); return u / 2; endfunction
  function automatic int mem_c(int u); return (u % 2) ? 6 : 2; endfunction
  function automatic int acc_c(int u); return mem_c(u) + 1; endfunction
  function automatic int add_c(int k); return 4 + k % 2; endfunction

  function automatic as_mod_cfg_t mcfg(as_mode_e m, as_neg_e n, as_cin_e ci, as_sin_e si, logic shacc);
    as_mod_cfg_t c;
    c = '0; c.mode = m; c.neg = n; c.cin_src = ci; c.sin_src = si; c.shacc = shacc;
    return c;
  endfunction

  task automatic cfg_shreg(int r, int c);
    asc[r][c] = '0;
    asc[r][c].mods[0] = mcfg(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_CHAIN, 0);
    asc[r][c].mods[1] = mcfg(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_CHAIN, 0);
    asc[r][c].mods[2] = mcfg(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_SIGN, 0);
    asc[r][c].sout_sel = 2'd0;
  endtask

  task automatic cfg_acc(int r, int c);
    asc[r][c] = '0;
    for (int m = 0; m < 4; m++)
      asc[r][c].mods[m] = mcfg(AS_ACC, NEG_PIN, (m == 0) ? CIN_DEFAULT : CIN_CHAIN,
                               (m == 3) ? SIN_SIGN : SIN_CHAIN, 1);
  endtask

  task automatic cfg_adder(int r, int c, bit sub);
    asc[r][c] = '0;
    for (int m = 0; m < 3; m++)
      asc[r][c].mods[m] = mcfg(AS_ADD, sub ? NEG_SUB : NEG_ADD, (m == 0) ? CIN_DEFAULT : CIN_CHAIN,
                               SIN_ZERO, 0);
  endtask

  // -------------------------------------------------------------------
  // Coefficients and lookup tables
  // -------------------------------------------------------------------
  int coef [8][8];     // A[u][i] = round(30 * c(u) * cos((2i+1) u pi / 16))

  task automatic make_coefs();
    for (int u = 0; u < 8; u++)
      for (int i = 0; i < 8; i++) begin
        real cu, v;
        cu = (u == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
        v = 30.0 * cu * $cos((2.0 * i + 1.0) * u * 3.14159265358979 / 16.0);
        coef[u][i] = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
  endtask

  // lookup-table word for output u and address a, over the listed inputs
  function automatic int lut_word(int u, int a, bit oddeven);
    int s;
    s = 0;
    if (!oddeven) begin
      for (int i = 0; i < 8; i++) if (a[i]) s += coef[u][i];
    end else begin
      // even outputs use x[i]+x[7-i], odd outputs x[i]-x[7-i], i = 0..3
      for (int i = 0; i < 4; i++) if (a[i]) s += coef[u][i];
    end
    return s;
  endfunction

  // bit-exact model of the DA recursion over B bits, inputs v[k] (signed B-bit)
  function automatic int da_model(int u, int v [8], int nin, bit oddeven);
    int acc;
    acc = 0;
    for (int j = 0; j < B; j++) begin
      int a, l, s;
      a = 0;
      for (int k = 0; k < nin; k++) a |= ((v[k] >> j) & 1) << k;
      l = lut_word(u, a, oddeven);
      s = acc + ((j == B - 1) ? -l : l) * 256;
      acc = s >>> 1;
    end
    return acc;
  endfunction

  // -------------------------------------------------------------------
  // Mechanism counters
  // -------------------------------------------------------------------
  int n_load = 0, n_shift = 0, n_sign_sub = 0, n_lut_read = 0, n_carry = 0;
  int n_addsub = 0, n_elem_off = 0, n_sbox = 0, n_cbox = 0;

  always @(posedge clk) begin
    if (dut.g_row[0].g_col[2].g_mem.u_mem.rd_addr != 8'd0) n_lut_read++;
    if (dut.g_row[0].g_col[3].g_as.u_as.cout[1]) n_carry++;
  end

  // -------------------------------------------------------------------
  // Mapping of the two DCTs
  // -------------------------------------------------------------------
  task automatic build_nets(bit oddeven);
    nnets = 0;
    clear_shadow();
    for (int u = 0; u < 8; u++) begin
      // lookup table and accumulator
      mcf[mem_r(u)][mem_c(u)] = '0;
      mcf[mem_r(u)][mem_c(u)].addr_bits = 1'b1;
      if (!oddeven) begin
        mcf[mem_r(u)][mem_c(u)].ndeep_m1 = 2'd3;
        mcf[mem_r(u)][mem_c(u)].elem_on  = 4'b1111;
      end else begin
        mcf[mem_r(u)][mem_c(u)].elem_on  = 4'b0001;
      end
      cfg_acc(mem_r(u), acc_c(u));
    end
    for (int k = 0; k < 8; k++) cfg_shreg(sr_r(k), sr_c(k));
    if (oddeven)
      for (int k = 0; k < 8; k++) cfg_adder(sr_r(k), add_c(k), k >= 4);

    // address nets first: serial bit of shift register k to bit k of each memory
    for (int k = 0; k < 8; k++) begin
      int n;
      n = add_net(1, pin(sr_r(k), sr_c(k), AS_O1_SOUT), -1);
      for (int u = 0; u < 8; u++) begin
        if (!oddeven) add_sink(n, pin(mem_r(u), mem_c(u), k));
        // odd-even: sums (k < 4) address the even outputs, differences the odd ones
        else if ((k < 4) == (u % 2 == 0)) add_sink(n, pin(mem_r(u), mem_c(u), k % 4));
      end
    end
    // lookup-table data into the upper byte of each accumulator
    for (int u = 0; u < 8; u++) begin
      int n;
      n = add_net(8, pin(mem_r(u), mem_c(u), 0), -1);
      add_sink(n, pin(mem_r(u), acc_c(u), AS_I8_B1));
    end
    // inputs
    // each input enters once per cluster that uses it (the host drives every copy)
    for (int i = 0; i < 8; i++) begin
      if (!oddeven) begin
        add_sink(add_net(8, io(), SIG_XLO + i), pin(sr_r(i), sr_c(i), AS_I8_A0));
        add_sink(add_net(8, io(), SIG_XHI + i), pin(sr_r(i), sr_c(i), AS_I8_A1));
      end else begin
        // x[i] feeds adders i and i+4 as A (i < 4); x[7-j] feeds adders j, j+4 as B
        int j;
        j = (i < 4) ? i : 7 - i;
        for (int d = 0; d <= 4; d += 4) begin
          add_sink(add_net(8, io(), SIG_XLO + i), pin(sr_r(j + d), add_c(j + d), (i < 4) ? AS_I8_A0 : AS_I8_B0));
          add_sink(add_net(8, io(), SIG_XHI + i), pin(sr_r(j + d), add_c(j + d), (i < 4) ? AS_I8_A1 : AS_I8_B1));
        end
      end
    end
    if (oddeven)
      for (int k = 0; k < 8; k++) begin
        int n;
        n = add_net(8, pin(sr_r(k), add_c(k), AS_O8_Y0), -1);
        add_sink(n, pin(sr_r(k), sr_c(k), AS_I8_A0));
        n = add_net(8, pin(sr_r(k), add_c(k), AS_O8_Y1), -1);
        add_sink(n, pin(sr_r(k), sr_c(k), AS_I8_A1));
      end
    // outputs
    for (int u = 0; u < 8; u++) begin
      int n;
      n = add_net(8, pin(mem_r(u), acc_c(u), AS_O8_Y0), SIG_YLO + u);
      add_sink(n, io());
      n = add_net(8, pin(mem_r(u), acc_c(u), AS_O8_Y1), SIG_YHI + u);
      add_sink(n, io());
    end
    // control: load to every shift register and accumulator, subtract to every accumulator
    for (int r = 0; r < ROWS; r++) begin
      add_sink(add_net(1, io(), SIG_LD), pin(r, 0, AS_I1_LD));
      add_sink(add_net(1, io(), SIG_LD), pin(r, 1, AS_I1_LD));
      add_sink(add_net(1, io(), SIG_LD), pin(r, 3, AS_I1_LD));
      add_sink(add_net(1, io(), SIG_LD), pin(r, 7, AS_I1_LD));
      add_sink(add_net(1, io(), SIG_SUB), pin(r, 3, AS_I1_SUB));
      add_sink(add_net(1, io(), SIG_SUB), pin(r, 7, AS_I1_SUB));
    end
  endtask

  task automatic write_luts(bit oddeven);
    for (int u = 0; u < 8; u++)
      for (int a = 0; a < (oddeven ? 16 : 256); a++)
        host_write({1'b1, 5'(u), 2'd0, 8'(a)}, 32'(lut_word(u, a, oddeven) & 255));
  endtask

  // run one DCT: x are signed B-bit (odd-even: B-1 bit) inputs
  task automatic run_dct(int x [8], bit oddeven, string tag);
    int v [8];
    int got;
    for (int i = 0; i < 8; i++) begin
      drive_sig(SIG_XLO + i, 8'(x[i]));
      drive_sig(SIG_XHI + i, 8'((x[i] >> 8) & 15));
    end
    // load cycle
    @(negedge clk);
    drive_sig(SIG_LD, 8'd1); drive_sig(SIG_SUB, 8'd0);
    n_load++;
    @(negedge clk);
    drive_sig(SIG_LD, 8'd0);
    for (int j = 0; j < B; j++) begin
      drive_sig(SIG_SUB, 8'(j == B - 1));
      if (j == B - 1) n_sign_sub++; else n_shift++;
      @(negedge clk);
    end
    drive_sig(SIG_SUB, 8'd0);
    // model
    if (!oddeven) for (int i = 0; i < 8; i++) v[i] = x[i];
    else begin
      for (int i = 0; i < 4; i++) begin
        v[i]     = x[i] + x[7 - i];
        v[i + 4] = x[i] - x[7 - i];
      end
      n_addsub++;
    end
    for (int u = 0; u < 8; u++) begin
      int exp, dot, vin [8];
      if (!oddeven) begin
        vin = v;
        exp = da_model(u, vin, 8, 0);
      end else begin
        for (int i = 0; i < 4; i++) vin[i] = (u % 2 == 0) ? v[i] : v[i + 4];
        for (int i = 4; i < 8; i++) vin[i] = 0;
        exp = da_model(u, vin, 4, 1);
      end
      got = int'({read_sig(SIG_YHI + u), read_sig(SIG_YLO + u)});
      got = (got >= 32768) ? got - 65536 : got;
      check($sformatf("%s X[%0d]", tag, u), got, exp);
      // the model against the plain dot product: y = sum A*x / 16 within one LSB
      dot = 0;
      for (int i = 0; i < 8; i++) dot += coef[u][i] * x[i];
      checks++;
      if (!(exp * 16 <= dot && dot < exp * 16 + 16)) begin
        failures++;
        $display("FAIL model vs dot product u=%0d: %0d vs %0d", u, exp, dot);
      end
    end
  endtask

  initial begin
    int x [8];
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    io_top_i = '0; io_bot_i = '0; io_left_i = '0; io_right_i = '0;
    make_coefs();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int pass = 0; pass < 2; pass++) begin
      bit oe;
      oe = (pass == 1);
      build_nets(oe);
      if (!route_all()) begin
        failures++;
      end else begin
        n_sbox += count_sbox_bits();
        for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
          n_cbox += $countones(cbr[r][c]) + $countones(cbb[r][c]);
        if (oe) n_elem_off++;
        io_top_i = '0; io_bot_i = '0; io_left_i = '0; io_right_i = '0;
        load_config();
        write_luts(oe);
        // corner cases, then random vectors
        for (int t = 0; t < 12; t++) begin
          int lim;
          lim = oe ? 1023 : 2047;
          for (int i = 0; i < 8; i++) begin
            if (t == 0)      x[i] = lim;
            else if (t == 1) x[i] = -lim - 1;
            else if (t == 2) x[i] = (i % 2) ? lim : -lim - 1;
            else             x[i] = $urandom_range(0, 2 * lim + 1) - lim - 1;
          end
          run_dct(x, oe, oe ? "odd-even" : "plain");
        end
      end
    end

    // every mechanism must have happened
    check("cfg loads (run-time reconfiguration)", n_cfg_loads >= 2, 1);
    check("shift-register loads", n_load > 0, 1);
    check("serial shifts", n_shift > 0, 1);
    check("sign-cycle subtractions", n_sign_sub > 0, 1);
    check("lookup-table reads", n_lut_read > 0, 1);
    check("carry across modules", n_carry > 0, 1);
    check("input add/subtract", n_addsub > 0, 1);
    check("memory elements switched off", n_elem_off > 0, 1);
    check("switch-box connections", n_sbox > 0, 1);
    check("connection-box connections", n_cbox > 0, 1);
    $display("mechanisms: cfg_loads=%0d loads=%0d shifts=%0d sign_sub=%0d lut_reads=%0d carry=%0d addsub=%0d elem_off=%0d sbox_bits=%0d cbox_bits=%0d",
             n_cfg_loads, n_load, n_shift, n_sign_sub, n_lut_read, n_carry, n_addsub, n_elem_off, n_sbox, n_cbox);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
