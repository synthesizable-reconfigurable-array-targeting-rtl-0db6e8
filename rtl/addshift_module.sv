// addshift_module: the 4-bit add-shift module, the arithmetic building block
// of the add-shift cluster.
//
// One 4-bit register q and one 4-bit adder, used in one of three modes
// selected by cfg.mode:
//
//   AS_ADD    y = a +/- b (+ carry in). Parallel when cfg.serial = 0, with the
//             carry taken from cfg.cin_src (0/1 default, the next lower
//             module for cascading, or the cluster CIN pin). Digit-serial when
//             cfg.serial = 1: the carry out of bit cfg.dw_m1 is kept in a
//             carry register and fed back as carry in on the next cycle, so a
//             digit of 1 to 4 bits is added per cycle (1 bit = bit-serial);
//             the ld pin marks the first digit of a word, which takes the
//             initial carry from cfg.cin_src instead. cfg.oreg registers y.
//   AS_SHREG  shift register. ld loads q from a; otherwise q shifts right
//             (towards bit 0) or left (cfg.sdir_l) by one bit per enabled
//             cycle. The bit shifted in comes from cfg.sin_src: zero, the
//             neighbour module (cascade), the cluster SIN pin, or q[3]
//             (arithmetic right shift). The serial output so is q[0] for right
//             and q[3] for left shifts.
//   AS_ACC    accumulator of the operand +/- b. ld clears q. With cfg.shacc = 0
//             q <= q +/- b. With cfg.shacc = 1 and a right shift,
//             q <= (q +/- b) >> 1, i.e. add then shift, the LSB-first DA
//             shift-accumulation; the bit entering bit 3 is bit 0 of the upper
//             neighbour's sum (cascade) or, in the top module, the sign of the
//             sign-extended sum (SIN_SIGN), so nothing overflows. With a left
//             shift, q <= (q << 1) +/- b, the MSB-first form.
//
// Subtraction inverts b and, in the lowest module of a chain, sets the carry
// in (cfg.cin_src = CIN_DEFAULT). cfg.neg selects add, subtract or subtract
// while the cluster SUB pin is high (used for the sign-bit cycle of DA).
// en gates every state update. AS_OFF holds all state and drives zeros.
//
// Timing: the adder path a/b/cin -> y/cout/shr_out is combinational, so a
// cascade of modules forms one ripple-carry adder within a cycle; q and the
// carry register update on the rising clock edge. Asynchronous active-low
// reset clears q and the carry register.
//
// The 4-bit width and the list of functions (parallel, digit-serial and
// bit-serial add/sub, left/right shift register for parallel-to-serial
// conversion, accumulator with optional shift) follow the architecture. The
// field encodings, the add-then-shift order of shift-accumulation, the
// meaning of ld and the reset are choices of this implementation.
//
// Because the adder is combinational, the mesh of the full array could route
// y, cout or shr_out back to a and b or to the cascade inputs. Lint tools
// therefore report combinational loops through the adder signals (sum, the
// carry vector c) once the array is flattened (UNOPTFLAT). Inside a module or
// a cluster nothing loops; only a configuration that feeds an adder's output
// back to its own input would close a loop, and no valid configuration does.
module addshift_module
  import da_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  as_mod_cfg_t cfg,
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  input  logic        ld,
  input  logic        en,
  input  logic        sub_pin,
  input  logic        cin_pin,
  input  logic        sin_pin,
  // cascade
  input  logic        c_chain,    // carry out of the next lower module
  input  logic        sr_chain,   // shr_out of the next upper module
  input  logic        sl_chain,   // shl_out of the next lower module
  output logic        cout,       // carry out of bit 3
  output logic        shr_out,    // bit handed down for right shifts
  output logic        shl_out,    // bit handed up for left shifts
  // results
  output logic [3:0]  y,
  output logic        so          // serial output
);

  logic [3:0] q;
  logic       creg;
  logic       neg;
  logic       cin_sel, cin;
  logic [3:0] bx, opa, sum;
  logic [4:0] c;
  logic       ext;
  logic       sin_l, sin_r;
  logic [3:0] q_next;
  logic       creg_next;

  assign neg = (cfg.neg == NEG_SUB) || ((cfg.neg == NEG_PIN) && sub_pin);
  assign bx  = neg ? ~b : b;

  always_comb begin
    unique case (cfg.cin_src)
      CIN_CHAIN: cin_sel = c_chain;
      CIN_PIN:   cin_sel = cin_pin;
      default:   cin_sel = neg;
    endcase
  end

  // digit-serial adders take the stored carry except on the first digit
  assign cin = (cfg.mode == AS_ADD && cfg.serial && !ld) ? creg : cin_sel;

  // first adder operand
  always_comb begin
    unique case (cfg.mode)
      AS_ACC: begin
        if (cfg.shacc && cfg.sdir_l) opa = {q[2:0], sin_l};
        else                         opa = q;
      end
      AS_ADD:  opa = a;
      default: opa = '0;
    endcase
  end

  // ripple-carry adder
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign sum[i] = opa[i] ^ bx[i] ^ c[i];
    assign c[i+1] = (opa[i] & bx[i]) | (opa[i] & c[i]) | (bx[i] & c[i]);
  end

  // bit 4 of the sign-extended sum
  assign ext = opa[3] ^ bx[3] ^ c[4];

  // bit entering the register on a left shift (bit 0) and a right shift (bit 3)
  always_comb begin
    unique case (cfg.sin_src)
      SIN_CHAIN: sin_l = sl_chain;
      SIN_PIN:   sin_l = sin_pin;
      default:   sin_l = 1'b0;
    endcase
  end

  always_comb begin
    unique case (cfg.sin_src)
      SIN_CHAIN: sin_r = sr_chain;
      SIN_PIN:   sin_r = sin_pin;
      SIN_SIGN:  sin_r = (cfg.mode == AS_ACC) ? ext : q[3];
      default:   sin_r = 1'b0;
    endcase
  end

  always_comb begin
    q_next    = q;
    creg_next = creg;
    unique case (cfg.mode)
      AS_ADD: begin
        q_next    = sum;
        creg_next = c[{1'b0, cfg.dw_m1} + 3'd1];
      end
      AS_SHREG: begin
        if (ld)              q_next = a;
        else if (cfg.sdir_l) q_next = {q[2:0], sin_l};
        else                 q_next = {sin_r, q[3:1]};
      end
      AS_ACC: begin
        if (ld)                              q_next = '0;
        else if (cfg.shacc && !cfg.sdir_l)   q_next = {sin_r, sum[3:1]};
        else                                 q_next = sum;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      creg <= 1'b0;
    end else if (en && cfg.mode != AS_OFF) begin
      q    <= q_next;
      creg <= creg_next;
    end
  end

  always_comb begin
    unique case (cfg.mode)
      AS_ADD:   y = cfg.oreg ? q : sum;
      AS_SHREG,
      AS_ACC:   y = q;
      default:  y = '0;
    endcase
  end

  assign cout    = (cfg.mode == AS_OFF) ? 1'b0 : c[4];
  assign shr_out = (cfg.mode == AS_ACC) ? sum[0] : q[0];
  assign shl_out = q[3];
  assign so      = (cfg.mode == AS_OFF) ? 1'b0 : (cfg.sdir_l ? q[3] : q[0]);

endmodule
