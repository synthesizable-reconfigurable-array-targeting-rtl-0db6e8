// tb_addshift_module: self-checking test of one 4-bit add-shift module in
// every mode: parallel add/subtract, bit-serial and 3-bit digit-serial
// addition of 12-bit words, right and left shift registers with parallel
// load, plain accumulation with a pin-controlled subtract, and right
// (LSB-first) shift-accumulation. Expected values come from integer models
// in this file. Inputs change on the falling edge; registered results are
// checked after the rising edge.
module tb_addshift_module;
  import da_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  as_mod_cfg_t cfg;
  logic [3:0] a, b, y;
  logic ld, en, sub_pin, cin_pin, sin_pin;
  logic cout, shr_out, shl_out, so;
  int checks = 0, failures = 0;

  addshift_module dut (
    .clk, .rst_n, .cfg, .a, .b, .ld, .en, .sub_pin, .cin_pin, .sin_pin,
    .c_chain(1'b0), .sr_chain(1'b0), .sl_chain(1'b0),
    .cout, .shr_out, .shl_out, .y, .so
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic as_mod_cfg_t mk(as_mode_e m, as_neg_e n, as_cin_e ci, as_sin_e si,
                                     logic ser, logic [1:0] dwm1, logic left,
                                     logic oreg, logic shacc);
    as_mod_cfg_t c;
    c = '0;
    c.mode = m; c.neg = n; c.cin_src = ci; c.sin_src = si; c.serial = ser;
    c.dw_m1 = dwm1; c.sdir_l = left; c.oreg = oreg; c.shacc = shacc;
    return c;
  endfunction

  initial begin
    int av, bv, exp, acc;
    logic [11:0] xa, xb, s;
    logic [3:0] sr;
    cfg = '0; a = '0; b = '0; ld = 0; en = 1; sub_pin = 0; cin_pin = 0; sin_pin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- parallel add / subtract (combinational) ----
    for (int i = 0; i < 200; i++) begin
      av = $urandom_range(0, 15); bv = $urandom_range(0, 15);
      cfg = mk(AS_ADD, (i % 2) ? NEG_SUB : NEG_ADD, CIN_DEFAULT, SIN_ZERO, 0, 0, 0, 0, 0);
      a = 4'(av); b = 4'(bv);
      #1;
      exp = (i % 2) ? (av + (15 - bv) + 1) : (av + bv);
      check("par add y", int'(y), exp & 15);
      check("par add cout", int'(cout), (exp >> 4) & 1);
    end
    // carry from the pin
    cfg = mk(AS_ADD, NEG_ADD, CIN_PIN, SIN_ZERO, 0, 0, 0, 0, 0);
    a = 4'd7; b = 4'd8; cin_pin = 1; #1;
    check("cin pin y", int'(y), 0); check("cin pin cout", int'(cout), 1);
    cin_pin = 0;

    // ---- registered output ----
    @(negedge clk);
    cfg = mk(AS_ADD, NEG_ADD, CIN_DEFAULT, SIN_ZERO, 0, 0, 0, 1, 0);
    a = 4'd3; b = 4'd4;
    @(posedge clk); #1;
    check("oreg y", int'(y), 7);
    @(negedge clk); a = 4'd1; #1;
    check("oreg holds", int'(y), 7);

    // ---- bit-serial (dw=1) and digit-serial (dw=3) addition of 12-bit words ----
    for (int dw = 1; dw <= 3; dw += 2) begin
      for (int w = 0; w < 20; w++) begin
        xa = 12'($urandom); xb = 12'($urandom);
        s  = '0;
        for (int d = 0; d < 12 / dw; d++) begin
          @(negedge clk);
          cfg = mk(AS_ADD, (w % 2) ? NEG_SUB : NEG_ADD, CIN_DEFAULT, SIN_ZERO, 1, 2'(dw - 1), 0, 0, 0);
          ld = (d == 0);
          a = 4'((xa >> (d * dw)) & ((1 << dw) - 1));
          b = 4'((xb >> (d * dw)) & ((1 << dw) - 1));
          b = 4'((xb >> (d * dw)) & ((1 << dw) - 1));
          #1;
          for (int k = 0; k < dw; k++) s[d * dw + k] = y[k];
        end
        ld = 0;
        exp = (w % 2) ? int'(12'(xa - xb)) : int'(12'(xa + xb));
        // subtract mode inverts all four bits of b: only the low dw bits belong to the digit,
        // and the carry is taken from bit dw, so the higher bits do not matter.
        check($sformatf("serial dw=%0d", dw), int'(s), exp);
      end
    end

    // ---- shift register, right, serial in from pin ----
    @(negedge clk);
    cfg = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_PIN, 0, 0, 0, 0, 0);
    a = 4'b1011; ld = 1;
    @(negedge clk); ld = 0;
    check("shreg load", int'(y), 11);
    sr = 4'b1011;
    for (int i = 0; i < 8; i++) begin
      sin_pin = 1'($urandom);
      check("shreg right so", int'(so), int'(sr[0]));
      sr = {sin_pin, sr[3:1]};
      @(negedge clk);
      check("shreg right q", int'(y), int'(sr));
    end
    // arithmetic right shift
    cfg = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_SIGN, 0, 0, 0, 0, 0);
    a = 4'b1000; ld = 1; @(negedge clk); ld = 0;
    @(negedge clk); check("shreg asr", int'(y), 4'b1100);
    // left shift
    cfg = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_PIN, 0, 0, 1, 0, 0);
    a = 4'b0110; ld = 1; @(negedge clk); ld = 0;
    sr = 4'b0110;
    for (int i = 0; i < 6; i++) begin
      sin_pin = 1'($urandom);
      check("shreg left so", int'(so), int'(sr[3]));
      sr = {sr[2:0], sin_pin};
      @(negedge clk);
      check("shreg left q", int'(y), int'(sr));
    end
    // enable low holds
    en = 0; sin_pin = 1; @(negedge clk);
    check("shreg hold", int'(y), int'(sr));
    en = 1;

    // ---- plain accumulator with pin-controlled subtraction ----
    cfg = mk(AS_ACC, NEG_PIN, CIN_DEFAULT, SIN_ZERO, 0, 0, 0, 0, 0);
    ld = 1; @(negedge clk); ld = 0;
    check("acc clear", int'(y), 0);
    acc = 0;
    for (int i = 0; i < 30; i++) begin
      bv = $urandom_range(0, 15); sub_pin = 1'($urandom);
      b = 4'(bv);
      acc = sub_pin ? (acc - bv) : (acc + bv);
      @(negedge clk);
      check("acc", int'(y), acc & 15);
    end
    sub_pin = 0;

    // ---- right shift-accumulate, sign-extended: q <= (q + b) >>> 1 ----
    cfg = mk(AS_ACC, NEG_PIN, CIN_DEFAULT, SIN_SIGN, 0, 0, 0, 0, 1);
    ld = 1; @(negedge clk); ld = 0;
    acc = 0;
    for (int i = 0; i < 30; i++) begin
      bv = $urandom_range(0, 15); sub_pin = 1'($urandom);
      b = 4'(bv);
      begin
        int sb, sq;
        sq = (acc >= 8) ? acc - 16 : acc;          // signed 4-bit
        sb = (bv >= 8) ? bv - 16 : bv;
        sq = sub_pin ? (sq - sb) : (sq + sb);      // 5-bit exact
        acc = (sq >>> 1) & 15;
      end
      @(negedge clk);
      check("shacc right", int'(y), acc);
    end
    sub_pin = 0;

    // ---- left shift-accumulate: q <= (q << 1) + b ----
    cfg = mk(AS_ACC, NEG_ADD, CIN_DEFAULT, SIN_ZERO, 0, 0, 1, 0, 1);
    ld = 1; @(negedge clk); ld = 0;
    acc = 0;
    for (int i = 0; i < 10; i++) begin
      bv = $urandom_range(0, 15); b = 4'(bv);
      acc = ((acc << 1) + bv) & 15;
      @(negedge clk);
      check("shacc left", int'(y), acc);
    end

    // ---- unconfigured module drives zero ----
    cfg = '0; #1;
    check("off y", int'(y), 0);
    check("off so", int'(so), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
