// tb_addshift_cluster: self-checking test of the add-shift cluster with its
// four modules cascaded: a 16-bit parallel adder/subtractor, a 12-bit
// parallel-to-serial shift register on three modules (LSB first on SOUT),
// and a 16-bit LSB-first shift-accumulator fed with 8-bit values on the
// upper byte, with the SUB pin high on the last (sign) cycle and the EN pin
// gating it. Expected values come from integer models in this file.
module tb_addshift_cluster;
  import da_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  as_cfg_t  cfg;
  pin_in_t  pin_i;
  pin_out_t pin_o;
  int checks = 0, failures = 0;

  addshift_cluster dut (.clk, .rst_n, .cfg, .pin_i, .pin_o);

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
                                     logic left, logic shacc);
    as_mod_cfg_t c;
    c = '0;
    c.mode = m; c.neg = n; c.cin_src = ci; c.sin_src = si; c.sdir_l = left; c.shacc = shacc;
    return c;
  endfunction

  function automatic logic [15:0] yv();
    return {pin_o.o8[AS_O8_Y1], pin_o.o8[AS_O8_Y0]};
  endfunction

  initial begin
    logic [15:0] av, bv;
    logic [16:0] exp;
    logic [11:0] x;
    int acc, lut;
    cfg = '0; pin_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- 16-bit adder / subtractor, carry rippling through the cascade ----
    for (int i = 0; i < 200; i++) begin
      logic sub;
      sub = 1'($urandom);
      cfg = '0;
      for (int m = 0; m < 4; m++)
        cfg.mods[m] = mk(AS_ADD, NEG_PIN, (m == 0) ? CIN_DEFAULT : CIN_CHAIN, SIN_ZERO, 0, 0);
      cfg.cout_sel = 2'd3;
      av = 16'($urandom); bv = 16'($urandom);
      pin_i.i8[AS_I8_A0] = av[7:0];  pin_i.i8[AS_I8_A1] = av[15:8];
      pin_i.i8[AS_I8_B0] = bv[7:0];  pin_i.i8[AS_I8_B1] = bv[15:8];
      pin_i.i1[AS_I1_SUB] = sub;
      #1;
      exp = sub ? ({1'b0, av} + {1'b0, ~bv} + 17'd1) : ({1'b0, av} + {1'b0, bv});
      check("add16 y", int'(yv()), int'(exp[15:0]));
      check("add16 cout", int'(pin_o.o1[AS_O1_COUT]), int'(exp[16]));
    end
    pin_i = '0;

    // ---- 12-bit shift register on modules 0..2, LSB first on SOUT ----
    @(negedge clk);
    cfg = '0;
    cfg.mods[0] = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_CHAIN, 0, 0);
    cfg.mods[1] = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_CHAIN, 0, 0);
    cfg.mods[2] = mk(AS_SHREG, NEG_ADD, CIN_DEFAULT, SIN_ZERO,  0, 0);
    cfg.sout_sel = 2'd0;
    for (int w = 0; w < 10; w++) begin
      x = 12'($urandom);
      pin_i.i8[AS_I8_A0] = x[7:0]; pin_i.i8[AS_I8_A1] = {4'h0, x[11:8]};
      pin_i.i1[AS_I1_LD] = 1'b1;
      @(negedge clk);
      pin_i.i1[AS_I1_LD] = 1'b0;
      check("sr12 load", int'(yv()), int'(x));
      for (int j = 0; j < 12; j++) begin
        check("sr12 bit", int'(pin_o.o1[AS_O1_SOUT]), int'(x[j]));
        @(negedge clk);
      end
    end
    pin_i = '0;

    // ---- 16-bit shift-accumulator, 8-bit operand on the upper byte ----
    cfg = '0;
    for (int m = 0; m < 4; m++)
      cfg.mods[m] = mk(AS_ACC, NEG_PIN, (m == 0) ? CIN_DEFAULT : CIN_CHAIN,
                       (m == 3) ? SIN_SIGN : SIN_CHAIN, 0, 1);
    cfg.en_src = EN_PIN;
    for (int w = 0; w < 10; w++) begin
      pin_i.i1[AS_I1_EN] = 1'b1;
      pin_i.i1[AS_I1_LD] = 1'b1;
      @(negedge clk);
      pin_i.i1[AS_I1_LD] = 1'b0;
      check("acc16 clear", int'(yv()), 0);
      acc = 0;
      for (int j = 0; j < 12; j++) begin
        lut = $urandom_range(0, 255);
        pin_i.i8[AS_I8_B1] = 8'(lut);
        pin_i.i1[AS_I1_SUB] = (j == 11);
        // one stalled cycle in the middle of each word
        if (j == 5) begin
          pin_i.i1[AS_I1_EN] = 1'b0;
          @(negedge clk);
          check("acc16 stall", int'(yv()), acc & 16'hffff);
          pin_i.i1[AS_I1_EN] = 1'b1;
        end
        begin
          int sl, sa;
          sl = (lut >= 128) ? lut - 256 : lut;
          sa = (acc >= 32768) ? acc - 65536 : acc;
          sa = (j == 11) ? sa - sl * 256 : sa + sl * 256;
          acc = (sa >>> 1) & 16'hffff;
        end
        @(negedge clk);
        check("acc16 step", int'(yv()), acc);
      end
      pin_i.i1[AS_I1_SUB] = 1'b0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
