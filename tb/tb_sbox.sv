// tb_sbox: self-checking test of the switch box. Each of the 144 switches is
// closed on its own and must copy exactly one track from one side to the
// same track of one other side; then random multi-switch settings are
// compared with a model that ORs, per output side, the enabled tracks of the
// three other sides.
module tb_sbox;
  import da_pkg::*;

  logic [SBOX_CFG_W-1:0] cfg;
  seg_t [3:0] seg_i, seg_o, exp;
  int checks = 0, failures = 0;

  sbox dut (.cfg, .seg_i, .seg_o);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: switch (t, o, k) connects input side (o+1+k) mod 4 to output side o
  function automatic seg_t [3:0] model(logic [SBOX_CFG_W-1:0] c, seg_t [3:0] si);
    seg_t [3:0] r;
    r = '0;
    for (int o = 0; o < 4; o++)
      for (int s = 0; s < 4; s++) begin
        int k;
        if (s == o) continue;
        k = (s - o + 3) % 4;            // slot of input side s for output side o
        for (int t = 0; t < 6; t++) begin
          if (c[(t * 4 + o) * 3 + k])       r[o].w8[t] = r[o].w8[t] | si[s].w8[t];
          if (c[((t + 6) * 4 + o) * 3 + k]) r[o].w1[t] = r[o].w1[t] | si[s].w1[t];
        end
      end
    return r;
  endfunction

  initial begin
    for (int b = 0; b < int'(SBOX_CFG_W); b++) begin
      int t, o, k, s;
      t = b / 12; o = (b / 3) % 4; k = b % 3; s = (o + 1 + k) % 4;
      for (int i = 0; i < 4; i++) seg_i[i] = seg_t'({$urandom, $urandom});
      cfg = '0; cfg[b] = 1'b1;
      #1;
      exp = '0;
      if (t < 6) exp[o].w8[t] = seg_i[s].w8[t];
      else       exp[o].w1[t - 6] = seg_i[s].w1[t - 6];
      checks++;
      if (seg_o !== exp) begin
        failures++;
        $display("FAIL single switch %0d", b);
      end
    end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) seg_i[i] = seg_t'({$urandom, $urandom});
      for (int w = 0; w < int'(SBOX_CFG_W); w++) cfg[w] = ($urandom_range(0, 9) == 0);
      #1;
      checks++;
      if (seg_o !== model(cfg, seg_i)) begin
        failures++;
        $display("FAIL random config %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
