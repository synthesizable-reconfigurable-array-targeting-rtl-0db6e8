// tb_cbox: self-checking test of the connection box: every input pin taken
// from every track of its width, every output pin driven onto every track,
// one output pin driving several tracks at once, and an empty configuration
// that passes nothing.
module tb_cbox;
  import da_pkg::*;

  cbox_cfg_t cfg;
  seg_t      seg_i, seg_o;
  pin_out_t  pin_i;
  pin_in_t   pin_o;
  int checks = 0, failures = 0;

  cbox dut (.cfg, .seg_i, .pin_i, .pin_o, .seg_o);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    seg_i = seg_t'({$urandom, $urandom});
    pin_i = pin_out_t'({$urandom, $urandom});
    cfg = '0; #1;
    check("empty pins", 64'(pin_o), 0);
    check("empty seg", 64'(seg_o), 0);
    for (int t = 0; t < 6; t++) begin
      for (int p = 0; p < int'(N_IN8); p++) begin
        cfg = '0; cfg.in8[p][t] = 1'b1; seg_i = seg_t'({$urandom, $urandom}); #1;
        check("in8 pin", 64'(pin_o.i8[p]), 64'(seg_i.w8[t]));
        check("in8 only", 64'(pin_o) & ~(64'hff << (8 * p)), 0);
      end
      for (int p = 0; p < int'(N_IN1); p++) begin
        cfg = '0; cfg.in1[p][t] = 1'b1; seg_i = seg_t'({$urandom, $urandom}); #1;
        check("in1 pin", 64'(pin_o.i1[p]), 64'(seg_i.w1[t]));
      end
      for (int p = 0; p < int'(N_OUT8); p++) begin
        cfg = '0; cfg.out8[p][t] = 1'b1; pin_i = pin_out_t'({$urandom, $urandom}); #1;
        check("out8 track", 64'(seg_o.w8[t]), 64'(pin_i.o8[p]));
        check("out8 only", 64'(seg_o) & ~(64'hff << (8 * t)), 0);
      end
      for (int p = 0; p < int'(N_OUT1); p++) begin
        cfg = '0; cfg.out1[p][t] = 1'b1; pin_i = pin_out_t'({$urandom, $urandom}); #1;
        check("out1 track", 64'(seg_o.w1[t]), 64'(pin_i.o1[p]));
      end
    end
    // one output pin onto three tracks
    cfg = '0; cfg.out8[2][0] = 1; cfg.out8[2][3] = 1; cfg.out8[2][5] = 1;
    pin_i = pin_out_t'({$urandom, $urandom}); #1;
    check("fanout t0", 64'(seg_o.w8[0]), 64'(pin_i.o8[2]));
    check("fanout t3", 64'(seg_o.w8[3]), 64'(pin_i.o8[2]));
    check("fanout t5", 64'(seg_o.w8[5]), 64'(pin_i.o8[2]));
    check("fanout t1", 64'(seg_o.w8[1]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
