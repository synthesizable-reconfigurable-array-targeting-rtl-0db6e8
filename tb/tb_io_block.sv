// tb_io_block: self-checking test of the edge I/O block: each drive-enable
// bit must put exactly its track of io_in on the segment, and io_out must
// always show the segment.
module tb_io_block;
  import da_pkg::*;

  logic [N_TRK-1:0] cfg;
  seg_t io_in, seg_i, io_out, seg_o, exp;
  int checks = 0, failures = 0;

  io_block dut (.cfg, .io_in, .seg_i, .io_out, .seg_o);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      io_in = seg_t'({$urandom, $urandom});
      seg_i = seg_t'({$urandom, $urandom});
      cfg = (n < 12) ? (12'd1 << n) : 12'($urandom);
      #1;
      exp = '0;
      for (int t = 0; t < 6; t++) begin
        if (cfg[t])     exp.w8[t] = io_in.w8[t];
        if (cfg[6 + t]) exp.w1[t] = io_in.w1[t];
      end
      checks++;
      if (seg_o !== exp) begin failures++; $display("FAIL drive %0d", n); end
      checks++;
      if (io_out !== seg_i) begin failures++; $display("FAIL observe %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
