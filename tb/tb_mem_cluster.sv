// tb_mem_cluster: self-checking test of the memory cluster in every geometry
// of the table (64 x 8/16/24/32, 128 x 8/16, 192 x 8, 256 x 8). For each, the
// whole logical memory is written through the configuration port, then every
// address 0..255 is read on both address sources; lanes beyond the width and
// addresses beyond the depth must read zero. A plain two-dimensional array is
// the reference. Also checks that switching one element off blanks exactly
// its quarter of a 256 x 8 memory.
module tb_mem_cluster;
  import da_pkg::*;

  logic clk = 1'b0;
  mem_cfg_t cfg;
  logic wr_en;
  logic [7:0] wr_addr, wr_data, rd_addr8, rd_addr_bits;
  logic [1:0] wr_lane;
  logic [3:0][7:0] rd_lane;
  logic [7:0] model [256][4];
  int checks = 0, failures = 0;

  mem_cluster dut (.clk, .cfg, .wr_en, .wr_addr, .wr_lane, .wr_data, .rd_addr8, .rd_addr_bits, .rd_lane);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // geometries of the table: {words, lanes}
  int geo_depth [8] = '{64, 64, 64, 64, 128, 128, 192, 256};
  int geo_lanes [8] = '{1, 2, 3, 4, 1, 2, 1, 1};

  initial begin
    cfg = '0; wr_en = 0; wr_addr = 0; wr_lane = 0; wr_data = 0; rd_addr8 = 0; rd_addr_bits = 0;
    for (int g = 0; g < 8; g++) begin
      int depth, lanes;
      depth = geo_depth[g]; lanes = geo_lanes[g];
      @(negedge clk);
      cfg = '0;
      cfg.nwide_m1 = 2'(lanes - 1);
      cfg.ndeep_m1 = 2'(depth / 64 - 1);
      cfg.elem_on  = 4'b1111;
      cfg.addr_bits = g[0];
      for (int a = 0; a < 256; a++) for (int l = 0; l < 4; l++) model[a][l] = 8'h00;
      for (int a = 0; a < depth; a++)
        for (int l = 0; l < lanes; l++) begin
          wr_en = 1; wr_addr = 8'(a); wr_lane = 2'(l); wr_data = 8'($urandom);
          model[a][l] = wr_data;
          @(negedge clk);
        end
      wr_en = 0;
      for (int a = 0; a < 256; a++) begin
        if (g[0]) begin rd_addr_bits = 8'(a); rd_addr8 = 8'($urandom); end
        else      begin rd_addr8 = 8'(a); rd_addr_bits = 8'($urandom); end
        #1;
        for (int l = 0; l < 4; l++)
          check($sformatf("geo %0dx%0d addr %0d lane %0d", depth, 8 * lanes, a, l),
                int'(rd_lane[l]), int'(model[a][l]));
      end
    end
    // 256 x 8 with element 1 switched off: words 64..127 read zero
    cfg.elem_on = 4'b1101; cfg.addr_bits = 0;
    for (int a = 0; a < 256; a++) begin
      rd_addr8 = 8'(a); #1;
      check("element off", int'(rd_lane[0]), (a >= 64 && a < 128) ? 0 : int'(model[a][0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
