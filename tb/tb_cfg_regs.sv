// tb_cfg_regs: self-checking test of the configuration registers: reset to
// zero, word writes with readback, writes to unrelated words leaving others
// alone, and lookup-table writes decoded to the right memory cluster with
// word, lane and data, without touching any configuration word.
module tb_cfg_regs;
  localparam int unsigned NW = 64, NM = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  logic [15:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic [NW-1:0][31:0] cfg_q;
  logic [NM-1:0] mem_we;
  logic [7:0] mem_waddr, mem_wdata;
  logic [1:0] mem_wlane;
  logic [31:0] model [NW];
  int checks = 0, failures = 0;

  cfg_regs #(.NWORDS(NW), .NMEM(NM)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg_q,
    .mem_we, .mem_waddr, .mem_wlane, .mem_wdata
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    #1 rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int w = 0; w < int'(NW); w++) begin
      model[w] = 0;
      check("reset", cfg_q[w], 0);
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      cfg_we = 1;
      if (n % 3 == 0) begin
        int m, l, a, d;
        m = $urandom_range(0, NM - 1); l = $urandom_range(0, 3); a = $urandom_range(0, 255);
        d = $urandom;
        cfg_addr = {1'b1, 5'(m), 2'(l), 8'(a)}; cfg_wdata = d;
        #1;
        check("mem_we", mem_we, 1 << m);
        check("mem_waddr", mem_waddr, a);
        check("mem_wlane", mem_wlane, l);
        check("mem_wdata", mem_wdata, d & 255);
      end else begin
        int w;
        w = $urandom_range(0, NW - 1);
        cfg_addr = 16'(w); cfg_wdata = $urandom; model[w] = cfg_wdata;
        #1;
        check("no mem_we", mem_we, 0);
      end
      @(negedge clk);
      cfg_we = 0;
      for (int w = 0; w < int'(NW); w++) check("word", cfg_q[w], model[w]);
      cfg_addr = 16'($urandom_range(0, NW - 1)); #1;
      check("readback", cfg_rdata, model[cfg_addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
