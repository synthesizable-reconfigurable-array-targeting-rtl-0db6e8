// tb_mem_element: self-checking test of the 64 x 8 dual-port memory element:
// writes on the configuration port, asynchronous reads on the operation
// port, reads while writing elsewhere, and the power switch (writes ignored
// and zero output while off).
module tb_mem_element;
  logic clk = 1'b0;
  logic on, wr_en;
  logic [5:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;
  logic [7:0] model [64];
  int checks = 0, failures = 0;

  mem_element dut (.clk, .on, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    on = 1; wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      wr_en = 1; wr_addr = 6'(i); wr_data = 8'($urandom); model[i] = wr_data;
      rd_addr = 6'($urandom_range(0, i > 0 ? i - 1 : 0));
      @(negedge clk);
      if (i > 0) check("read during write", int'(rd_data), int'(model[rd_addr]));
    end
    wr_en = 0;
    for (int i = 0; i < 64; i++) begin
      rd_addr = 6'(i); #1;
      check("read", int'(rd_data), int'(model[i]));
    end
    // switched off: reads zero, ignores writes
    on = 0; #1;
    check("off reads zero", int'(rd_data), 0);
    wr_en = 1; wr_addr = 6'd5; wr_data = ~model[5];
    @(negedge clk);
    wr_en = 0; on = 1; rd_addr = 6'd5; #1;
    check("off ignores write", int'(rd_data), int'(model[5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
