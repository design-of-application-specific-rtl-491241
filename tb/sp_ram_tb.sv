// sp_ram_tb: single-port RAM at its default size (32 x 1024). Writes random
// words to every address, then reads them all back and compares with a copy
// kept in the testbench; then checks that the read is combinational (the new
// address is visible before the next edge) and that a cycle with we = 0 does
// not write. Random interleaved writes and reads follow.
module sp_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 1'b0;
  logic [9:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  sp_ram dut (.*);

  int checks = 0, failures = 0;

  logic [31:0] model [1024];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a);
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      if (failures < 10) $display("addr %0d: got %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1'b1; addr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a); #1; check(a);
      #1;
    end
    // we = 0 must not write
    @(negedge clk); addr = 10'd5; wdata = ~model[5]; we = 1'b0;
    @(negedge clk); #1 check(5);
    for (int i = 0; i < 4000; i++) begin
      int a;
      a = int'($urandom_range(1023));
      @(negedge clk);
      addr = 10'(a);
      if ($urandom_range(1)) begin
        we = 1'b1; wdata = $urandom; model[a] = wdata;
      end else begin
        we = 1'b0; #1 check(a);
      end
    end
    @(negedge clk); we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
