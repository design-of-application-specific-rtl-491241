// dp_ram_tb: dual-port RAM at its default size (16 x 2048). Fills it through
// port A, reads everything back through both ports at different addresses in
// the same cycle, then writes through port A, port B or both in the same
// cycle (different addresses) and checks the words landed. Values are compared with
// a copy kept in the testbench.
module dp_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we_a = 1'b0, we_b = 1'b0;
  logic [10:0] addr_a = '0, addr_b = '0;
  logic [15:0] wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  dp_ram dut (.*);

  int checks = 0, failures = 0;

  logic [15:0] model [2048];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check2(input int a, input int b);
    checks += 2;
    if (rdata_a !== model[a] || rdata_b !== model[b]) begin
      failures++;
      if (failures < 10)
        $display("A[%0d]=%h (exp %h) B[%0d]=%h (exp %h)", a, rdata_a, model[a], b, rdata_b, model[b]);
    end
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); we_a = 1'b1; addr_a = 11'(a); wdata_a = 16'($urandom); model[a] = wdata_a;
    end
    @(negedge clk); we_a = 1'b0;
    for (int a = 0; a < 2048; a++) begin
      addr_a = 11'(a); addr_b = 11'(2047 - a); #1 check2(a, 2047 - a);
      #1;
    end
    for (int i = 0; i < 3000; i++) begin
      int a, b;
      a = int'($urandom_range(2047));
      b = int'($urandom_range(2047));
      if (a == b) b = (b + 1) % 2048;
      @(negedge clk);
      addr_a = 11'(a); addr_b = 11'(b);
      if (i % 2 == 0) begin
        // both ports, port A alone or port B alone
        we_a = (i % 6 != 4); we_b = (i % 6 != 2);
        wdata_a = 16'($urandom); wdata_b = 16'($urandom);
        if (we_a) model[a] = wdata_a;
        if (we_b) model[b] = wdata_b;
      end else begin
        we_a = 1'b0; we_b = 1'b0; #1 check2(a, b);
      end
    end
    @(negedge clk); we_a = 1'b0; we_b = 1'b0;
    for (int a = 0; a < 2048; a++) begin
      addr_a = 11'(a); addr_b = 11'(a); #1 check2(a, a);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
