// cache_regfile_tb: the cache register file at its default configuration
// (32 x 32 bits, 2 read and 3 write ports, as the single-issue processor
// uses it). Checks reset to zero, combinational reads on all ports, writes
// on several ports in one cycle, and that when two ports write the same
// register the higher-numbered port wins. Compared with a model array.
module cache_regfile_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0][4:0]  raddr = '0;
  logic [1:0][31:0] rdata;
  logic [2:0]       we = '0;
  logic [2:0][4:0]  waddr = '0;
  logic [2:0][31:0] wdata = '0;
  cache_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [32];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < 32; r++) begin
      raddr[0] = 5'(r); raddr[1] = 5'(31 - r);
      #1;
      checks += 2;
      if (rdata[0] !== model[r] || rdata[1] !== model[31 - r]) begin
        failures++;
        if (failures < 10) $display("r%0d=%h exp %h / r%0d=%h exp %h",
                                    r, rdata[0], model[r], 31 - r, rdata[1], model[31 - r]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        we[p]    = 1'($urandom_range(1));
        waddr[p] = 5'($urandom_range(31));
        wdata[p] = $urandom;
      end
      // sometimes force a collision
      if (i % 7 == 0) waddr[2] = waddr[0];
      for (int p = 0; p < 3; p++) if (we[p]) model[waddr[p]] = wdata[p];
      if (i % 50 == 0) begin
        @(negedge clk); we = '0; check_all();
      end
    end
    @(negedge clk); we = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
