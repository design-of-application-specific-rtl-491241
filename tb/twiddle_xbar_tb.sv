// twiddle_xbar_tb: the crossbar between the four butterfly slots and the
// four twiddle banks (9-bit twiddle address, top 2 bits = bank). The banks
// are modelled here as arrays that return {bank, word} patterns looked up at
// the addresses the crossbar drives. Random slot addresses are checked for:
// every active slot receives the word of its own address when no conflict,
// the conflict flag is set exactly when two active slots want different
// words of one bank. The same checks are then run on addresses of
// butterflies 4 apart in a pass, the spacing the document schedules.
module twiddle_xbar_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]       slot_valid = '0;
  logic [3:0][8:0]  slot_addr = '0;
  logic [3:0][31:0] slot_data;
  logic [3:0][6:0]  bank_addr;
  logic [3:0][31:0] bank_data;
  logic             conflict;
  twiddle_xbar dut (.*);

  // bank k, word i holds {k, i, pattern}
  always_comb
    for (int k = 0; k < 4; k++) bank_data[k] = {8'(k), 8'(bank_addr[k]), 16'hA5C3 ^ 16'(k * 77)};

  int checks = 0, failures = 0, n_conflicts = 0;


  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp_conf = 1'b0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < i; j++)
        if (slot_valid[i] && slot_valid[j] && slot_addr[i][8:7] == slot_addr[j][8:7] &&
            slot_addr[i] != slot_addr[j]) exp_conf = 1'b1;
    #1;
    checks++;
    if (conflict != exp_conf) begin
      failures++;
      if (failures < 10) $display("conflict=%b expected %b", conflict, exp_conf);
    end
    if (exp_conf) n_conflicts++;
    else
      for (int i = 0; i < 4; i++) if (slot_valid[i]) begin
        logic [31:0] e;
        e = {8'(slot_addr[i][8:7]), 8'(slot_addr[i][6:0]),
             16'hA5C3 ^ 16'(int'(slot_addr[i][8:7]) * 77)};
        checks++;
        if (slot_data[i] != e) begin
          failures++;
          if (failures < 10) $display("slot %0d addr %0d got %h expected %h", i, slot_addr[i], slot_data[i], e);
        end
      end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        slot_valid[i] = 1'($urandom_range(1));
        slot_addr[i]  = 9'($urandom_range(511));
      end
      // a share of cases with the same word in one bank
      if (t % 5 == 0) slot_addr[3] = slot_addr[1];
      check();
    end
    // the document's schedule: butterflies b, b+4, b+8, b+12 of a 16-butterfly
    // pass of the last stage (twiddle address j << 0 with j = b)
    for (int lg = 1; lg <= 9; lg++) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        slot_valid = 4'hF;
        for (int i = 0; i < 4; i++) begin
          int bf, st, j;
          bf = b + 4 * i;
          st = (lg < 5) ? lg - 1 : 4 + (lg - 5);
          j  = bf & ((1 << (st < 4 ? st : 4)) - 1);
          slot_addr[i] = 9'(j << (9 - st));
        end
        check();
      end
    end
    checks++;
    if (n_conflicts == 0) begin
      failures++;
      $display("no conflict case generated");
    end
    $display("conflict cases: %0d", n_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
