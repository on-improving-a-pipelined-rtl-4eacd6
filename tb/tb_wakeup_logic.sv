// tb_wakeup_logic: test of the Wakeup Matrix.
// The testbench keeps, for every entry, the list of producers it still waits
// for (as a queue of entry numbers rather than a bit row). Random cycles
// dispatch entries with random producer sets, broadcast random wakeups and
// toggle the active flags; ready must equal "active and nothing left to wait
// for after this cycle's wakeups" in every cycle, including a consumer woken
// in the same cycle as it is written.
module tb_wakeup_logic;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] alloc, wake, active, ready;
  logic [N-1:0] alloc_dep [N];
  int waits [N][$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  wakeup_logic #(.N(N)) dut (.*);

  initial begin
    alloc = '0; wake = '0; active = '0;
    for (int i = 0; i < N; i++) alloc_dep[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: entry 1 waits for entry 0, which wakes two cycles later
    @(negedge clk);
    alloc = 16'h0002; alloc_dep[1] = 16'h0001; waits[1] = '{0};
    @(negedge clk);
    alloc = '0; active = 16'h0002; #1;
    checks++; if (ready[1]) begin failures++; $display("FAIL ready before wakeup"); end
    @(negedge clk);
    wake = 16'h0001; #1;
    checks++; if (!ready[1]) begin failures++; $display("FAIL not ready in wakeup cycle"); end
    @(negedge clk);
    wake = '0; #1;
    checks++; if (!ready[1]) begin failures++; $display("FAIL wakeup not kept"); end
    waits[1].delete();
    // random
    repeat (4000) begin
      @(negedge clk);
      alloc  = $urandom & $urandom & $urandom;
      wake   = $urandom & $urandom & $urandom;
      active = $urandom | $urandom;
      for (int i = 0; i < N; i++) begin
        alloc_dep[i] = $urandom & $urandom & $urandom;
        if (alloc[i]) begin
          waits[i].delete();
          for (int j = 0; j < N; j++) if (alloc_dep[i][j]) waits[i].push_back(j);
        end
      end
      // remove producers woken this cycle
      for (int i = 0; i < N; i++)
        for (int k = waits[i].size() - 1; k >= 0; k--)
          if (wake[waits[i][k]]) waits[i].delete(k);
      #1;
      for (int i = 0; i < N; i++) begin
        bit exp;
        exp = active[i] && (alloc[i] ? (alloc_dep[i] & ~wake) == 0 : waits[i].size() == 0);
        // a row written this cycle only takes effect next cycle
        if (alloc[i]) continue;
        checks++;
        if (ready[i] !== exp) begin
          failures++;
          $display("FAIL entry %0d ready=%b expected %b", i, ready[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
