// tb_d_logic: test of the D-Logic request register.
// A cycle model kept in the testbench predicts every request bit from the
// previous cycle's ready, class, load and request: woken-in-selection entries
// follow ready with one cycle of delay, woken-in-advance entries start only
// after a cycle with load high and then stay while ready. Directed steps
// replay the held-then-released sequence of a consumer level.
module tb_d_logic;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ready, prod_class, req;
  logic load;
  logic [N-1:0] model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  d_logic #(.N(N)) dut (.*);

  task automatic step(logic [N-1:0] r, logic [N-1:0] c, logic l);
    ready = r; prod_class = c; load = l;
    @(posedge clk);
    for (int i = 0; i < N; i++)
      model[i] = r[i] && (c[i] || l || model[i]);
    #1;
    checks++;
    if (req !== model) begin
      failures++;
      $display("FAIL req=%h expected %h", req, model);
    end
  endtask

  initial begin
    ready = '0; prod_class = '0; load = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (req !== '0) failures++;
    // entry 0 woken in selection, entry 1 woken in advance
    step(16'h0003, 16'h0001, 1'b0);   // entry 0 requests next, entry 1 held
    if (req[1]) begin failures++; $display("FAIL held entry requested"); end
    checks++;
    step(16'h0003, 16'h0001, 1'b0);   // still held
    step(16'h0003, 16'h0001, 1'b1);   // released by load
    if (!req[1]) begin failures++; $display("FAIL released entry not requesting"); end
    checks++;
    step(16'h0003, 16'h0001, 1'b0);   // keeps requesting while ready
    if (!req[1]) begin failures++; $display("FAIL released entry dropped"); end
    checks++;
    step(16'h0001, 16'h0001, 1'b0);   // issued: ready falls
    if (req[1]) begin failures++; $display("FAIL issued entry still requests"); end
    checks++;
    repeat (3000) step($urandom, $urandom, ($urandom_range(0, 2) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
