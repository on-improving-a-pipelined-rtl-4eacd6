// tb_selection_logic: test of oldest-first selection with port availability.
// A random program order (a permutation of the entries) is turned into an age
// matrix; the expected selection takes the requesting entries in that order,
// as many as there are available ports, and gives the k-th oldest to the k-th
// available port.
module tb_selection_logic;
  localparam int N = 32;
  localparam int W = 4;
  logic [N-1:0] req;
  logic [N-1:0] older [N];
  logic [W-1:0] port_avail;
  logic [N-1:0] sel;
  logic [W-1:0] grant_valid;
  logic [$clog2(N)-1:0] grant_idx [W];
  int order [N];       // order[pos] = entry, pos 0 = oldest
  int pos_of [N];
  int checks = 0, failures = 0;

  selection_logic #(.N(N), .W(W)) dut (.*);

  task automatic shuffle();
    for (int i = 0; i < N; i++) order[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < N; i++) pos_of[order[i]] = i;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        older[i][j] = (pos_of[j] < pos_of[i]);
  endtask

  task automatic one(logic [N-1:0] r, logic [W-1:0] pa);
    logic [N-1:0] exp_sel;
    int picked [$];
    int k;
    req = r; port_avail = pa;
    #1;
    exp_sel = '0;
    for (int p = 0; p < N; p++)
      if (r[order[p]] && picked.size() < $countones(pa)) begin
        picked.push_back(order[p]); exp_sel[order[p]] = 1;
      end
    checks++;
    if (sel !== exp_sel) begin
      failures++; $display("FAIL sel=%h expected %h", sel, exp_sel);
    end
    k = 0;
    for (int p = 0; p < W; p++) begin
      bit ev; int ee;
      ev = pa[p] && k < picked.size();
      ee = ev ? picked[k] : 0;
      if (ev) k++;
      checks++;
      if (grant_valid[p] !== ev || (ev && grant_idx[p] != ee)) begin
        failures++;
        $display("FAIL port %0d valid=%b idx=%0d expected %b %0d", p, grant_valid[p], grant_idx[p], ev, ee);
      end
    end
  endtask

  initial begin
    shuffle();
    one('0, '1);
    one('1, '1);
    one('1, 4'b0000);
    one('1, 4'b1010);
    repeat (2000) begin
      shuffle();
      one($urandom & (($urandom_range(0, 1) == 0) ? $urandom : '1), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
