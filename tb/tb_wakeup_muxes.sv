// tb_wakeup_muxes: test of the one-cycle / two-cycle loop multiplexers.
// Each entry is given a latency and runs through allocate -> (request) ->
// select. The testbench predicts the wakeup cycle of every entry on its own:
// a one-cycle entry wakes in the first cycle it requests; an entry of latency
// L > 1 selected in cycle s wakes in cycle s + L - 1 (s + 1 for L = 2, the
// two-cycle loop). wake must be high exactly then and only once, woke from
// then on, and sel_prev must be sel delayed by one cycle.
module tb_wakeup_muxes;
  localparam int N  = 8;
  localparam int LW = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] clear, own_sel_class, req_eff, sel, wake, woke, sel_prev;
  logic [LW-1:0] lat [N];
  logic [N-1:0] sel_d;
  int   cyc = 0;
  int   exp_wake [N];    // expected wake cycle, -1 unknown
  bit   has_woken [N];
  int   phase [N];       // 0 idle, 1 requesting, 2 selected
  int   checks = 0, failures = 0;
  int   lats [6] = '{1, 2, 3, 4, 10, 24};
  always #5 clk = ~clk;

  wakeup_muxes #(.N(N), .LAT_W(LW)) dut (.*);

  initial begin
    clear = '0; own_sel_class = '0; req_eff = '0; sel = '0; sel_d = '0;
    for (int i = 0; i < N; i++) begin lat[i] = '0; phase[i] = 0; exp_wake[i] = -1; has_woken[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6000) begin
      @(negedge clk);
      cyc++;
      clear = '0; req_eff = '0; sel = '0;
      for (int i = 0; i < N; i++) begin
        case (phase[i])
          0: if ($urandom_range(0, 3) == 0) begin
               int l; l = lats[$urandom_range(0, 5)];
               clear[i] = 1; lat[i] = LW'(l); own_sel_class[i] = (l > 1);
               phase[i] = 1; exp_wake[i] = -1; has_woken[i] = 0;
             end
          1: if ($urandom_range(0, 1) == 0) begin
               req_eff[i] = 1;
               if (!own_sel_class[i] && exp_wake[i] < 0) exp_wake[i] = cyc;
               if ($urandom_range(0, 2) == 0) begin
                 sel[i] = 1; phase[i] = 2;
                 if (own_sel_class[i]) exp_wake[i] = cyc + int'(lat[i]) - 1;
               end
             end
          default: if (has_woken[i] && $urandom_range(0, 3) == 0) phase[i] = 0;
        endcase
      end
      #1;
      for (int i = 0; i < N; i++) begin
        bit ew;
        ew = (exp_wake[i] == cyc);
        checks++;
        if (wake[i] !== ew) begin
          failures++;
          $display("FAIL cyc %0d entry %0d lat %0d wake=%b expected %b", cyc, i, lat[i], wake[i], ew);
        end
        if (ew) has_woken[i] = 1;
        checks++;
        if (!clear[i] && woke[i] !== has_woken[i]) begin
          failures++; $display("FAIL cyc %0d entry %0d woke=%b", cyc, i, woke[i]);
        end
      end
      checks++;
      if (sel_prev !== sel_d) begin failures++; $display("FAIL sel_prev"); end
      sel_d = sel & ~clear;
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
