// tb_dls_classify: test of the decode/rename classification.
// Random queue states (valid, issued, woke, one-cycle flags) and random
// dispatch groups with distinct free entries are generated. For every slot
// the expected own class (latency 1 or not), producer class (depends on a
// one-cycle producer not yet issued, counting earlier slots of the group)
// and dependence row (producers still to wake, plus earlier slots) are
// computed with plain loops and compared at the entry the slot writes.
module tb_dls_classify;
  localparam int N  = 16;
  localparam int D  = 4;
  localparam int LW = 5;
  localparam int EW = $clog2(N);
  logic [D-1:0]  disp_valid;
  logic [EW-1:0] disp_entry [D];
  logic [LW-1:0] disp_lat   [D];
  logic [N-1:0]  disp_dep   [D];
  logic [N-1:0]  valid, issued, woke, own_sel_class;
  logic [N-1:0]  alloc, alloc_own, alloc_prod;
  logic [1:0]    alloc_slot [N];
  logic [N-1:0]  alloc_dep  [N];
  logic [LW-1:0] alloc_lat  [N];
  int checks = 0, failures = 0;

  dls_classify #(.N(N), .D(D), .LAT_W(LW)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000) begin
      int free_list [$];
      logic [N-1:0] exp_alloc;
      free_list.delete();
      valid = $urandom; issued = $urandom & valid; woke = $urandom & valid;
      own_sel_class = $urandom;
      for (int i = 0; i < N; i++) if (!valid[i]) free_list.push_back(i);
      free_list.shuffle();
      for (int s = 0; s < D; s++) begin
        disp_valid[s] = (s < free_list.size()) && ($urandom_range(0, 3) != 0);
        disp_entry[s] = (s < free_list.size()) ? EW'(free_list[s]) : '0;
        disp_lat[s]   = ($urandom_range(0, 1) == 0) ? LW'(1) : LW'($urandom_range(2, 24));
        disp_dep[s]   = $urandom & $urandom;
        for (int t = 0; t < s; t++)
          if (disp_valid[t] && $urandom_range(0, 1) == 0) disp_dep[s][disp_entry[t]] = 1;
      end
      #1;
      exp_alloc = '0;
      for (int s = 0; s < D; s++) begin
        int e; bit adv; logic [N-1:0] row;
        if (!disp_valid[s]) continue;
        e = disp_entry[s];
        exp_alloc[e] = 1;
        adv = 0; row = '0;
        for (int j = 0; j < N; j++) begin
          bit earlier, earlier_one;
          earlier = 0; earlier_one = 0;
          for (int t = 0; t < s; t++)
            if (disp_valid[t] && disp_entry[t] == j) begin
              earlier = 1; earlier_one = (disp_lat[t] == 1);
            end
          if (!disp_dep[s][j]) continue;
          if (earlier || (valid[j] && !woke[j])) row[j] = 1;
          if (earlier_one || (valid[j] && !issued[j] && !own_sel_class[j] && !earlier)) adv = 1;
        end
        chk(alloc_own[e] == (disp_lat[s] != 1), $sformatf("own class slot %0d", s));
        chk(alloc_prod[e] == !adv, $sformatf("producer class slot %0d", s));
        chk(alloc_dep[e] == row, $sformatf("row slot %0d: %h expected %h", s, alloc_dep[e], row));
        chk(alloc_lat[e] == disp_lat[s], "latency");
        chk(alloc_slot[e] == 2'(s), "slot");
      end
      chk(alloc == exp_alloc, "alloc vector");
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
