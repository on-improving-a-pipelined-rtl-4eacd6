// tb_dls_scheduler: end-to-end test of the DLS issue queue at its default
// size (32 entries, 4 issue ports, 4 dispatch slots).
//
// The testbench plays the front end: it dispatches a program in order into
// the lowest free entries, names producers by entry number while they are
// still in the queue, and drives the issue-port availability. Next to the
// design it runs a reference model of the scheduling rules written over
// instruction records (not entries): every cycle the predicted selection,
// port assignment and set of free entries are compared with the design.
// Independently of the model it checks that no instruction issues before
// its producers' results exist (issue(consumer) >= issue(producer) +
// latency), that every instruction issues exactly once and that the queue
// drains.
//
// Phases:
//  1. the four-instruction example with one issue port: expected issue
//     cycles dispatch+2..dispatch+5, and the third instruction held for one
//     cycle although ready;
//  2. a chain of eight dependent one-cycle instructions: one per cycle;
//  3. load -> use and divide -> use: consumer exactly 'latency' cycles later;
//  4. a long random program with partial port availability and bursts of long
//     latency chains that fill the queue;
//  5. an integer instruction mix (44.3% one-cycle results, 32.0% multi-cycle
//     results, 23.7% without a register result) arranged so that no more
//     than four instructions request at once: every instruction must then
//     issue exactly at its dataflow limit, as under a one-cycle loop.
// Each mechanism (wakeup in advance, held consumer level, load low,
// back-to-back issue, delayed multi-cycle wakeup, port contention, unavailable
// ports, full queue, same-cycle producer) is counted and must occur.
module tb_dls_scheduler;
  import dls_pkg::*;

  localparam int N  = IQ_SIZE;
  localparam int W  = ISSUE_W;
  localparam int D  = DISPATCH_W;
  localparam int LW = LAT_W;
  localparam int NI = 7600;          // instruction records
  localparam int EW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [D-1:0]  disp_valid;
  logic [EW-1:0] disp_entry [D];
  logic [LW-1:0] disp_lat   [D];
  logic [N-1:0]  disp_dep   [D];
  logic [N-1:0]  free_entries;
  logic [W-1:0]  port_avail;
  logic [W-1:0]  issue_valid;
  logic [EW-1:0] issue_entry [W];

  dls_scheduler dut (.*);

  // ---------------- program ----------------
  int  p_lat  [NI];
  int  p_src  [NI][2];               // producer instruction ids, -1 = none
  int  nprog;
  bit  p_nores [NI];                 // no register result (never a producer)

  // ---------------- reference state ----------------
  int  r_disp  [NI];   // dispatch cycle, -1 = not yet
  int  r_issue [NI];
  int  r_woke  [NI];
  int  r_left  [NI];   // cycle at whose end the entry is released
  int  r_entry [NI];
  bit  r_req   [NI];
  bit  r_inadv [NI];   // woken in advance
  int  r_nprod [NI];
  int  r_prod  [NI][2];
  int  owner   [N];    // instruction in each entry, -1 = free
  int  next_disp, oldest;
  int  cyc;
  int  port_mode;      // 0: all ports, 1: one port, 2: random

  int  checks = 0, failures = 0;
  int  n_wake_adv, n_held, n_load_low, n_b2b, n_multi_wake, n_contention,
       n_port_off, n_iq_full, n_same_group, n_dataflow;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic bit woken_by(int p, int t);
    return r_woke[p] >= 0 && r_woke[p] <= t;
  endfunction

  // dispatch decisions for this cycle (made after the clock edge)
  int  d_ids [D];
  int  d_n;

  task automatic plan_dispatch();
    int e;
    bit [N-1:0] taken;
    taken = '0;
    d_n   = 0;
    disp_valid = '0;
    for (int s = 0; s < D; s++) begin
      disp_entry[s] = '0; disp_lat[s] = '0; disp_dep[s] = '0;
    end
    while (d_n < D && next_disp < nprog) begin
      e = -1;
      for (int i = 0; i < N; i++)
        if (e < 0 && owner[i] < 0 && free_entries[i] && !taken[i]) e = i;
      if (e < 0) begin n_iq_full++; break; end
      taken[e] = 1'b1;
      d_ids[d_n] = next_disp;
      r_entry[next_disp] = e;
      disp_valid[d_n] = 1'b1;
      disp_entry[d_n] = EW'(e);
      disp_lat[d_n]   = LW'(p_lat[next_disp]);
      r_nprod[next_disp] = 0;
      for (int k = 0; k < 2; k++) begin
        int p;
        p = p_src[next_disp][k];
        if (p >= 0 && r_disp[p] >= 0 && r_left[p] < 0 && r_entry[p] >= 0) begin
          // producer still in the queue
          disp_dep[d_n][r_entry[p]] = 1'b1;
          r_prod[next_disp][r_nprod[next_disp]++] = p;
        end else if (p >= 0 && r_disp[p] < 0) begin
          // producer dispatched by an earlier slot of this cycle
          disp_dep[d_n][r_entry[p]] = 1'b1;
          r_prod[next_disp][r_nprod[next_disp]++] = p;
          n_same_group++;
        end
      end
      d_n++;
      next_disp++;
    end
  endtask

  // evaluate cycle 'cyc' on the model and compare with the design
  task automatic eval_cycle();
    int  t, k_avail, nsel, nreq_eff, sel_ids [W], rank;
    bit  req_eff [int];
    bit  load, exp_valid [W];
    int  exp_entry [W];
    bit [N-1:0] exp_free;
    t = cyc;
    // requests seen by selection
    nreq_eff = 0;
    for (int k = oldest; k < next_disp - d_n; k++) begin
      if (r_disp[k] >= 0 && r_req[k] && r_issue[k] != t - 1 && (r_issue[k] < 0)) begin
        req_eff[k] = 1'b1; nreq_eff++;
      end
    end
    // one-cycle loop wakeups
    foreach (req_eff[k])
      if (p_lat[k] == 1 && r_woke[k] < 0) begin r_woke[k] = t; n_wake_adv++; end
    // oldest-first selection
    k_avail = $countones(port_avail);
    if (k_avail < W) n_port_off++;
    if (nreq_eff > k_avail) n_contention++;
    nsel = 0;
    foreach (req_eff[k]) if (nsel < k_avail) sel_ids[nsel++] = k;
    for (int p = 0; p < W; p++) begin exp_valid[p] = 0; exp_entry[p] = 0; end
    rank = 0;
    for (int p = 0; p < W; p++)
      if (port_avail[p] && rank < nsel) begin
        exp_valid[p] = 1; exp_entry[p] = r_entry[sel_ids[rank]]; rank++;
      end
    for (int p = 0; p < W; p++) begin
      check(issue_valid[p] == exp_valid[p], $sformatf("port %0d valid %0b expected %0b", p, issue_valid[p], exp_valid[p]));
      if (exp_valid[p])
        check(issue_entry[p] == EW'(exp_entry[p]), $sformatf("port %0d entry %0d expected %0d", p, issue_entry[p], exp_entry[p]));
    end
    // zero detection
    load = 1'b1;
    foreach (req_eff[k]) begin
      bit s; s = 0;
      for (int i = 0; i < nsel; i++) if (sel_ids[i] == k) s = 1;
      if (p_lat[k] == 1 && !s) load = 1'b0;
    end
    if (!load) n_load_low++;
    // ready and next request
    for (int k = oldest; k < next_disp - d_n; k++) begin
      bit rdy;
      if (r_disp[k] < 0 || r_disp[k] >= t || r_issue[k] >= 0) begin
        r_req[k] = 0; continue;
      end
      rdy = 1;
      for (int i = 0; i < r_nprod[k]; i++) if (!woken_by(r_prod[k][i], t)) rdy = 0;
      if (rdy && r_inadv[k] && !r_req[k] && !load) n_held++;
      r_req[k] = rdy && (!r_inadv[k] || load || r_req[k]);
    end
    // issue
    for (int i = 0; i < nsel; i++) begin
      int k; k = sel_ids[i];
      r_issue[k] = t;
      if (p_lat[k] > 1) r_woke[k] = t + p_lat[k] - 1;
      for (int j = 0; j < r_nprod[k]; j++)
        if (p_lat[r_prod[k][j]] == 1 && r_issue[r_prod[k][j]] == t - 1) n_b2b++;
      for (int j = 0; j < 2; j++) begin
        int p; p = p_src[k][j];
        if (p >= 0)
          check(r_issue[p] >= 0 && r_issue[p] + p_lat[p] <= t,
                $sformatf("instr %0d issued before producer %0d result", k, p));
      end
    end
    // multi-cycle wakeups happening now
    for (int k = oldest; k < next_disp - d_n; k++)
      if (p_lat[k] > 1 && r_woke[k] == t) n_multi_wake++;
    // entries released at the end of this cycle
    exp_free = '0;
    for (int i = 0; i < N; i++) exp_free[i] = (owner[i] < 0);
    check(free_entries == exp_free, $sformatf("free entries %h expected %h", free_entries, exp_free));
    for (int k = oldest; k < next_disp - d_n; k++)
      if (r_disp[k] >= 0 && r_left[k] < 0 && r_issue[k] >= 0 && woken_by(k, t)) begin
        r_left[k] = t; owner[r_entry[k]] = -1;
      end
    // dispatch of this cycle
    for (int s = 0; s < d_n; s++) begin
      int k; k = d_ids[s];
      r_disp[k] = t; owner[r_entry[k]] = k; r_req[k] = 0;
      r_inadv[k] = 0;
      for (int i = 0; i < r_nprod[k]; i++) begin
        int p; p = r_prod[k][i];
        if (p_lat[p] == 1 && (r_issue[p] < 0 || r_issue[p] >= t)) r_inadv[k] = 1;
      end
    end
    while (oldest < next_disp && r_left[oldest] >= 0) oldest++;
  endtask

  task automatic run_until_drained(int limit);
    int start; start = cyc;
    while ((oldest < nprog) && (cyc - start < limit)) begin
      @(posedge clk); #1;
      cyc++;
      case (port_mode)
        0: port_avail = '1;
        1: port_avail = W'(1);
        default: port_avail = ($urandom_range(0, 3) == 0) ? W'($urandom) : '1;
      endcase
      plan_dispatch();
      #4;
      eval_cycle();
    end
    check(oldest >= nprog, "program did not drain");
  endtask

  task automatic add(int lat, int s0, int s1);
    p_lat[nprog] = lat; p_src[nprog][0] = s0; p_src[nprog][1] = s1; nprog++;
  endtask

  initial begin
    int base, d0, r, lat;
    for (int k = 0; k < NI; k++) begin
      r_disp[k] = -1; r_issue[k] = -1; r_woke[k] = -1; r_left[k] = -1;
      r_entry[k] = -1; r_req[k] = 0; r_inadv[k] = 0; r_nprod[k] = 0;
    end
    for (int i = 0; i < N; i++) owner[i] = -1;
    nprog = 0; next_disp = 0; oldest = 0; cyc = 0; d_n = 0;
    n_wake_adv = 0; n_held = 0; n_load_low = 0; n_b2b = 0; n_multi_wake = 0;
    n_contention = 0; n_port_off = 0; n_iq_full = 0; n_same_group = 0; n_dataflow = 0;
    for (int k = 0; k < NI; k++) p_nores[k] = 0;
    disp_valid = '0; port_avail = '1;
    for (int s = 0; s < D; s++) begin
      disp_entry[s] = '0; disp_lat[s] = '0; disp_dep[s] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Phase 1: four-instruction example, one issue per cycle
    port_mode = 1;
    base = nprog;
    add(LAT_ALU, -1, -1);          // add r1 <- r2, r3
    add(LAT_ALU, -1, -1);          // add r4 <- r5, r6
    add(LAT_ALU, base, -1);        // sub r9 <- r1, r7
    add(LAT_ALU, base + 2, -1);    // sub r10 <- r9, r8
    fork
      run_until_drained(100);
      begin
        // the third instruction is ready but held two cycles after dispatch
        wait (r_disp[base] >= 0);
        d0 = r_disp[base];
        while (cyc != d0 + 3) @(negedge clk);
        check(dut.ready[r_entry[base + 2]] && !dut.req[r_entry[base + 2]],
              "example: third instruction should be ready but not requesting");
      end
    join
    d0 = r_disp[base];
    for (int i = 0; i < 4; i++)
      check(r_issue[base + i] == d0 + 2 + i,
            $sformatf("example: instr %0d issued at +%0d, expected +%0d", i + 1, r_issue[base + i] - d0, 2 + i));

    // Phase 2: dependent one-cycle chain issues back to back
    port_mode = 0;
    base = nprog;
    add(LAT_ALU, -1, -1);
    for (int i = 1; i < 8; i++) add(LAT_ALU, base + i - 1, -1);
    run_until_drained(100);
    for (int i = 1; i < 8; i++)
      check(r_issue[base + i] == r_issue[base + i - 1] + 1, "chain not back to back");

    // Phase 3: multi-cycle producers
    base = nprog;
    add(LAT_LOAD, -1, -1);
    add(LAT_ALU, base, -1);
    add(LAT_IDIV, -1, -1);
    add(LAT_ALU, base + 2, -1);
    add(LAT_IMUL, base + 3, -1);
    add(LAT_ALU, base + 4, base + 1);
    run_until_drained(200);
    check(r_issue[base + 1] == r_issue[base] + LAT_LOAD, "load-use distance");
    check(r_issue[base + 3] == r_issue[base + 2] + LAT_IDIV, "divide-use distance");
    check(r_issue[base + 5] == r_issue[base + 4] + LAT_IMUL, "multiply-use distance");

    // Phase 4: random program
    port_mode = 2;
    base = nprog;
    while (nprog < 5990) begin
      int k; k = nprog - base;
      r = $urandom_range(0, 99);
      if ((k / 400) % 3 == 2 && (k % 400) < 60)
        lat = (r < 50) ? LAT_IDIV : LAT_IMUL;     // long-latency burst
      else
        lat = (r < 60) ? LAT_ALU : (r < 85) ? LAT_LOAD : (r < 93) ? LAT_IMUL :
              (r < 97) ? LAT_IDIV : LAT_FPADD;
      add(lat,
          (k > 0 && $urandom_range(0, 99) < 75) ? nprog - $urandom_range(1, (k < 6) ? k : 6) : -1,
          (k > 0 && $urandom_range(0, 99) < 30) ? nprog - $urandom_range(1, (k < 12) ? k : 12) : -1);
    end
    run_until_drained(NI * 40);

    // Phase 5: integer instruction mix (44.3% one-cycle results, 32.0%
    // multi-cycle results, 23.7% no register result) in two dependence chains
    // with cross links, so that at most four instructions ever request at
    // once. Every producer level then issues in one cycle and each
    // instruction must issue at its dataflow limit, as with a one-cycle loop.
    port_mode = 0;
    base = nprog;
    begin
      int last_u [2], prev_kind [2], k0, s1;
      last_u = '{-1, -1}; prev_kind = '{0, 0};
      while (nprog < NI - 10) begin
        int c; c = (nprog - base) % 2;
        r = $urandom_range(0, 999);
        s1 = -1;
        if (nprog - base > 12 && $urandom_range(0, 99) < 30) begin
          k0 = last_u[1 - c];
          if (k0 >= 0) s1 = k0;
        end
        if (r < 237 && prev_kind[c] != 2 && last_u[c] >= 0) begin
          add(LAT_ALU, last_u[c], -1);           // store or branch: no result
          p_nores[nprog - 1] = 1;
          prev_kind[c] = 2;
        end else begin
          lat = (r < 237 + 443) ? LAT_ALU :
                (r < 237 + 443 + 200) ? LAT_LOAD :
                (r < 237 + 443 + 280) ? LAT_IMUL : LAT_IDIV;
          add(lat, last_u[c], s1);
          last_u[c] = nprog - 1;
          prev_kind[c] = (lat == 1) ? 0 : 1;
        end
      end
    end
    run_until_drained(NI * 40);
    for (int k = base; k < nprog; k++) begin
      int bound;
      bound = r_disp[k] + 2;
      for (int j = 0; j < 2; j++)
        if (p_src[k][j] >= 0 && r_issue[p_src[k][j]] + p_lat[p_src[k][j]] > bound)
          bound = r_issue[p_src[k][j]] + p_lat[p_src[k][j]];
      check(r_issue[k] == bound,
            $sformatf("mix: instr %0d issued at %0d, dataflow limit %0d", k, r_issue[k], bound));
      if (r_issue[k] == bound && bound > r_disp[k] + 2) n_dataflow++;
    end

    for (int k = 0; k < nprog; k++)
      check(r_issue[k] >= 0, "instruction never issued");

    $display("mechanisms: wake_in_advance=%0d held_consumer=%0d load_low=%0d back_to_back=%0d multi_cycle_wake=%0d port_contention=%0d port_off=%0d iq_full=%0d same_cycle_producer=%0d dataflow_limit=%0d",
             n_wake_adv, n_held, n_load_low, n_b2b, n_multi_wake, n_contention, n_port_off, n_iq_full, n_same_group, n_dataflow);
    $display("instructions=%0d cycles=%0d", nprog, cyc);
    check(n_wake_adv > 0, "no wakeup in advance");
    check(n_held > 0, "no consumer level held back");
    check(n_load_low > 0, "load never low");
    check(n_b2b > 0, "no back-to-back issue");
    check(n_multi_wake > 0, "no multi-cycle wakeup");
    check(n_contention > 0, "no port contention");
    check(n_port_off > 0, "no unavailable port");
    check(n_iq_full > 0, "queue never full");
    check(n_same_group > 0, "no producer in the same dispatch group");
    check(n_dataflow > 0, "no dependent issue at the dataflow limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
