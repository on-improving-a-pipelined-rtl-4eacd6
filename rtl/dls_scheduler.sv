// dls_scheduler: an integer issue queue scheduled by the Dependence Level
// Scheduler (DLS).
//
// The scheduling loop (wakeup, then selection) is pipelined over two cycles:
// a request register (D-Logic) separates the Wakeup Logic from the Selection
// Logic, and selections reach the Wakeup Logic one cycle later. On its own
// that loop would cost one idle cycle between a one-cycle instruction and its
// consumer. DLS avoids it without speculation:
//  * a one-cycle instruction wakes its dependents up while it is competing for
//    selection (one-cycle loop, through the wakeup muxes);
//  * the dependents woken up this way (the consumer level) are held in the
//    D-Logic until the ZDL reports that every one-cycle instruction that was
//    competing (the producer level) has been selected; they compete from the
//    next cycle on.
// When a producer level issues in a single cycle, its consumers issue in the
// very next cycle (back-to-back); when it needs several cycles, they wait.
// Multi-cycle instructions wake their dependents from the registered
// selection, delayed so that a consumer issues 'latency' cycles after its
// producer.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//  * dispatch: up to D instructions per cycle. Slot s names a free entry
//    (disp_entry, taken from free_entries), its execution latency and the
//    issue-queue entries holding its producers (disp_dep). Earlier slots are
//    older in program order; a slot may name an entry dispatched by an earlier
//    slot of the same cycle as producer. A dispatched instruction can be
//    selected two cycles later at the earliest (wakeup, then select).
//  * issue: port_avail marks the issue ports that can accept an instruction
//    this cycle; issue_valid/issue_entry give, per port, the selected entry.
//    Selection is oldest first.
//  An entry leaves the queue once it is issued and has broadcast its wakeup.
//  The front end owns the mapping from entries to instructions (payload).
//
// Follows the published description: the block structure and loops, the two
// classifications, D-Logic and ZDL behaviour. This design's choices: entry
// allocation by the front end, producer naming by entry number, the age
// matrix, the latency countdown for long latencies, and releasing an entry
// right after issue (there is no replay of mis-scheduled loads).
//
// The dispatch-rule assertions at the end sample rst_n through
// 'disable iff', which lint reports as a reset used both synchronously and
// asynchronously; it concerns only the checks, not the flip-flops.
module dls_scheduler #(
  parameter int unsigned N     = dls_pkg::IQ_SIZE,
  parameter int unsigned W     = dls_pkg::ISSUE_W,
  parameter int unsigned D     = dls_pkg::DISPATCH_W,
  parameter int unsigned LAT_W = dls_pkg::LAT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch
  input  logic [D-1:0]         disp_valid,
  input  logic [$clog2(N)-1:0] disp_entry [D],
  input  logic [LAT_W-1:0]     disp_lat   [D],
  input  logic [N-1:0]         disp_dep   [D],
  output logic [N-1:0]         free_entries,
  // issue
  input  logic [W-1:0]         port_avail,
  output logic [W-1:0]         issue_valid,
  output logic [$clog2(N)-1:0] issue_entry [W]
);

  localparam int unsigned SW = $clog2(D > 1 ? D : 2);

  // entry state
  logic [N-1:0]     valid_q, issued_q;
  logic [N-1:0]     own_q;     // 1 = wakeup in selection (multi-cycle)
  logic [N-1:0]     prod_q;    // 1 = woken in selection
  logic [LAT_W-1:0] lat_q [N];

  // dispatch
  logic [N-1:0]     alloc;
  logic [SW-1:0]    alloc_slot [N];
  logic [N-1:0]     alloc_dep  [N];
  logic [LAT_W-1:0] alloc_lat  [N];
  logic [N-1:0]     alloc_own, alloc_prod;

  // scheduling loop
  logic [N-1:0]     wake, woke, sel_prev;
  logic [N-1:0]     ready, req, req_eff, sel;
  logic [N-1:0]     older [N];
  logic             load;
  logic [N-1:0]     leave;

  assign free_entries = ~valid_q;

  dls_classify #(.N(N), .D(D), .LAT_W(LAT_W)) u_classify (
    .disp_valid (disp_valid),
    .disp_entry (disp_entry),
    .disp_lat   (disp_lat),
    .disp_dep   (disp_dep),
    .valid      (valid_q),
    .issued     (issued_q),
    .woke       (woke),
    .own_sel_class (own_q),
    .alloc      (alloc),
    .alloc_slot (alloc_slot),
    .alloc_dep  (alloc_dep),
    .alloc_lat  (alloc_lat),
    .alloc_own  (alloc_own),
    .alloc_prod (alloc_prod)
  );

  wakeup_muxes #(.N(N), .LAT_W(LAT_W)) u_muxes (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (alloc),
    .own_sel_class (own_q),
    .lat           (lat_q),
    .req_eff       (req_eff),
    .sel           (sel),
    .wake          (wake),
    .woke          (woke),
    .sel_prev      (sel_prev)
  );

  wakeup_logic #(.N(N)) u_wakeup (
    .clk       (clk),
    .rst_n     (rst_n),
    .alloc     (alloc),
    .alloc_dep (alloc_dep),
    .wake      (wake),
    .active    (valid_q & ~issued_q),
    .ready     (ready)
  );

  d_logic #(.N(N)) u_dlogic (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (ready),
    .prod_class (prod_q),
    .load       (load),
    .req        (req)
  );

  // The request register still shows an entry selected last cycle.
  assign req_eff = req & ~sel_prev;

  age_matrix #(.N(N), .SLOT_W(SW)) u_age (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid      (valid_q),
    .alloc      (alloc),
    .alloc_slot (alloc_slot),
    .older      (older)
  );

  selection_logic #(.N(N), .W(W)) u_select (
    .req         (req_eff),
    .older       (older),
    .port_avail  (port_avail),
    .sel         (sel),
    .grant_valid (issue_valid),
    .grant_idx   (issue_entry)
  );

  zdl #(.N(N)) u_zdl (
    .req           (req),
    .sel_prev      (sel_prev),
    .own_sel_class (own_q),
    .sel           (sel),
    .load          (load)
  );

  assign leave = valid_q & (issued_q | sel) & woke;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      issued_q <= '0;
      own_q    <= '0;
      prod_q   <= '0;
      for (int i = 0; i < N; i++) lat_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (alloc[i]) begin
          valid_q[i]  <= 1'b1;
          issued_q[i] <= 1'b0;
          own_q[i]    <= alloc_own[i];
          prod_q[i]   <= alloc_prod[i];
          lat_q[i]    <= alloc_lat[i];
        end else begin
          if (leave[i]) valid_q[i] <= 1'b0;
          if (sel[i])   issued_q[i] <= 1'b1;
        end
      end
    end
  end

  // Rules of the dispatch interface.
  for (genvar s = 0; s < D; s++) begin : g_disp_rules
    a_free_entry: assert property (@(posedge clk) disable iff (!rst_n)
      disp_valid[s] |-> free_entries[disp_entry[s]])
      else $error("dispatch slot %0d writes a busy entry", s);
    a_latency: assert property (@(posedge clk) disable iff (!rst_n)
      disp_valid[s] |-> disp_lat[s] != '0)
      else $error("dispatch slot %0d has latency 0", s);
    for (genvar t = 0; t < s; t++) begin : g_pair
      a_distinct: assert property (@(posedge clk) disable iff (!rst_n)
        !(disp_valid[s] && disp_valid[t] && disp_entry[s] == disp_entry[t]))
        else $error("dispatch slots %0d and %0d write the same entry", t, s);
    end
  end

endmodule
