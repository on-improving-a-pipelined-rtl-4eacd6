// dls_classify: decode- and rename-time classification of the instructions
// dispatched into the issue queue in one cycle.
//
// For every dispatch slot it produces
//  * the own-latency class: a one-cycle instruction (latency 1) wakes its
//    dependents in advance, any longer latency wakes them in selection;
//  * the producer class: "woken in advance" when at least one producer is a
//    one-cycle instruction that has not been issued yet (including one
//    dispatched in the same cycle from an earlier slot), otherwise "woken in
//    selection" (this also covers sources that are already available);
//  * the dependence row for the Wakeup Matrix: producers that have already
//    broadcast their wakeup are dropped, producers dispatched in the same
//    cycle from an earlier slot are kept.
// It then scatters the slot fields to the entries named by disp_entry.
// Purely combinational.
//
// The two classifications and their meaning follow the published description. Which
// producers count as "not yet available" (not yet issued, for the producer
// class) is this design's reading: it is the condition that keeps a consumer
// from being selected together with a one-cycle producer.
module dls_classify #(
  parameter int unsigned N     = dls_pkg::IQ_SIZE,
  parameter int unsigned D     = dls_pkg::DISPATCH_W,
  parameter int unsigned LAT_W = dls_pkg::LAT_W
) (
  input  logic [D-1:0]          disp_valid,
  input  logic [$clog2(N)-1:0]  disp_entry [D],
  input  logic [LAT_W-1:0]      disp_lat   [D],
  input  logic [N-1:0]          disp_dep   [D],    // producer entries of each slot
  input  logic [N-1:0]          valid,             // queue state
  input  logic [N-1:0]          issued,
  input  logic [N-1:0]          woke,
  input  logic [N-1:0]          own_sel_class,
  output logic [N-1:0]          alloc,
  output logic [$clog2(D > 1 ? D : 2)-1:0] alloc_slot [N],
  output logic [N-1:0]          alloc_dep  [N],
  output logic [LAT_W-1:0]      alloc_lat  [N],
  output logic [N-1:0]          alloc_own,            // own class per entry (1 = multi-cycle)
  output logic [N-1:0]          alloc_prod            // producer class per entry (1 = in selection)
);

  localparam int unsigned SW = $clog2(D > 1 ? D : 2);

  logic [N-1:0] new_before;      // entries allocated by earlier slots
  logic [N-1:0] new_one_cycle;   // ... that are one-cycle instructions
  logic [N-1:0] pend_wake;       // producers still to broadcast their wakeup
  logic [N-1:0] pend_one_cycle;  // one-cycle producers not yet issued
  logic [N-1:0] row;
  logic         one_cycle;
  logic         in_advance;

  always_comb begin
    alloc      = '0;
    alloc_own  = '0;
    alloc_prod = '0;
    for (int i = 0; i < N; i++) begin
      alloc_slot[i] = '0;
      alloc_dep[i]  = '0;
      alloc_lat[i]  = '0;
    end
    new_before    = '0;
    new_one_cycle = '0;
    for (int s = 0; s < D; s++) begin
      one_cycle      = (disp_lat[s] == LAT_W'(1));
      pend_wake      = (valid & ~woke) | new_before;
      pend_one_cycle = (valid & ~issued & ~own_sel_class) | new_one_cycle;
      row            = disp_dep[s] & pend_wake;
      in_advance     = |(disp_dep[s] & pend_one_cycle);
      if (disp_valid[s]) begin
        alloc[disp_entry[s]]         = 1'b1;
        alloc_slot[disp_entry[s]]    = SW'(s);
        alloc_dep[disp_entry[s]]     = row;
        alloc_lat[disp_entry[s]]     = disp_lat[s];
        alloc_own[disp_entry[s]]  = one_cycle ? dls_pkg::WAKEUP_IN_ADVANCE
                                                 : dls_pkg::WAKEUP_IN_SELECTION;
        alloc_prod[disp_entry[s]] = in_advance ? dls_pkg::WOKEN_IN_ADVANCE
                                                  : dls_pkg::WOKEN_IN_SELECTION;
        new_before[disp_entry[s]]    = 1'b1;
        new_one_cycle[disp_entry[s]] = one_cycle;
      end
    end
  end

endmodule
