// wakeup_logic: the Wakeup Matrix of the issue queue.
//
// Every issue-queue entry owns a row of N dependence bits; bit j of row i is
// set while entry i still waits for the producer held in entry j. A wakeup
// signal on column j clears bit j in every row, and an entry is ready once
// its row is empty (a wire-OR of the remaining bits, inverted). The ready
// signal is combinational from the current wakeup signals, so a producer
// that broadcasts its wakeup in cycle t makes its consumers ready in the same
// cycle t; the cleared bits are stored at the end of the cycle.
//
// Interface:
//   alloc[i]       write row i with alloc_dep[i] (entry i is being dispatched);
//                  bits whose producer wakes this very cycle are dropped.
//   wake[j]        wakeup signal of the producer in entry j (from the muxes).
//   active[i]      entry i holds an instruction that has not been issued yet.
//   ready[i]       active[i] and no dependence bit left after this cycle's wakeups.
//
// The matrix form (one bit per producer entry rather than register tags)
// follows the published wakeup array; the interface is this design's choice.
module wakeup_logic #(
  parameter int unsigned N = dls_pkg::IQ_SIZE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] alloc,
  input  logic [N-1:0] alloc_dep [N],
  input  logic [N-1:0] wake,
  input  logic [N-1:0] active,
  output logic [N-1:0] ready
);

  logic [N-1:0] dep_q [N];
  logic [N-1:0] dep_left [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      dep_left[i] = dep_q[i] & ~wake;
      ready[i]    = active[i] & ~|dep_left[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) dep_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (alloc[i]) dep_q[i] <= alloc_dep[i] & ~wake;
        else          dep_q[i] <= dep_left[i];
      end
    end
  end

endmodule
