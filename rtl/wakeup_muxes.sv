// wakeup_muxes: the per-entry multiplexers that choose which scheduling loop
// drives an entry's wakeup signal, plus the selection register of the
// two-cycle loop.
//
// A one-cycle instruction (own class WAKEUP_IN_ADVANCE) wakes its dependents
// through the one-cycle loop: its wakeup signal is its own selection request,
// so the consumers wake up while the producer is still competing. A
// multi-cycle instruction (WAKEUP_IN_SELECTION) wakes them through the
// two-cycle loop: the selection signal is registered and drives the wakeup in
// the cycle after selection. For latencies above two cycles this design adds a
// per-entry countdown of (latency - 2) cycles after selection, so that a
// consumer is selected exactly 'latency' cycles after its producer; the
// published drawing only shows the two-cycle path. Each entry broadcasts its wakeup
// once; 'woke' tells the issue queue that it has done so.
//
// Timing: wake is combinational from req_eff for one-cycle entries and from
// registered state for multi-cycle ones. sel_prev is sel delayed by one cycle
// (the "previous cycle: sel" input of the ZDL slice). clear re-initialises an
// entry that is being dispatched.
module wakeup_muxes #(
  parameter int unsigned N     = dls_pkg::IQ_SIZE,
  parameter int unsigned LAT_W = dls_pkg::LAT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        clear,
  input  logic [N-1:0]        own_sel_class,   // 1 = wakeup in selection (multi-cycle)
  input  logic [LAT_W-1:0]    lat [N],         // execution latency of each entry
  input  logic [N-1:0]        req_eff,         // requests seen by the selection logic
  input  logic [N-1:0]        sel,             // selection of this cycle
  output logic [N-1:0]        wake,
  output logic [N-1:0]        woke,            // wake now or already broadcast
  output logic [N-1:0]        sel_prev
);

  logic [N-1:0]     sel_q;
  logic [N-1:0]     woke_q;
  logic [N-1:0]     wpend_q;                   // selected, delayed wakeup pending
  logic [LAT_W-1:0] wcnt_q [N];

  assign sel_prev = sel_q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (own_sel_class[i])
        wake[i] = wpend_q[i] && (wcnt_q[i] == '0);
      else
        wake[i] = req_eff[i] && !woke_q[i];
      woke[i] = woke_q[i] | wake[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q   <= '0;
      woke_q  <= '0;
      wpend_q <= '0;
      for (int i = 0; i < N; i++) wcnt_q[i] <= '0;
    end else begin
      sel_q <= sel & ~clear;
      for (int i = 0; i < N; i++) begin
        if (clear[i]) begin
          woke_q[i]  <= 1'b0;
          wpend_q[i] <= 1'b0;
          wcnt_q[i]  <= '0;
        end else begin
          woke_q[i] <= woke[i];
          if (wake[i]) begin
            wpend_q[i] <= 1'b0;
          end else if (sel[i] && own_sel_class[i]) begin
            wpend_q[i] <= 1'b1;
            wcnt_q[i]  <= (lat[i] > LAT_W'(2)) ? lat[i] - LAT_W'(2) : '0;
          end else if (wpend_q[i]) begin
            wcnt_q[i]  <= wcnt_q[i] - LAT_W'(1);
          end
        end
      end
    end
  end

endmodule
