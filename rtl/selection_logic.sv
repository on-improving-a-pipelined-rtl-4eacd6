// selection_logic: oldest-first selection of up to W requesting entries.
//
// An entry is selected when it requests and fewer than K older entries also
// request, K being the number of issue ports available this cycle. Its rank
// (the number of older requesting entries) picks the port: rank k goes to the
// k-th available port, counted from port 0. Combinational; the selection is
// registered outside (two-cycle loop) and also used in the same cycle by the
// ZDL and by the issue outputs.
//
// Oldest-first priority and per-port availability follow the published description; the
// identical, fully general issue ports and the rank-based port assignment are
// this design's choices.
module selection_logic #(
  parameter int unsigned N = dls_pkg::IQ_SIZE,
  parameter int unsigned W = dls_pkg::ISSUE_W
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         older [N],
  input  logic [W-1:0]         port_avail,
  output logic [N-1:0]         sel,
  output logic [W-1:0]         grant_valid,
  output logic [$clog2(N)-1:0] grant_idx [W]
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] rank [N];
  logic [CW-1:0] slot_of_port [W];   // rank served by each port
  logic [CW-1:0] navail;

  always_comb begin
    // rank of each entry among the requesters
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++)
        rank[i] = rank[i] + CW'(req[j] & older[i][j]);
    end
    // which rank each available port takes
    navail = '0;
    for (int p = 0; p < W; p++) begin
      slot_of_port[p] = navail;
      navail          = navail + CW'(port_avail[p]);
    end
    for (int i = 0; i < N; i++)
      sel[i] = req[i] && (rank[i] < navail);
    for (int p = 0; p < W; p++) begin
      grant_valid[p] = 1'b0;
      grant_idx[p]   = '0;
      for (int i = 0; i < N; i++) begin
        if (port_avail[p] && sel[i] && rank[i] == slot_of_port[p]) begin
          grant_valid[p] = 1'b1;
          grant_idx[p]   = i[$clog2(N)-1:0];
        end
      end
    end
  end

endmodule
