// age_matrix: program-order tracking for oldest-first selection.
//
// older[i][j] = 1 when the instruction in entry j is older than the one in
// entry i. When entry i is dispatched, every instruction already in the queue
// is older than it, and so is every instruction dispatched in the same cycle
// from a lower dispatch slot (alloc_slot gives the slot of each allocated
// entry). The other rows clear column i, since the new instruction is younger
// than all of them. Entries are not cleared when they leave; a stale column
// only matters for an entry that is valid again, and then it has been
// rewritten. The published description asks for oldest-first selection but does not say
// how age is kept; the matrix is this design's choice.
module age_matrix #(
  parameter int unsigned N      = dls_pkg::IQ_SIZE,
  parameter int unsigned SLOT_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      valid,      // entries holding an instruction
  input  logic [N-1:0]      alloc,
  input  logic [SLOT_W-1:0] alloc_slot [N],
  output logic [N-1:0]      older [N]
);

  logic [N-1:0] older_q [N];

  assign older = older_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) older_q[i] <= '0;
    end else begin
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) begin
          if (alloc[r])
            older_q[r][c] <= (valid[c] && !alloc[c]) ||
                             (alloc[c] && (alloc_slot[c] < alloc_slot[r]));
          else if (alloc[c])
            older_q[r][c] <= 1'b0;
        end
      end
    end
  end

endmodule
