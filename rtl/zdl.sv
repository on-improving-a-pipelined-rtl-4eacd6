// zdl: Zero Detection Logic.
//
// Every cycle the ZDL checks whether some one-cycle instruction (own class
// "wakeup in advance") is still requesting selection and has not been
// selected in this cycle. Requests of entries selected in the previous cycle
// are ignored: in the pipelined loop their request register still shows the
// old request for one cycle. When no such instruction remains, 'load' is
// raised and the D-Logic lets the woken-in-advance instructions compete in
// the next cycle. Purely combinational: load depends on this cycle's sel.
//
// The per-entry term req & !sel_prev & class & !sel, reduced over all entries,
// follows the published ZDL slice; its selection of which classification is
// counted follows the prose description (one-cycle producers); the drawing
// names the producer classification instead, and the README explains the choice.
module zdl #(
  parameter int unsigned N = dls_pkg::IQ_SIZE
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] sel_prev,
  input  logic [N-1:0] own_sel_class,  // 1 = multi-cycle, not counted
  input  logic [N-1:0] sel,
  output logic         load
);

  logic [N-1:0] pending;

  always_comb begin
    pending = req & ~sel_prev & ~own_sel_class & ~sel;
    load    = ~|pending;
  end

endmodule
