// d_logic: the request register between the Wakeup Logic and the Selection
// Logic (the pipeline register that splits the scheduling loop in two).
//
// Each entry's request for selection is the ready signal of the previous
// cycle. An entry classified "woken in selection" passes ready straight
// through, so it competes the cycle after waking up. An entry classified
// "woken in advance" may start requesting only in the cycle after the ZDL
// raised 'load', i.e. after every one-cycle producer that was competing has
// been selected; once it requests it keeps requesting while it stays ready,
// until it is issued. Without load it is held back at least one more cycle.
//
//   req[i](t+1) = ready[i](t) & (prod_class[i] | load(t) | req[i](t))
//
// The load-controlled register and the class encoding (0 = woken in advance)
// follow the published D-Logic slice; keeping an already released request
// while load is low is this design's reading, needed so that a released
// instruction that loses selection is not taken back.
module d_logic #(
  parameter int unsigned N = dls_pkg::IQ_SIZE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ready,
  input  logic [N-1:0] prod_class,   // 1 = woken in selection, 0 = woken in advance
  input  logic         load,
  output logic [N-1:0] req
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req <= '0;
    else        req <= ready & (prod_class | {N{load}} | req);
  end

endmodule
