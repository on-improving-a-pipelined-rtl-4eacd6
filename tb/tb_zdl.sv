// tb_zdl: exhaustive-by-random test of the Zero Detection Logic.
// For random request, previous-selection, class and selection vectors the
// expected load is worked out entry by entry: load is low exactly when some
// one-cycle instruction requests, was not selected last cycle and is not
// selected now. Directed cases cover the corner values.
module tb_zdl;
  localparam int N = 32;
  logic [N-1:0] req, sel_prev, own_sel_class, sel;
  logic load;
  int checks = 0, failures = 0;

  zdl #(.N(N)) dut (.*);

  task automatic one(logic [N-1:0] r, logic [N-1:0] sp, logic [N-1:0] c, logic [N-1:0] s);
    bit exp;
    req = r; sel_prev = sp; own_sel_class = c; sel = s;
    #1;
    exp = 1;
    for (int i = 0; i < N; i++)
      if (r[i] == 1 && sp[i] == 0 && c[i] == 0 && s[i] == 0) exp = 0;
    checks++;
    if (load !== exp) begin
      failures++;
      $display("FAIL req=%h prev=%h cls=%h sel=%h load=%b exp=%b", r, sp, c, s, load, exp);
    end
  endtask

  initial begin
    one('0, '0, '0, '0);                       // nothing requests
    one(32'h1, '0, '0, '0);                    // one-cycle pending
    one(32'h1, '0, '0, 32'h1);                 // selected now
    one(32'h1, 32'h1, '0, '0);                 // selected last cycle
    one(32'h1, '0, 32'h1, '0);                 // multi-cycle: not counted
    one(32'h8000_0000, '0, '0, '0);            // last entry
    one('1, '0, '0, 32'h7fff_ffff);            // one left over
    one('1, '0, '0, '1);                       // all selected
    repeat (2000) begin
      logic [N-1:0] r, s;
      r = $urandom & $urandom;
      s = r & $urandom;
      one(r, $urandom & $urandom & ~s, $urandom, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
