// tb_llr_gate: checks the four soft gates against integer reference rules
// (negation, max, min, sign-product times minimum magnitude) for random and
// corner-case inputs, including the saturation of -128 on negation.
module tb_llr_gate;
  import llr_pkg::*;
  llr_t a, b, y_not, y_and, y_or, y_xor;
  int checks = 0, failures = 0;

  llr_gate #(.OP(OP_NOT)) u_not (.a(a), .b(b), .y(y_not));
  llr_gate #(.OP(OP_AND)) u_and (.a(a), .b(b), .y(y_and));
  llr_gate #(.OP(OP_OR))  u_or  (.a(a), .b(b), .y(y_or));
  llr_gate #(.OP(OP_XOR)) u_xor (.a(a), .b(b), .y(y_xor));

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int clip(int v); return v > 127 ? 127 : (v < -127 ? -127 : v); endfunction

  task automatic check(int ia, int ib);
    int rn, ra, ro, rx, m;
    a = llr_t'(ia); b = llr_t'(ib);
    #1;
    rn = clip(-ia);
    ra = ia > ib ? ia : ib;
    ro = ia < ib ? ia : ib;
    m  = iabs(ia) < iabs(ib) ? iabs(ia) : iabs(ib);
    if (m > 127) m = 127;
    rx = ((ia < 0) != (ib < 0)) ? -m : m;
    checks += 4;
    if (int'(y_not) != rn) begin failures++; $display("NOT(%0d)=%0d exp %0d", ia, y_not, rn); end
    if (int'(y_and) != ra) begin failures++; $display("AND(%0d,%0d)=%0d exp %0d", ia, ib, y_and, ra); end
    if (int'(y_or)  != ro) begin failures++; $display("OR(%0d,%0d)=%0d exp %0d", ia, ib, y_or, ro); end
    if (int'(y_xor) != rx) begin failures++; $display("XOR(%0d,%0d)=%0d exp %0d", ia, ib, y_xor, rx); end
  endtask

  initial begin
    check(0, 0); check(127, -127); check(-128, 5); check(-128, -128); check(3, -3);
    check(-7, -2); check(100, 20);
    repeat (2000) check(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128);
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
