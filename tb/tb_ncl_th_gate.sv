// tb_ncl_th_gate: checks threshold gates with hysteresis against a reference
// state model Z = f + g*Z-, computed here from the gate definition.
// Instances: TH23 (defaults), TH22, TH34w2, TH33 and TH14 (an OR). Random input
// sequences walk each gate through set, hold and reset; rst is also exercised.
module tb_ncl_th_gate;
  int checks = 0, failures = 0;

  logic [2:0] in23; logic [1:0] in22; logic [3:0] in34; logic [2:0] in33; logic [3:0] in14;
  logic rst;
  logic z23, z22, z34, z33, z14;
  logic f23, g23, f22, g22, f34, g34, f33, g33, f14, g14;
  logic m23, m22, m34, m33, m14;   // reference states

  ncl_th_gate                      u23 (.in(in23), .rst(rst), .z(z23), .set_f(f23), .hold_g(g23));
  ncl_th_gate #(.N(2), .M(2))      u22 (.in(in22), .rst(rst), .z(z22), .set_f(f22), .hold_g(g22));
  ncl_th_gate #(.N(4), .M(3), .W1(2)) u34 (.in(in34), .rst(rst), .z(z34), .set_f(f34), .hold_g(g34));
  ncl_th_gate #(.N(3), .M(3))      u33 (.in(in33), .rst(rst), .z(z33), .set_f(f33), .hold_g(g33));
  ncl_th_gate #(.N(4), .M(1))      u14 (.in(in14), .rst(rst), .z(z14), .set_f(f14), .hold_g(g14));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic next(input logic prev, input int cnt, input int m, input logic any);
    if (cnt >= m) return 1'b1;
    if (!any) return 1'b0;
    return prev;
  endfunction

  int n_set = 0, n_hold = 0, n_reset = 0;

  initial begin
    rst = 1; in23 = 0; in22 = 0; in34 = 0; in33 = 0; in14 = 0;
    #1;
    check(!z23 && !z22 && !z34 && !z33 && !z14, "rst clears outputs");
    m23 = 0; m22 = 0; m34 = 0; m33 = 0; m14 = 0;
    rst = 0;
    #1;
    for (int i = 0; i < 3000; i++) begin
      // Biased towards all-zero so that reset happens often.
      if ($urandom_range(3) == 0) begin
        in23 = 0; in22 = 0; in34 = 0; in33 = 0; in14 = 0;
      end else begin
        in23 = 3'($urandom); in22 = 2'($urandom); in34 = 4'($urandom);
        in33 = 3'($urandom); in14 = 4'($urandom);
      end
      #1;
      m23 = next(m23, $countones(in23), 2, |in23);
      m22 = next(m22, $countones(in22), 2, |in22);
      m34 = next(m34, $countones(in34[3:1]) + (in34[0] ? 2 : 0), 3, |in34);
      m33 = next(m33, $countones(in33), 3, |in33);
      m14 = next(m14, $countones(in14), 1, |in14);
      check(z23 == m23, "TH23");
      check(z22 == m22, "TH22");
      check(z34 == m34, "TH34w2");
      check(z33 == m33, "TH33");
      check(z14 == m14, "TH14");
      check(f23 == ($countones(in23) >= 2) && g23 == |in23, "TH23 set/hold terms");
      if ($countones(in23) >= 2) n_set++;
      else if (in23 != 0) n_hold++;
      else n_reset++;
    end
    // Explicit hysteresis sequence on TH23: 000 -> 011 -> 001 -> 000.
    in23 = 3'b000; #1; check(z23 == 0, "TH23 idle");
    in23 = 3'b011; #1; check(z23 == 1, "TH23 sets at 2 of 3");
    in23 = 3'b001; #1; check(z23 == 1, "TH23 holds at 1 of 3");
    in23 = 3'b000; #1; check(z23 == 0, "TH23 resets at 0 of 3");
    in23 = 3'b100; #1; check(z23 == 0, "TH23 stays low at 1 of 3");
    check(n_set > 0 && n_hold > 0 && n_reset > 0, "set, hold and reset all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
