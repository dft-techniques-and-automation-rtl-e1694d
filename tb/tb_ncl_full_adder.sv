// tb_ncl_full_adder: checks the dual-rail NCL full adder. Inputs arrive and
// leave one at a time in random order: the outputs must not be complete DATA
// before all inputs are DATA, nor complete NULL before all are NULL, and the
// final DATA must be the sum and carry. Test mode: the four feedback cells are
// loaded by scan and every gate output is compared with f + g*Q and captured.
module tb_ncl_full_adder;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t a, b, cin, s, cout;
  logic rst, clk, test_mode, scan_en, scan_in, scan_out;

  ncl_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .rst(rst), .clk(clk),
                      .test_mode(test_mode), .scan_en(scan_en), .scan_in(scan_in),
                      .scan_out(scan_out));

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

  task automatic pulse();
    clk = 1; #1; clk = 0; #1;
  endtask

  function automatic logic th(input int cnt, input int m, input logic any, input logic q);
    return (cnt >= m) || (any && q);
  endfunction

  initial begin
    clk = 0; test_mode = 0; scan_en = 0; scan_in = 0; a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    rst = 1; #1; rst = 0; #1;
    for (int i = 0; i < 400; i++) begin
      bit [2:0] v;
      bit [1:0] sum;
      int order[3];
      v = (i < 8) ? 3'(i) : 3'($urandom);
      sum = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
      order = '{0, 1, 2};
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        case (order[k])
          0: a = dr_encode(v[0]);
          1: b = dr_encode(v[1]);
          default: cin = dr_encode(v[2]);
        endcase
        #1;
        if (k < 2) check(!(dr_is_data(s) && dr_is_data(cout)), "no complete DATA early");
      end
      check(s == dr_encode(sum[0]) && cout == dr_encode(sum[1]), $sformatf("sum of %0b", v));
      order.shuffle();
      for (int k = 0; k < 3; k++) begin
        case (order[k])
          0: a = DR_NULL;
          1: b = DR_NULL;
          default: cin = DR_NULL;
        endcase
        #1;
        if (k < 2) check(!(dr_is_null(s) && dr_is_null(cout)), "no complete NULL early");
      end
      check(dr_is_null(s) && dr_is_null(cout), "NULL out");
    end
    // Test mode. Cells in chain order: co0, co1, s0, s1.
    for (int i = 0; i < 300; i++) begin
      logic [3:0] q, e;
      test_mode = 0; a = DR_NULL; b = DR_NULL; cin = DR_NULL;
      q = 4'($urandom);
      scan_en = 1;
      for (int k = 3; k >= 0; k--) begin scan_in = q[k]; pulse(); end
      scan_en = 0;
      a = 2'($urandom); b = 2'($urandom); cin = 2'($urandom);
      test_mode = 1;
      #1;
      e[0] = th(a.r0 + b.r0 + cin.r0, 2, a.r0 | b.r0 | cin.r0, q[0]);
      e[1] = th(a.r1 + b.r1 + cin.r1, 2, a.r1 | b.r1 | cin.r1, q[1]);
      e[2] = th(2 * e[1] + a.r0 + b.r0 + cin.r0, 3, e[1] | a.r0 | b.r0 | cin.r0, q[2]);
      e[3] = th(2 * e[0] + a.r1 + b.r1 + cin.r1, 3, e[0] | a.r1 | b.r1 | cin.r1, q[3]);
      check(cout.r0 == e[0] && cout.r1 == e[1] && s.r0 == e[2] && s.r1 == e[3], "test-mode gates");
      pulse();
      test_mode = 0; a = DR_NULL; b = DR_NULL; cin = DR_NULL;
      scan_en = 1;
      for (int k = 3; k >= 0; k--) begin
        check(scan_out == e[k], $sformatf("captured cell %0d", k));
        pulse();
      end
      scan_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
