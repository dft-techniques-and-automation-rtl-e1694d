// tb_ncl_th_gif_scan: checks the scan-testable TH23 gate. Functional mode must
// match the hysteresis model; in test mode the output must be f + g*Q with Q
// loaded through scan_in, and a capture clock must store the output in Q.
module tb_ncl_th_gif_scan;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic rst, z, clk, test_mode, scan_en, scan_in, scan_out, m;

  ncl_th_gif_scan dut (.in(in), .rst(rst), .z(z), .clk(clk), .test_mode(test_mode),
                       .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out));

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

  int n_hold_from_q = 0;

  initial begin
    clk = 0; test_mode = 0; scan_en = 0; scan_in = 0; in = 0; rst = 1;
    #1; rst = 0; m = 0; #1;
    check(z == 0 && scan_out == 0, "reset");
    // Functional mode: ordinary TH23.
    for (int i = 0; i < 500; i++) begin
      in = ($urandom_range(2) == 0) ? 3'b000 : 3'($urandom);
      #1;
      if ($countones(in) >= 2) m = 1; else if (in == 0) m = 0;
      check(z == m, "functional TH23");
    end
    // Test mode: load Q, apply inputs, check f + g*Q, capture.
    for (int i = 0; i < 500; i++) begin
      logic qv, exp_z;
      qv = 1'($urandom);
      test_mode = 0;
      scan_en = 1; scan_in = qv; pulse(); scan_en = 0;
      check(scan_out == qv, "shift loads Q");
      in = 3'($urandom);
      test_mode = 1;
      #1;
      exp_z = ($countones(in) >= 2) || ((in != 0) && qv);
      if ($countones(in) == 1) n_hold_from_q++;
      check(z == exp_z, "test mode Z = f + g*Q");
      pulse();
      check(scan_out == exp_z, "capture stores Z");
    end
    check(n_hold_from_q > 0, "hold term exercised in test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
