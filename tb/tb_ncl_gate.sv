// tb_ncl_gate: checks the gate wrapper's choice of test form. With GIF_SCAN=1
// a TH23 gate gets a feedback scan cell (one clock of chain delay, Z = f + g*Q
// in test mode) while a TH13 gate, an OR with no internal feedback, gets none:
// its chain input passes straight to its chain output and it stays an OR.
module tb_ncl_gate;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic rst, clk, test_mode, scan_en, scan_in, z23, z13, mid, so;

  ncl_gate #(.N(3), .M(2)) u_th23 (.in(in), .rst(rst), .z(z23), .clk(clk), .test_mode(test_mode),
                                   .scan_en(scan_en), .scan_in(scan_in), .scan_out(mid));
  ncl_gate #(.N(3), .M(1)) u_th13 (.in(in), .rst(rst), .z(z13), .clk(clk), .test_mode(test_mode),
                                   .scan_en(scan_en), .scan_in(mid), .scan_out(so));

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

  initial begin
    clk = 0; in = 0; test_mode = 0; scan_en = 0; scan_in = 0; rst = 1;
    #1; rst = 0; #1;
    for (int i = 0; i < 200; i++) begin
      logic q;
      q = 1'($urandom);
      scan_en = 1; scan_in = q; pulse(); scan_en = 0;
      check(so == q, "TH13 passes the chain; TH23 adds one cell");
      in = 3'($urandom);
      test_mode = 1'($urandom);
      #1;
      check(z13 == |in, "TH13 is an OR in both modes");
      if (test_mode)
        check(z23 == (($countones(in) >= 2) || ((in != 0) && q)), "TH23 test-mode output");
      test_mode = 0; in = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
