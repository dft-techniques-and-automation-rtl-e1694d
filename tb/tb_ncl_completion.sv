// tb_ncl_completion: checks the completion detector (N=2 default and N=3):
// output rises when every ko is rfd, falls when every ko is rfn, else holds.
// The N=2 instance is also checked in test mode through its scan cell.
module tb_ncl_completion;
  int checks = 0, failures = 0;
  logic [1:0] k2; logic [2:0] k3;
  logic d2, d3, m2, m3, rst, clk, test_mode, scan_en, scan_in, so2, so3;

  ncl_completion u2 (.ko_bits(k2), .done(d2), .rst(rst), .clk(clk), .test_mode(test_mode),
                     .scan_en(scan_en), .scan_in(scan_in), .scan_out(so2));
  ncl_completion #(.N(3)) u3 (.ko_bits(k3), .done(d3), .rst(rst), .clk(clk),
                     .test_mode(test_mode), .scan_en(scan_en), .scan_in(so2), .scan_out(so3));

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
    clk = 0; test_mode = 0; scan_en = 0; scan_in = 0; k2 = 0; k3 = 0; rst = 1;
    #1; rst = 0; #1;
    m2 = 0; m3 = 0;
    for (int i = 0; i < 2000; i++) begin
      k2 = 2'($urandom); k3 = 3'($urandom);
      if ($urandom_range(3) == 0) begin k2 = '1; k3 = '1; end
      #1;
      m2 = (k2 == '1) ? 1'b1 : (k2 == '0) ? 1'b0 : m2;
      m3 = (k3 == '1) ? 1'b1 : (k3 == '0) ? 1'b0 : m3;
      check(d2 == m2, "2-bit detector");
      check(d3 == m3, "3-bit detector");
    end
    for (int i = 0; i < 200; i++) begin
      logic q, e;
      q = 1'($urandom);
      test_mode = 0; scan_en = 1; scan_in = q; pulse(); scan_en = 0;
      k2 = 2'($urandom);
      test_mode = 1; #1;
      e = (k2 == '1) || ((k2 != '0) && q);
      check(d2 == e, "test-mode detector");
      pulse();
      check(so2 == e, "capture");
      test_mode = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
