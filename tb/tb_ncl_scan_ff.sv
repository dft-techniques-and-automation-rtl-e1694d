// tb_ncl_scan_ff: checks the mux-D scan flip-flop: capture of d, shift of
// scan_in, asynchronous reset, against a reference register kept here.
module tb_ncl_scan_ff;
  int checks = 0, failures = 0;
  logic clk = 0, rst, d, scan_in, scan_en, q, ref_q;

  ncl_scan_ff dut (.clk(clk), .rst(rst), .d(d), .scan_in(scan_in), .scan_en(scan_en), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    d = 1; scan_in = 1; scan_en = 0; rst = 1;
    #2;
    check(q == 0, "async reset");
    ref_q = 0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = 1'($urandom); scan_in = 1'($urandom); scan_en = 1'($urandom);
      if ($urandom_range(20) == 0) begin
        rst = 1; #1; check(q == 0, "async reset mid-run"); rst = 0; ref_q = 0;
      end
      @(posedge clk);
      ref_q = scan_en ? scan_in : d;
      #1;
      check(q == ref_q, "capture/shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
