// tb_ncl_sol: checks the scannable observation latch: a capture clock stores
// the NAND of the four observed nets, a shift clock passes scan_in, rst clears.
module tb_ncl_sol;
  int checks = 0, failures = 0;
  logic [3:0] obs;
  logic clk = 0, rst, scan_en, scan_in, q;

  ncl_sol dut (.obs(obs), .clk(clk), .rst(rst), .scan_en(scan_en), .scan_in(scan_in), .q(q));

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

  int n_zero = 0;

  initial begin
    obs = '1; scan_en = 0; scan_in = 1; rst = 1;
    #2; check(q == 0, "reset");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      logic e;
      @(negedge clk);
      obs = ($urandom_range(4) == 0) ? 4'hF : 4'($urandom);
      scan_en = ($urandom_range(3) == 0);
      scan_in = 1'($urandom);
      e = scan_en ? scan_in : !(obs == 4'hF);
      if (!scan_en && obs == 4'hF) n_zero++;
      @(posedge clk); #1;
      check(q == e, "capture NAND / shift");
    end
    check(n_zero > 0, "NAND low captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
