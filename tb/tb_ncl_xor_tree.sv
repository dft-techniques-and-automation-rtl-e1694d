// tb_ncl_xor_tree: checks that the XOR tree output is the parity of its
// inputs, for 6 inputs (default), 7 (odd carry) and 1 (no gates).
module tb_ncl_xor_tree;
  int checks = 0, failures = 0;
  logic [5:0] in6; logic [6:0] in7; logic in1;
  logic po6, po7, po1;

  ncl_xor_tree          u6 (.in(in6), .po(po6));
  ncl_xor_tree #(.N(7)) u7 (.in(in7), .po(po7));
  ncl_xor_tree #(.N(1)) u1 (.in(in1), .po(po1));

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

  initial begin
    for (int i = 0; i < 128; i++) begin
      int ones6, ones7;
      in6 = 6'(i); in7 = 7'(i); in1 = i[0];
      #1;
      ones6 = 0; ones7 = 0;
      for (int k = 0; k < 6; k++) ones6 += in6[k];
      for (int k = 0; k < 7; k++) ones7 += in7[k];
      check(po6 == ones6[0], "6-input parity");
      check(po7 == ones7[0], "7-input parity");
      check(po1 == in1, "1-input tree");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
