// tb_ncl_gfp_tp: checks the feedback control point: with tc=0 the request is
// passed unchanged, with tc=1 it is inverted.
module tb_ncl_gfp_tp;
  int checks = 0, failures = 0;
  logic fb, tc, ki;

  ncl_gfp_tp dut (.fb(fb), .tc(tc), .ki(ki));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 4; i++) begin
        {tc, fb} = 2'(i);
        #1;
        checks++;
        if (ki != (tc ? !fb : fb)) begin
          failures++;
          $display("FAIL fb=%0b tc=%0b ki=%0b", fb, tc, ki);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
