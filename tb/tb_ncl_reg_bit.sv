// tb_ncl_reg_bit: checks the one-bit NCL register. Functional: random DATA /
// NULL inputs and ki against a per-rail C-element model and ko = NOR of the
// rails, plus reset to NULL. Test mode: both feedback cells loaded by scan,
// outputs compared with f + g*Q, then captured and shifted out.
module tb_ncl_reg_bit;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t x, z, m;
  logic ki, ko, rst, clk, test_mode, scan_en, scan_in, scan_out;

  ncl_reg_bit dut (.x(x), .z(z), .ki(ki), .ko(ko), .rst(rst), .clk(clk), .test_mode(test_mode),
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

  function automatic logic c_el(input logic a, input logic b, input logic prev);
    return (a && b) ? 1'b1 : (!a && !b) ? 1'b0 : prev;
  endfunction

  int n_pass = 0, n_block = 0;

  initial begin
    clk = 0; test_mode = 0; scan_en = 0; scan_in = 0; x = DR_NULL; ki = RFD; rst = 1;
    #1;
    check(dr_is_null(z) && ko == RFD, "reset to NULL, ko = rfd");
    rst = 0; m = DR_NULL;
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(2))
        0: x = DR_NULL;
        1: x = DR_DATA0;
        default: x = DR_DATA1;
      endcase
      ki = 1'($urandom);
      #1;
      m.r0 = c_el(x.r0, ki, m.r0);
      m.r1 = c_el(x.r1, ki, m.r1);
      check(z == m, "rails follow C-element model");
      check(ko == (dr_is_null(z) ? RFD : RFN), "ko = rfd iff output NULL");
      if (dr_is_data(x) && ki == RFD) n_pass++;
      if (dr_is_data(x) && ki == RFN && dr_is_null(z)) n_block++;
    end
    check(n_pass > 0 && n_block > 0, "DATA passed and blocked");
    // Test mode.
    for (int i = 0; i < 300; i++) begin
      logic [1:0] q, e;
      q = 2'($urandom);
      x = DR_NULL; ki = RFD; test_mode = 0;
      scan_en = 1;
      scan_in = q[1]; pulse();
      scan_in = q[0]; pulse();
      scan_en = 0;
      x = 2'($urandom); ki = 1'($urandom);
      test_mode = 1;
      #1;
      e[0] = (x.r0 && ki) || ((x.r0 || ki) && q[0]);
      e[1] = (x.r1 && ki) || ((x.r1 || ki) && q[1]);
      check(z.r0 == e[0] && z.r1 == e[1], "test-mode outputs");
      pulse();
      test_mode = 0; x = DR_NULL; ki = RFD;
      scan_en = 1;
      check(scan_out == e[1], "captured rail 1");
      pulse();
      check(scan_out == e[0], "captured rail 0");
      scan_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
