// tb_ncl_adder_stage_variants: the adder stage built in the four test
// configurations that the design can be compared in:
//   v[0] no test structures, v[1] control point + XOR tree,
//   v[2] scannable observation latch only, v[3] gate-internal feedback scan only.
// All four are driven in lockstep through DATA/NULL handshakes and must add
// correctly. Each one's scan chain length (0, 0, 1, 16) is measured by
// shifting a marker through, the control point must block only where it is
// built, and the XOR-tree pin must be live only where the tree is built.
module tb_ncl_adder_stage_variants;
  import ncl_pkg::*;

  localparam int NV = 4;
  localparam int EXP_LEN [NV] = '{0, 0, 1, 16};

  dr_t  a, b, cin;
  dr_t  s [NV], cout [NV];
  logic [NV-1:0] ko, xor_po, cd_po, scan_out;
  logic ki, rst, tc, clk, test_mode, scan_en, scan_in;
  int checks = 0, failures = 0;

  ncl_adder_stage_dft #(.GIF_SCAN(0), .USE_TP(0), .USE_XOR_TREE(0), .USE_SOL(0)) v0 (
    .a(a), .b(b), .cin(cin), .s(s[0]), .cout(cout[0]), .ki(ki), .ko(ko[0]), .rst(rst), .tc(tc),
    .xor_po(xor_po[0]), .cd_po(cd_po[0]), .clk(clk), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out[0]));
  ncl_adder_stage_dft #(.GIF_SCAN(0), .USE_TP(1), .USE_XOR_TREE(1), .USE_SOL(0)) v1 (
    .a(a), .b(b), .cin(cin), .s(s[1]), .cout(cout[1]), .ki(ki), .ko(ko[1]), .rst(rst), .tc(tc),
    .xor_po(xor_po[1]), .cd_po(cd_po[1]), .clk(clk), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out[1]));
  ncl_adder_stage_dft #(.GIF_SCAN(0), .USE_TP(0), .USE_XOR_TREE(0), .USE_SOL(1)) v2 (
    .a(a), .b(b), .cin(cin), .s(s[2]), .cout(cout[2]), .ki(ki), .ko(ko[2]), .rst(rst), .tc(tc),
    .xor_po(xor_po[2]), .cd_po(cd_po[2]), .clk(clk), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out[2]));
  ncl_adder_stage_dft #(.GIF_SCAN(1), .USE_TP(0), .USE_XOR_TREE(0), .USE_SOL(0)) v3 (
    .a(a), .b(b), .cin(cin), .s(s[3]), .cout(cout[3]), .ki(ki), .ko(ko[3]), .rst(rst), .tc(tc),
    .xor_po(xor_po[3]), .cd_po(cd_po[3]), .clk(clk), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out[3]));

  logic wd_clk = 0;
  always #50 wd_clk = ~wd_clk;
  initial begin
    repeat (100000) @(posedge wd_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic bit all_data();
    for (int v = 0; v < NV; v++) if (!dr_is_data(s[v]) || !dr_is_data(cout[v])) return 0;
    return 1;
  endfunction

  function automatic bit all_null();
    for (int v = 0; v < NV; v++) if (!dr_is_null(s[v]) || !dr_is_null(cout[v])) return 0;
    return 1;
  endfunction

  task automatic pulse();
    clk = 1; #1; clk = 0; #1;
  endtask

  task automatic wavefront(input bit x, input bit y, input bit c);
    int n;
    bit [1:0] sum;
    sum = 2'(x) + 2'(y) + 2'(c);
    a = dr_encode(x); b = dr_encode(y); cin = dr_encode(c);
    n = 0; while (!all_data() && n < 100) begin #1 n++; end
    for (int v = 0; v < NV; v++) begin
      check(s[v] == dr_encode(sum[0]) && cout[v] == dr_encode(sum[1]), $sformatf("variant %0d sum", v));
      check(ko[v] == RFN, $sformatf("variant %0d ko after DATA", v));
    end
    check(xor_po[1] == 1'b1 && xor_po[0] == 1'b0, "XOR tree pin only where built");
    ki = RFN;
    a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    n = 0; while (!all_null() && n < 100) begin #1 n++; end
    #2;
    for (int v = 0; v < NV; v++) check(ko[v] == RFD && cd_po[v] == RFD, $sformatf("variant %0d NULL", v));
    ki = RFD;
    #2;
  endtask

  initial begin
    a = DR_NULL; b = DR_NULL; cin = DR_NULL; ki = RFD; tc = 0; clk = 0;
    test_mode = 0; scan_en = 0; scan_in = 0; rst = 1;
    #3; rst = 0; #2;
    for (int i = 0; i < 8; i++) wavefront(i[0], i[1], i[2]);

    // Control point: tc=1 blocks the input register only in variant 1.
    tc = 1; #2;
    a = DR_DATA1; b = DR_DATA1; cin = DR_DATA0;
    #20;
    check(ko[1] == RFD && dr_is_null(s[1]), "tc blocks variant 1");
    check(ko[0] == RFN && s[0] == DR_DATA0 && cout[0] == DR_DATA1, "tc ignored in variant 0");
    tc = 0; #20;
    check(ko[1] == RFN && s[1] == DR_DATA0, "variant 1 released");
    ki = RFN; a = DR_NULL; b = DR_NULL; cin = DR_NULL; #20; ki = RFD; #2;

    // SOL capture of the adder rails (never all four high in functional use).
    scan_en = 0; pulse();
    check(scan_out[2] == 1'b1, "SOL captures NAND = 1");

    // Chain lengths: flush with 0, then push one 1 and count clocks.
    scan_en = 1; scan_in = 0;
    repeat (20) pulse();
    for (int v = 0; v < NV; v++) check(scan_out[v] == 1'b0, "chain flushed");
    begin
      int seen [NV];
      for (int v = 0; v < NV; v++) seen[v] = -1;
      scan_in = 1;
      for (int k = 0; k <= 20; k++) begin
        #1;
        for (int v = 0; v < NV; v++) if (seen[v] < 0 && scan_out[v]) seen[v] = k;
        pulse();
        scan_in = 0;
      end
      for (int v = 0; v < NV; v++)
        check(seen[v] == EXP_LEN[v], $sformatf("variant %0d chain length %0d", v, seen[v]));
    end
    scan_en = 0;
    rst = 1; #2; rst = 0; #2;
    for (int i = 0; i < 8; i++) wavefront(i[2], i[1], i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
