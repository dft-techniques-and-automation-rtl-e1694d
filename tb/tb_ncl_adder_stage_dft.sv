// tb_ncl_adder_stage_dft: end-to-end test of the NCL full-adder stage with all
// test structures, at the module's default parameters.
//
// Functional part: the testbench plays producer and consumer of a four-phase
// NCL handshake and pushes every input combination (and random ones) through
// as DATA/NULL wavefronts, checking sum, carry, ko, cd_po and the XOR-tree pin
// against arithmetic done here. It also holds the consumer back to make the
// pipeline stall, and raises tc to show the control point blocking the input
// register. Test part: it checks the scan chain length and reset, then runs
// random scan patterns in test mode: load the 17 cells, capture, unload, and
// compare every captured gate output and the SOL with a gate-level reference
// model written here from the threshold-gate equations. Each mechanism is
// counted; one that never happens counts as a failure.
module tb_ncl_adder_stage_dft;
  import ncl_pkg::*;

  localparam int CELLS = 17;

  dr_t  a, b, cin, s, cout;
  logic ki, ko, rst, tc, xor_po, cd_po, clk, test_mode, scan_en, scan_in, scan_out;

  int checks = 0, failures = 0;
  int n_wavefront = 0, n_stall = 0, n_tc_block = 0, n_xor_obs = 0;
  int n_sol0 = 0, n_sol1 = 0, n_gif_capture = 0, n_shift = 0, n_reset = 0;

  ncl_adder_stage_dft dut (
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .ki(ki), .ko(ko), .rst(rst),
    .tc(tc), .xor_po(xor_po), .cd_po(cd_po), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out)
  );

  // Watchdog: a free-running tick, independent of the design.
  logic wd_clk = 0;
  always #50 wd_clk = ~wd_clk;
  initial begin
    repeat (200000) @(posedge wd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- functional helpers ----------------
  task automatic wait_until_outputs(input bit data, output int steps);
    steps = 0;
    while (steps < 100) begin
      if (data ? (dr_is_data(s) && dr_is_data(cout)) : (dr_is_null(s) && dr_is_null(cout))) break;
      #1 steps++;
    end
  endtask

  task automatic wait_ko(input logic level);
    int n = 0;
    while (ko !== level && n < 100) begin #1 n++; end
    check(ko === level, "ko reaches requested level");
  endtask

  // One full DATA + NULL cycle of operands x, y, c.
  task automatic wavefront(input bit x, input bit y, input bit c);
    int steps;
    bit [1:0] sum;
    sum = 2'(x) + 2'(y) + 2'(c);
    wait_ko(RFD);
    a = dr_encode(x); b = dr_encode(y); cin = dr_encode(c);
    wait_until_outputs(1, steps);
    check(steps < 100, "DATA reaches the outputs");
    check(s == dr_encode(sum[0]) && cout == dr_encode(sum[1]),
          $sformatf("sum of %0d+%0d+%0d", x, y, c));
    check(cd_po == RFN, "output completion reports DATA");
    wait_ko(RFN);
    check(xor_po == 1'b1, "XOR tree sees a DATA wavefront (odd rail count)");
    n_xor_obs++;
    ki = RFN;
    a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    wait_until_outputs(0, steps);
    check(steps < 100, "NULL reaches the outputs");
    wait_ko(RFD);
    check(xor_po == 1'b0, "XOR tree sees a NULL wavefront");
    check(cd_po == RFD, "output completion reports NULL");
    ki = RFD;
    #2;
    n_wavefront++;
  endtask

  // ---------------- scan helpers ----------------
  task automatic pulse_clk();
    clk = 1; #1; clk = 0; #1;
  endtask

  // Shift a full vector in; v[CELLS-1] goes in first and ends in the last cell.
  // Returns the bits shifted out (the old contents, oldest cell first).
  task automatic shift(input logic [CELLS-1:0] v, output logic [CELLS-1:0] out);
    scan_en = 1;
    for (int i = CELLS - 1; i >= 0; i--) begin
      out[i] = scan_out;   // cell CELLS-1-(CELLS-1-i) appears in order
      scan_in = v[i];
      pulse_clk();
    end
    scan_en = 0;
    n_shift++;
  endtask

  // Reference threshold gate in test mode: Z = f + g*Q.
  function automatic logic th(input logic [3:0] in, input int n, input int m,
                              input int w1, input logic q);
    int acc;
    logic g;
    acc = in[0] ? w1 : 0;
    g = in[0];
    for (int i = 1; i < n; i++) begin
      acc += in[i] ? 1 : 0;
      g |= in[i];
    end
    return (acc >= m) || (g && q);
  endfunction

  // Reference model: every gate output in test mode, indexed like the cells.
  // cell: 0 SOL, 1..6 A0 A1 B0 B1 C0 C1, 7 co0, 8 co1, 9 s0, 10 s1,
  // 11 S0, 12 S1, 13 Co0, 14 Co1, 15 cd_in, 16 cd_out.
  function automatic logic [CELLS-1:0] model(input logic [CELLS-1:0] q, input dr_t xa,
      input dr_t xb, input dr_t xc, input logic k, input logic t, output logic po_xor,
      output logic po_ko, output dr_t po_s, output dr_t po_c, output logic po_cd);
    logic [CELLS-1:0] z;
    logic cdo, kin;
    logic [5:0] x;
    x = {xc.r1, xc.r0, xb.r1, xb.r0, xa.r1, xa.r0};
    // The loop is cut by the chosen patterns, so two passes settle it.
    kin = 1'b0;
    z = '0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 6; i++) z[1+i] = th({2'b0, kin, x[i]}, 2, 2, 1, q[1+i]);
      z[7]  = th({1'b0, z[5], z[3], z[1]}, 3, 2, 1, q[7]);
      z[8]  = th({1'b0, z[6], z[4], z[2]}, 3, 2, 1, q[8]);
      z[9]  = th({z[5], z[3], z[1], z[8]}, 4, 3, 2, q[9]);
      z[10] = th({z[6], z[4], z[2], z[7]}, 4, 3, 2, q[10]);
      z[11] = th({2'b0, k, z[9]},  2, 2, 1, q[11]);
      z[12] = th({2'b0, k, z[10]}, 2, 2, 1, q[12]);
      z[13] = th({2'b0, k, z[7]},  2, 2, 1, q[13]);
      z[14] = th({2'b0, k, z[8]},  2, 2, 1, q[14]);
      z[15] = th({1'b0, ~(z[6] | z[5]), ~(z[4] | z[3]), ~(z[2] | z[1])}, 3, 3, 1, q[15]);
      cdo   = th({2'b0, ~(z[14] | z[13]), ~(z[12] | z[11])}, 2, 2, 1, q[16]);
      z[16] = cdo;
      kin   = cdo ^ t;
    end
    z[0] = ~(z[8] & z[7] & z[10] & z[9]);
    po_xor = ^z[6:1];
    po_ko  = z[15];
    po_s   = '{r1: z[12], r0: z[11]};
    po_c   = '{r1: z[14], r0: z[13]};
    po_cd  = z[16];
    return z;
  endfunction

  task automatic gif_pattern(input bit cut_at_output);
    logic [CELLS-1:0] q, z_exp, unload;
    logic e_xor, e_ko, e_cd;
    dr_t e_s, e_c, xa, xb, xc;
    logic k, t;
    q  = CELLS'({$urandom, $urandom});
    xa = 2'($urandom); xb = 2'($urandom); xc = 2'($urandom);
    t  = 1'($urandom);
    if (cut_at_output) begin
      k = 1'b0;
      q[14:11] = '0;               // output register cannot pass anything
    end else begin
      k = 1'($urandom);
      q[6:1] = {xc.r1, xc.r0, xb.r1, xb.r0, xa.r1, xa.r0};  // input register follows x
    end
    // Load in functional mode with quiet inputs.
    test_mode = 0; a = DR_NULL; b = DR_NULL; cin = DR_NULL; ki = RFD; tc = 0;
    shift(q, unload);
    a = xa; b = xb; cin = xc; ki = k; tc = t;
    test_mode = 1;
    #1;
    z_exp = model(q, xa, xb, xc, k, t, e_xor, e_ko, e_s, e_c, e_cd);
    check(s == e_s && cout == e_c, "test-mode primary outputs s/cout");
    check(ko == e_ko, "test-mode ko");
    check(xor_po == e_xor, "test-mode XOR tree output");
    check(cd_po == e_cd, "test-mode completion output");
    // Capture every gate output into its cell.
    pulse_clk();
    n_gif_capture++;
    if (z_exp[0]) n_sol1++; else n_sol0++;
    // Leave test mode and quiet the inputs in the same instant, so the
    // handshake loop is never closed with arbitrary values on it.
    test_mode = 0; a = DR_NULL; b = DR_NULL; cin = DR_NULL; ki = RFD; tc = 0;
    #1;
    shift('0, unload);
    for (int i = 0; i < CELLS; i++)
      check(unload[i] == z_exp[i], $sformatf("captured cell %0d", i));
  endtask

  initial begin
    logic [CELLS-1:0] v, out, out2;
    a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    ki = RFD; tc = 0; clk = 0; test_mode = 0; scan_en = 0; scan_in = 0;
    rst = 1;
    #5;
    n_reset++;
    check(dr_is_null(s) && dr_is_null(cout), "reset leaves outputs NULL");
    rst = 0;
    #2;
    check(ko == RFD, "after reset ko = rfd");

    // ---- every operand combination, then random ones ----
    for (int i = 0; i < 8; i++) wavefront(i[0], i[1], i[2]);
    for (int i = 0; i < 40; i++) wavefront(1'($urandom), 1'($urandom), 1'($urandom));

    // ---- stall: consumer keeps asking for DATA on a full output register ----
    for (int i = 0; i < 4; i++) begin
      int steps;
      bit x, y, c, x2, y2, c2;
      bit [1:0] sum, sum2;
      {x, y, c} = 3'($urandom); {x2, y2, c2} = 3'($urandom);
      sum = 2'(x) + 2'(y) + 2'(c); sum2 = 2'(x2) + 2'(y2) + 2'(c2);
      wait_ko(RFD);
      a = dr_encode(x); b = dr_encode(y); cin = dr_encode(c);
      wait_until_outputs(1, steps);
      wait_ko(RFN);
      a = DR_NULL; b = DR_NULL; cin = DR_NULL;   // producer moves on
      wait_ko(RFD);
      a = dr_encode(x2); b = dr_encode(y2); cin = dr_encode(c2);
      #20;
      check(s == dr_encode(sum[0]) && cout == dr_encode(sum[1]), "stalled outputs hold");
      check(xor_po == 1'b0 && ko == RFD, "input register waits during stall");
      n_stall++;
      ki = RFN;                                    // consumer releases
      wait_until_outputs(0, steps);
      check(steps < 100, "NULL after stall");
      wait_ko(RFN);                                // next DATA enters the input register
      ki = RFD;
      wait_until_outputs(1, steps);
      check(s == dr_encode(sum2[0]) && cout == dr_encode(sum2[1]), "sum after stall");
      ki = RFN;
      a = DR_NULL; b = DR_NULL; cin = DR_NULL;
      wait_until_outputs(0, steps);
      wait_ko(RFD);
      ki = RFD;
      #2;
    end

    // ---- control point: tc inverts the input register's Ki ----
    for (int i = 0; i < 4; i++) begin
      bit x, y, c;
      {x, y, c} = 3'($urandom);
      tc = 1;
      #2;
      a = dr_encode(x); b = dr_encode(y); cin = dr_encode(c);
      #20;
      check(xor_po == 1'b0 && ko == RFD && dr_is_null(s), "tc=1 blocks the input register");
      n_tc_block++;
      tc = 0;
      #20;
      check(xor_po == 1'b1 && ko == RFN, "tc=0 releases the input register");
      check(s == dr_encode(x ^ y ^ c), "sum after release");
      ki = RFN;
      a = DR_NULL; b = DR_NULL; cin = DR_NULL;
      wait_ko(RFD);
      #5;
      ki = RFD;
      #2;
    end
    wavefront(1, 0, 1);

    // ---- scan chain: length and reset ----
    v = CELLS'({$urandom, $urandom});
    shift(v, out);
    shift('0, out2);
    check(out2 == v, "scan chain returns the shifted vector after 17 clocks");
    shift('1, out);
    rst = 1; #1; rst = 0; #1;
    n_reset++;
    a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    shift('0, out);
    check(out == '0, "reset clears every scan cell");

    // ---- GIF scan patterns ----
    for (int i = 0; i < 150; i++) gif_pattern(1'b1);
    for (int i = 0; i < 150; i++) gif_pattern(1'b0);

    // ---- back to functional use ----
    rst = 1; #2; rst = 0; #2;
    n_reset++;
    for (int i = 0; i < 8; i++) wavefront(i[0], i[1], i[2]);

    $display("mechanisms: wavefronts=%0d stalls=%0d tc_blocks=%0d xor_obs=%0d sol0=%0d sol1=%0d gif_captures=%0d shifts=%0d resets=%0d",
             n_wavefront, n_stall, n_tc_block, n_xor_obs, n_sol0, n_sol1, n_gif_capture, n_shift, n_reset);
    check(n_wavefront > 0, "wavefronts happened");
    check(n_stall > 0, "stall happened");
    check(n_tc_block > 0, "control point used");
    check(n_xor_obs > 0, "XOR tree observed");
    check(n_sol0 > 0 && n_sol1 > 0, "SOL captured both values");
    check(n_gif_capture > 0, "GIF captures happened");
    check(n_shift > 0, "scan shifts happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
