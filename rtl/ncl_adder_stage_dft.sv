// ncl_adder_stage_dft: a dual-rail NCL full-adder pipeline stage with the
// complete set of test structures for scan-based ATPG of clockless NCL logic.
//
// Datapath (NCL pipeline framework): an input register of three one-bit
// dual-rail registers (A, B, Cin) feeds an NCL full adder, whose outputs enter
// an output register of two one-bit registers (S, Cout). Each register has a
// completion detector: the input register's drives ko towards the producer;
// the output register's drives, through the test point, the Ki of the input
// register. The consumer's request ki drives the output register directly.
// DATA and NULL wavefronts alternate under this four-phase handshake.
//
// Test structures:
//  * Control point: the global feedback path from the output completion
//    detector to the input register passes through an XOR with the tc pin
//    (tc=0 in functional use). ncl_gfp_tp.
//  * XOR tree: the six rails leaving the input register are folded into one
//    observation pin, xor_po. ncl_xor_tree.
//  * Scannable observation latch: the four rails leaving the full adder are
//    grouped by a NAND into a scan flip-flop, first cell of the scan chain.
//    ncl_sol.
//  * Gate-internal feedback scan (GIF_SCAN=1): every threshold gate except
//    TH1n has its hysteresis feedback routed through a scan cell; test_mode
//    selects that feedback. ncl_th_gif_scan.
//  * cd_po brings the output completion detector out as an observation pin.
// Scan chain order: scan_in -> SOL -> A, B, Cin registers (rail 0, rail 1)
// -> full adder (cout^0, cout^1, s^0, s^1) -> S, Cout registers -> input
// completion detector -> output completion detector -> scan_out: 17 cells
// with every structure on (SCAN_CELLS gives the count for any setting).
//
// Each structure can be left out by a parameter, so the same source gives the
// stage with no test structures, with the control point and XOR tree, with the
// SOL, or with gate-internal feedback scan. All four are on by default. When
// USE_TP=0, tc is ignored; when USE_XOR_TREE=0, xor_po is tied to 0; when no
// cell is on the chain, scan_out follows scan_in.
//
// The stage, its registers, completion detectors, TC-controlled XOR, XOR tree
// of the register outputs, NAND-grouped SOL and GIF scan cells follow the
// method this design implements. Which nets feed the SOL, the chain order, the
// single test_mode select, using all three techniques at once, and the gate
// structures of the adder, registers and detectors are this design's choices.
//
// Test use: shift the chain with test_mode=0 and scan_en=1; apply the primary
// inputs; set test_mode=1 and give one clk edge with scan_en=0 to capture
// every gate output into its cell; return test_mode to 0 and shift out. In
// test mode the global handshake loop (input register -> adder -> output
// register -> detector -> tc XOR -> input register) is still closed; patterns
// must leave it unsensitised (e.g. ki=0 with the output-register cells at 0,
// or each input-register cell equal to its data rail).
//
// Lint reports this handshake loop as circular logic. It stands: it is the
// pipeline's global feedback path, which NCL closes on purpose and which the
// registers' hysteresis gates make a well-defined handshake.
//
// Ports: a, b, cin, s, cout (ncl_pkg::dr_t), ki, ko, rst, tc, xor_po, cd_po,
// clk, test_mode, scan_en, scan_in, scan_out. Functional timing: clockless;
// clk is used only by the scan cells.
module ncl_adder_stage_dft #(
  parameter bit GIF_SCAN     = 1'b1,  // scan cells in gate-internal feedback
  parameter bit USE_TP       = 1'b1,  // tc control point in the feedback path
  parameter bit USE_XOR_TREE = 1'b1,  // XOR tree on the input-register rails
  parameter bit USE_SOL      = 1'b1   // NAND-grouped scannable observation latch
) (
  input  ncl_pkg::dr_t a,
  input  ncl_pkg::dr_t b,
  input  ncl_pkg::dr_t cin,
  output ncl_pkg::dr_t s,
  output ncl_pkg::dr_t cout,
  input  logic         ki,
  output logic         ko,
  input  logic         rst,
  input  logic         tc,
  output logic         xor_po,
  output logic         cd_po,
  input  logic         clk,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  import ncl_pkg::*;

  dr_t        ra, rb, rc;       // input register outputs
  dr_t        fs, fco;          // full adder outputs
  logic [2:0] ko_in;            // ko of A, B, Cin registers
  logic [1:0] ko_out;           // ko of S, Cout registers
  logic       cd_out;           // output completion detector
  logic       ki_in;            // Ki of the input register (after test point)
  logic [8:0] ch;               // scan chain links

  // Number of scan cells: 16 threshold gates of threshold > 1, plus the SOL.
  localparam int unsigned SCAN_CELLS = (GIF_SCAN ? 16 : 0) + (USE_SOL ? 1 : 0);

  // ---- input register -----------------------------------------------------
  ncl_reg_bit #(.GIF_SCAN(GIF_SCAN)) u_reg_a (
    .x(a), .z(ra), .ki(ki_in), .ko(ko_in[0]), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[0]), .scan_out(ch[1])
  );
  ncl_reg_bit #(.GIF_SCAN(GIF_SCAN)) u_reg_b (
    .x(b), .z(rb), .ki(ki_in), .ko(ko_in[1]), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[1]), .scan_out(ch[2])
  );
  ncl_reg_bit #(.GIF_SCAN(GIF_SCAN)) u_reg_cin (
    .x(cin), .z(rc), .ki(ki_in), .ko(ko_in[2]), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[2]), .scan_out(ch[3])
  );

  // ---- combinational logic ------------------------------------------------
  ncl_full_adder #(.GIF_SCAN(GIF_SCAN)) u_fa (
    .a(ra), .b(rb), .cin(rc), .s(fs), .cout(fco), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[3]), .scan_out(ch[4])
  );

  // ---- output register ----------------------------------------------------
  ncl_reg_bit #(.GIF_SCAN(GIF_SCAN)) u_reg_s (
    .x(fs), .z(s), .ki(ki), .ko(ko_out[0]), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[4]), .scan_out(ch[5])
  );
  ncl_reg_bit #(.GIF_SCAN(GIF_SCAN)) u_reg_cout (
    .x(fco), .z(cout), .ki(ki), .ko(ko_out[1]), .rst(rst), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(ch[5]), .scan_out(ch[6])
  );

  // ---- completion detection and global feedback ----------------------------
  ncl_completion #(.N(3), .GIF_SCAN(GIF_SCAN)) u_cd_in (
    .ko_bits(ko_in), .done(ko), .rst(rst), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(ch[6]), .scan_out(ch[7])
  );
  ncl_completion #(.N(2), .GIF_SCAN(GIF_SCAN)) u_cd_out (
    .ko_bits(ko_out), .done(cd_out), .rst(rst), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(ch[7]), .scan_out(ch[8])
  );

  if (USE_TP) begin : g_tp
    ncl_gfp_tp u_tp (.fb(cd_out), .tc(tc), .ki(ki_in));
  end else begin : g_no_tp
    assign ki_in = cd_out;
  end

  assign cd_po = cd_out;

  // ---- observation: XOR tree and SOL --------------------------------------
  if (USE_XOR_TREE) begin : g_xor_tree
    ncl_xor_tree #(.N(6)) u_xor_tree (
      .in({rc.r1, rc.r0, rb.r1, rb.r0, ra.r1, ra.r0}), .po(xor_po)
    );
  end else begin : g_no_xor_tree
    assign xor_po = 1'b0;
  end

  if (USE_SOL) begin : g_sol
    ncl_sol #(.G(4)) u_sol (
      .obs({fco.r1, fco.r0, fs.r1, fs.r0}), .clk(clk), .rst(rst),
      .scan_en(scan_en), .scan_in(scan_in), .q(ch[0])
    );
  end else begin : g_no_sol
    assign ch[0] = scan_in;
  end

  assign scan_out = ch[8];

  // ---- NCL rules --------------------------------------------------------------
  // In functional use the producer must present legal dual-rail codes: DATA0,
  // DATA1 or NULL, never both rails at once. (Scan patterns may, in test mode.)
  always_comb begin
    if (!test_mode && !rst) begin
      assert (!(a.r0 && a.r1) && !(b.r0 && b.r1) && !(cin.r0 && cin.r1))
        else $error("ncl_adder_stage_dft: illegal dual-rail input code");
    end
  end

endmodule
