// ncl_full_adder: dual-rail NCL full adder built from threshold gates.
//
// Four gates compute sum and carry of a, b and cin:
//   cout^1 = TH23(a^1, b^1, cin^1)        cout^0 = TH23(a^0, b^0, cin^0)
//   s^0    = TH34w2(cout^1, a^0, b^0, cin^0)
//   s^1    = TH34w2(cout^0, a^1, b^1, cin^1)
// (TH34w2: threshold 3, first input weighs 2.) The sum rails reuse the
// opposite carry rail: one asserted "1" rail leaves two "0" rails, so cout^0
// plus that rail reach 3; three "1" rails reach 3 on their own. All outputs are
// NULL only when all inputs are NULL, so the adder is input-complete and
// observes the NULL/DATA wavefront discipline.
//
// The full adder's role in the pipeline stage is given; its gate structure is
// this design's choice (the common NCL form). With GIF_SCAN=1 every gate has a
// feedback scan cell, chained cout^0, cout^1, s^0, s^1.
//
// Ports: a, b, cin, s, cout (ncl_pkg::dr_t), rst, scan pins. Timing: clockless,
// two gate levels from inputs to s.
module ncl_full_adder #(
  parameter bit GIF_SCAN = 1'b1
) (
  input  ncl_pkg::dr_t a,
  input  ncl_pkg::dr_t b,
  input  ncl_pkg::dr_t cin,
  output ncl_pkg::dr_t s,
  output ncl_pkg::dr_t cout,
  input  logic         rst,
  input  logic         clk,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  logic [2:0] chain;

  ncl_gate #(.N(3), .M(2), .GIF_SCAN(GIF_SCAN)) u_co0 (
    .in({cin.r0, b.r0, a.r0}), .rst(rst), .z(cout.r0), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(scan_in), .scan_out(chain[0])
  );

  ncl_gate #(.N(3), .M(2), .GIF_SCAN(GIF_SCAN)) u_co1 (
    .in({cin.r1, b.r1, a.r1}), .rst(rst), .z(cout.r1), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(chain[0]), .scan_out(chain[1])
  );

  // Input 0 carries weight 2.
  ncl_gate #(.N(4), .M(3), .W1(2), .GIF_SCAN(GIF_SCAN)) u_s0 (
    .in({cin.r0, b.r0, a.r0, cout.r1}), .rst(rst), .z(s.r0), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(chain[1]), .scan_out(chain[2])
  );

  ncl_gate #(.N(4), .M(3), .W1(2), .GIF_SCAN(GIF_SCAN)) u_s1 (
    .in({cin.r1, b.r1, a.r1, cout.r0}), .rst(rst), .z(s.r1), .clk(clk),
    .test_mode(test_mode), .scan_en(scan_en), .scan_in(chain[2]), .scan_out(scan_out)
  );

endmodule
