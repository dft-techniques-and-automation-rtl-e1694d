// ncl_th_gif_scan: threshold gate with a scan cell in its gate-internal
// feedback path (the scan-test form of an NCL gate).
//
// A THmn gate holds its output through the term g*Z-. Here that feedback is
// routed through a scan cell: in test mode (test_mode=1) the gate computes
// Z = f + g*Q from its inputs and the scan cell Q, so the state of the gate is
// set by shifting the scan chain and the gate is purely combinational between
// clock edges. The cell captures Z on a clk edge with scan_en=0 and shifts
// scan_in -> Q with scan_en=1. In functional mode (test_mode=0) the output is
// that of the ordinary hysteresis gate, i.e. the inserted cell acts as a wire
// in the loop. Gate set/hold terms come from ncl_th_gate; the scan cell is
// ncl_scan_ff.
//
// Inserting the cell in the feedback of every gate other than TH1n, making it
// a scan element with its own CLK, and the two modes follow the method. Using
// an edge-triggered mux-D cell rather than a level latch, and a separate
// test_mode select, are this design's choices.
//
// Ports: in[N-1:0], rst, z, clk, test_mode, scan_en, scan_in, scan_out (= Q).
module ncl_th_gif_scan #(
  parameter int unsigned N  = 3,
  parameter int unsigned M  = 2,
  parameter int unsigned W1 = 1
) (
  input  logic [N-1:0] in,
  input  logic         rst,
  output logic         z,
  input  logic         clk,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  logic z_func, set_f, hold_g, q;

  ncl_th_gate #(.N(N), .M(M), .W1(W1)) u_gate (
    .in(in), .rst(rst), .z(z_func), .set_f(set_f), .hold_g(hold_g)
  );

  ncl_scan_ff u_cell (
    .clk(clk), .rst(rst), .d(z), .scan_in(scan_in), .scan_en(scan_en), .q(q)
  );

  assign z        = test_mode ? (set_f | (hold_g & q)) : z_func;
  assign scan_out = q;

endmodule
