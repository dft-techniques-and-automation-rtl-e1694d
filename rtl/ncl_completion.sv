// ncl_completion: completion detector for an NCL register.
//
// Combines the ko outputs of the N bits of a register into one request for the
// previous stage: it goes to 1 (rfd) once every bit is NULL, to 0 (rfn) once
// every bit is DATA, and holds while a wavefront is only partly through. That
// is exactly a THNN gate (an N-input C-element) on the ko signals, which is how
// it is built here; a wide register would use a tree of such gates, which this
// design leaves to the integrator. The detector's role and its place between
// stages follow the NCL pipeline framework; the single-gate form is this
// design's choice. With GIF_SCAN=1 the gate carries a feedback scan cell.
//
// Ports: ko_bits[N-1:0], done, rst, scan pins. Timing: clockless, one gate.
module ncl_completion #(
  parameter int unsigned N        = 2,
  parameter bit          GIF_SCAN = 1'b1
) (
  input  logic [N-1:0] ko_bits,
  output logic         done,
  input  logic         rst,
  input  logic         clk,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  ncl_gate #(.N(N), .M(N), .GIF_SCAN(GIF_SCAN)) u_thnn (
    .in(ko_bits), .rst(rst), .z(done), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out)
  );

endmodule
