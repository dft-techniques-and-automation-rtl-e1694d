// ncl_gfp_tp: control point in a global feedback path of an NCL pipeline.
//
// The request a completion detector sends back to the previous register is
// passed through an XOR with the primary input tc. With tc=0 (functional mode)
// the request is unchanged; during test the tester drives tc and so can force
// either request level, which makes the feedback net controllable. Function and
// placement follow the test-point method; the port names are this design's.
//
// Ports: fb (completion output), tc, ki (to the previous register's Ki).
// Timing: one XOR delay.
module ncl_gfp_tp (
  input  logic fb,
  input  logic tc,
  output logic ki
);

  assign ki = fb ^ tc;

endmodule
