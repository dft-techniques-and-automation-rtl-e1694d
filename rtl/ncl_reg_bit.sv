// ncl_reg_bit: one-bit dual-rail NCL (delay-insensitive) register.
//
// Each rail passes through a TH22 gate (C-element) whose second input is ki:
// a DATA wavefront is let through while ki is request-for-data (1), a NULL
// wavefront while ki is request-for-null (0), and the output holds otherwise.
// ko = NOR(z^0, z^1): 0 (rfn) while the output is DATA, 1 (rfd) while NULL.
// rst clears both rails, i.e. the register resets to NULL.
//
// The ki/ko behaviour and the x/z/ki/ko/rst pins follow the NCL register
// described for the pipeline; building it from two reset-to-0 TH22 gates and
// a NOR is this design's (standard) choice. With GIF_SCAN=1 both TH22 gates
// carry feedback scan cells, chained rail 0 then rail 1.
//
// Ports: x, z (ncl_pkg::dr_t), ki, ko, rst, and the scan pins clk, test_mode,
// scan_en, scan_in, scan_out. Timing: clockless, one gate delay x/ki -> z.
module ncl_reg_bit #(
  parameter bit GIF_SCAN = 1'b1
) (
  input  ncl_pkg::dr_t x,
  output ncl_pkg::dr_t z,
  input  logic         ki,
  output logic         ko,
  input  logic         rst,
  input  logic         clk,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  logic chain_mid;

  ncl_gate #(.N(2), .M(2), .GIF_SCAN(GIF_SCAN)) u_rail0 (
    .in({ki, x.r0}), .rst(rst), .z(z.r0), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(chain_mid)
  );

  ncl_gate #(.N(2), .M(2), .GIF_SCAN(GIF_SCAN)) u_rail1 (
    .in({ki, x.r1}), .rst(rst), .z(z.r1), .clk(clk), .test_mode(test_mode),
    .scan_en(scan_en), .scan_in(chain_mid), .scan_out(scan_out)
  );

  assign ko = ~(z.r0 | z.r1);

endmodule
