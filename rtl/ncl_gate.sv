// ncl_gate: one NCL threshold gate as used inside the larger blocks, in either
// its plain form or its scan-testable form.
//
// With GIF_SCAN=1 every gate whose threshold exceeds 1 becomes an
// ncl_th_gif_scan and joins the scan chain (scan_in -> its cell -> scan_out).
// TH1n gates (M=1) are OR gates with no internal feedback, so they stay plain
// and pass the chain straight through, as do all gates when GIF_SCAN=0.
// Ports and timing are those of ncl_th_gate plus the scan-chain pins.
module ncl_gate #(
  parameter int unsigned N        = 2,
  parameter int unsigned M        = 2,
  parameter int unsigned W1       = 1,
  parameter bit          GIF_SCAN = 1'b1
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

  if (GIF_SCAN && M > 1) begin : g_scan
    ncl_th_gif_scan #(.N(N), .M(M), .W1(W1)) u_th (
      .in(in), .rst(rst), .z(z), .clk(clk), .test_mode(test_mode),
      .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out)
    );
  end else begin : g_plain
    logic unused_f, unused_g;
    ncl_th_gate #(.N(N), .M(M), .W1(W1)) u_th (
      .in(in), .rst(rst), .z(z), .set_f(unused_f), .hold_g(unused_g)
    );
    assign scan_out = scan_in;
  end

endmodule
