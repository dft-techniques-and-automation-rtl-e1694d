// ncl_sol: scannable observation latch (SOL).
//
// G unobservable nets are combined by one G-input NAND gate, whose output is
// the D input of a scan flip-flop on the system scan chain. A capture clock
// (scan_en=0) stores the NAND of the observed nets; shifting (scan_en=1)
// moves the result out. The observed nets are only loaded, not cut, so the
// NCL circuit works unchanged. Grouping by NAND into a scan flip-flop with
// scan_in, RST, CLK, scan_en and four nets per group follow the method; the
// flip-flop itself is ncl_scan_ff.
//
// Ports: obs[G-1:0], clk, rst, scan_en, scan_in, q (also the chain output).
// Timing: q changes on the rising edge of clk.
module ncl_sol #(
  parameter int unsigned G = 4
) (
  input  logic [G-1:0] obs,
  input  logic         clk,
  input  logic         rst,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         q
);

  logic nand_out;

  assign nand_out = ~(&obs);

  ncl_scan_ff u_ff (
    .clk(clk), .rst(rst), .d(nand_out), .scan_in(scan_in), .scan_en(scan_en), .q(q)
  );

endmodule
