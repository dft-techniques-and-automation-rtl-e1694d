// ncl_scan_ff: mux-D scan flip-flop, the storage cell of both the scannable
// observation latch and the scan cell placed in a gate's internal feedback.
//
// On each rising edge of clk the cell loads scan_in when scan_en is 1 (shift)
// and d when scan_en is 0 (capture). rst clears it asynchronously. Ports
// follow the scan cell drawn with the observation latch: scan_in, D, RST, CLK,
// scan_en and Q. A rising-edge flip-flop with an asynchronous active-high reset
// is this design's choice; the cell's clocking is otherwise not specified.
module ncl_scan_ff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  input  logic scan_in,
  input  logic scan_en,
  output logic q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          q <= 1'b0;
    else if (scan_en) q <= scan_in;
    else              q <= d;
  end

endmodule
