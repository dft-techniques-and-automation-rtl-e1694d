// ncl_pkg: shared types and helpers for dual-rail NULL Convention Logic.
//
// A dual-rail signal D is carried on two mutually exclusive wires D^1 and D^0.
// {D^1,D^0} = 2'b01 is DATA0, 2'b10 is DATA1 and 2'b00 is NULL; 2'b11 is
// illegal. The encoding follows the usual NCL convention; packing rail 1 in
// the upper bit is a choice of this design.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // rail 1: asserted for DATA1
    logic r0;  // rail 0: asserted for DATA0
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Handshake levels on Ki/Ko: request-for-data is 1, request-for-null is 0.
  localparam logic RFD = 1'b1;
  localparam logic RFN = 1'b0;

  function automatic dr_t dr_encode(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return !(d.r1 || d.r0);
  endfunction

endpackage
