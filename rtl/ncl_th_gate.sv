// ncl_th_gate: NCL threshold gate with hysteresis, THmn (optionally THmnWw).
//
// The output is asserted once the weighted number of asserted inputs reaches
// the threshold M (the set condition f), and deasserted only after every input
// has returned to 0 (the reset condition). In between it holds, so the gate
// obeys Z = f + g*Z- with g = OR of all inputs. Built as that equation with the
// gate-internal feedback path closed through a level-sensitive storage node:
// the node is written when f holds (to 1) or when all inputs are 0 (to 0).
//
// Parameters: N inputs, threshold M, weight W1 on input 0 (all other inputs
// weigh 1). TH23 is N=3, M=2, W1=1; TH34w2 is N=4, M=3, W1=2. THmn gates and
// the equation follow the NCL definition; the weight on input 0 and the rst
// input (a reset-to-0 gate as used in registers) are this design's additions.
// A TH1n gate (M=1) reduces to an OR gate, since set already implies hold.
//
// Ports: in[N-1:0], rst (forces the output to 0), z; set_f and hold_g expose f
// and g so that a scan variant can rebuild the output from another feedback.
// Timing: clockless; the output changes as soon as the inputs satisfy set or
// reset. The storage node is an intended latch: it is the gate's hysteresis.
module ncl_th_gate #(
  parameter int unsigned N  = 3,
  parameter int unsigned M  = 2,
  parameter int unsigned W1 = 1
) (
  input  logic [N-1:0] in,
  input  logic         rst,
  output logic         z,
  output logic         set_f,
  output logic         hold_g
);

  initial begin
    assert (M >= 1 && M <= N + W1 - 1) else $error("ncl_th_gate: threshold out of range");
  end

  // Weighted count of asserted inputs.
  function automatic int unsigned weight_sum(input logic [N-1:0] v);
    int unsigned acc;
    acc = v[0] ? W1 : 0;
    for (int unsigned i = 1; i < N; i++) acc += v[i] ? 1 : 0;
    return acc;
  endfunction

  assign set_f  = weight_sum(in) >= M;
  assign hold_g = |in;

  // Hysteresis: update on set or on full reset, hold otherwise.
  always_latch begin
    if (rst)                    z = 1'b0;
    else if (set_f || !hold_g)  z = set_f;
  end

endmodule
