// Muller C element with active-low reset.
//
// The output copies the inputs when they agree and holds its last value when
// they differ: a=b=1 sets q, a=b=0 clears q. rst_n=0 forces q to 0. This is
// the truth table of the arbiter's basic block (Reset, A, B, Out) exactly.
// It is the rendez-vous element of every arbiter node: its output is the
// node's outgoing request, and it waits for both the selected incoming request
// and the downstream acknowledge before it changes.
//
// Timing: purely level sensitive, no clock. It is written as a latch whose
// enable is (a == b); the latch this infers is the intended state-holding
// element of the C gate, and the circuit warning about it stands for that
// reason. A standard-cell flow maps it to a C-element cell or to a
// majority-gate-with-feedback.
module c_element (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  always_latch begin
    if (!rst_n)      q = 1'b0;
    else if (a == b) q = a;
  end

endmodule
