// scan_ff: one scan flip-flop (SFF) of the all-spin scan chain, holding a current.
//
// A test-enable multiplexer in front of the flip-flop picks the functional input D
// when te = 1 and the scan input SI when te = 0, as in ordinary scan design. In the
// PUF the SI node is fed either by the previous stage (switch S closed: shifting)
// or by the write-back wire from the buffer that follows this SFF (switch S open:
// automatic write-back); that choice is made in scan_chain. clr writes zero current,
// which is how the chain is initialised before a challenge and wiped after use.
//
// The stored value is a signed current word (see sd_puf_pkg) rather than one bit,
// because a write-back captures a partially switched buffer whose output current
// lies between the two logic levels; it is judged only when it reaches the sense
// amplifier. Timing: everything on the rising clock edge, clr first.
module scan_ff #(
  parameter int unsigned W = sd_puf_pkg::CUR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                te,
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] si,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= te ? d : si;
  end

endmodule
