// mask_shift_reg: shift register that replays the m-bit mask.
//
// The mask read from the mCell memory is loaded in parallel; then, once per
// response bit, the register rotates by one and presents the next mask bit on
// mask_bit. Rotating rather than shifting lets the same m bits be applied again
// and again until all n response bits are masked (ceil(n/m) masking rounds, 11 for
// n = 64, m = 6). Bit order, least significant first, is this design's choice.
// Interface: load has priority over shift; mask_bit = reg[0] combinationally.
module mask_shift_reg #(
  parameter int unsigned M = sd_puf_pkg::MASK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] mask_in,
  input  logic         shift,
  output logic         mask_bit
);

  logic [M-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (load)  r <= mask_in;
    else if (shift) r <= {r[0], r[M-1:1]};
  end

  assign mask_bit = r[0];

endmodule
