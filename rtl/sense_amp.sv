// sense_amp: behavioural model of the (three-stage) current sense amplifier that
// turns the response current into a bit. The real part is analog.
//
// bit = 1 when the read current exceeds the reference I_ref, else 0. A real
// amplifier has a margin around I_ref inside which noise decides; MARGIN models
// that: when |i_r - i_ref| < MARGIN the output is taken from noise_bit. The design
// description gives no margin value, so MARGIN defaults to 0 (ideal comparator) and
// noise_bit is then ignored. The reference is an input so that it can be set per
// die. Combinational.
module sense_amp #(
  parameter int unsigned W      = sd_puf_pkg::CUR_W,
  parameter int unsigned MARGIN = 0
) (
  input  logic [W-1:0] i_r,
  input  logic [W-1:0] i_ref,
  input  logic         noise_bit,
  output logic         bit_out
);

  logic [W:0] diff;

  always_comb begin
    diff = (i_r >= i_ref) ? ({1'b0, i_r} - {1'b0, i_ref}) : ({1'b0, i_ref} - {1'b0, i_r});
    if (MARGIN != 0 && diff < (W+1)'(MARGIN)) bit_out = noise_bit;
    else                       bit_out = (i_r > i_ref);
  end

endmodule
