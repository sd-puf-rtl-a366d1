// sd_puf_lfsr: challenge generator of the PUF.
//
// A 16-stage Fibonacci LFSR, loaded with the external challenge seed, that produces
// a whole N-bit internal challenge vector Ci in one clock cycle. The register is
// stepped N times per enabled cycle by an unrolled combinational loop; ci[k] is the
// bit shifted out at step k (ci[0] first). The next enabled cycle continues the same
// sequence, so successive cycles give successive, different challenges.
//
// Feedback polynomial x^16 + x^14 + x^13 + x^11 + 1 (maximal length). The design
// description only asks for an LFSR that can deliver a 64-bit pseudo-random vector
// per cycle from a 16-bit seed; the polynomial, the bit order and the unrolling are
// this design's choices. A zero seed is not remapped: it yields an all-zero
// challenge (every buffer written towards '0'), which is still a valid challenge.
//
// Interface: load has priority over en. Both act on the rising clock edge; ci is
// registered and valid one cycle after en.
module sd_puf_lfsr #(
  parameter int unsigned SEED_W = sd_puf_pkg::SEED_W,
  parameter int unsigned N      = sd_puf_pkg::N_BITS,
  parameter logic [SEED_W-1:0] TAPS = 16'hB400  // bits 15,13,12,10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,   // state <= seed
  input  logic [SEED_W-1:0] seed,
  input  logic              en,     // produce the next N-bit challenge
  output logic [N-1:0]      ci
);

  logic [SEED_W-1:0] state_q;
  logic [SEED_W-1:0] state_next;
  logic [N-1:0]      ci_next;

  always_comb begin
    logic [SEED_W-1:0] s;
    s = state_q;
    for (int k = 0; k < int'(N); k++) begin
      ci_next[k] = s[SEED_W-1];
      s = {s[SEED_W-2:0], ^(s & TAPS)};
    end
    state_next = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      ci      <= '0;
    end else if (load) begin
      state_q <= seed;
    end else if (en) begin
      state_q <= state_next;
      ci      <= ci_next;
    end
  end

endmodule
