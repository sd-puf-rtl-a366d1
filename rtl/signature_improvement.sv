// signature_improvement: counter-based signature masking.
//
// Response bits leave the sense amplifier one per clock. A 1-to-2 multiplexer
// steered by count_en (Count_en) sends them either to the ones_counter (count_en =
// 1, mask generation) or to the XOR gate (count_en = 0, signature generation).
//   Mask generation: the 1s of 'String A' are counted; mask_data is the low M bits
//   of the count, to be stored as the die's mask.
//   Signature generation: mask_shift_reg, loaded with the stored mask, rotates one
//   bit per response bit; each raw bit is XORed with the current mask bit and
//   shifted into the N-bit improved-signature register. Raw bit k therefore meets
//   mask bit (k mod M).
// raw_signature collects the unmasked bits of either pass for observation.
// Bit order: the first bit shifted in ends at position N-1, so with the scan chain
// emitting buffer N-1 first, signature[i] belongs to buffer i.
//
// The parts (multiplexer, counter, shift register, XOR) and the mask being the
// binary count of 1s follow the design description. Keeping the low M bits when
// the count needs more than M bits is this design's choice (the description says
// only that the count is converted to an m-bit binary code).
// Timing: all registers on the rising edge; counter_en/sig_shift_en are the
// per-bit strobes.
module signature_improvement #(
  parameter int unsigned N = sd_puf_pkg::N_BITS,
  parameter int unsigned M = sd_puf_pkg::MASK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sa_bit,
  input  logic         count_en,
  input  logic         counter_clr,
  input  logic         counter_en,
  input  logic         mask_load,
  input  logic [M-1:0] mask_in,
  input  logic         mask_en,
  input  logic         sig_clr,
  input  logic         sig_shift_en,
  output logic [M-1:0] mask_data,
  output logic [$clog2(N+1)-1:0] ones_count,
  output logic [N-1:0] signature,
  output logic [N-1:0] raw_signature
);

  logic to_counter, to_xor, mask_bit, masked_bit;

  // Count_en multiplexer.
  assign to_counter = count_en  & sa_bit;
  assign to_xor     = !count_en & sa_bit;

  ones_counter #(.N(N)) u_counter (
    .clk, .rst_n,
    .clr   (counter_clr),
    .en    (counter_en),
    .in_bit(to_counter),
    .count (ones_count)
  );

  assign mask_data = ones_count[M-1:0];

  mask_shift_reg #(.M(M)) u_mask_sr (
    .clk, .rst_n,
    .load    (mask_load),
    .mask_in (mask_in),
    .shift   (mask_en),
    .mask_bit(mask_bit)
  );

  assign masked_bit = to_xor ^ mask_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature     <= '0;
      raw_signature <= '0;
    end else if (sig_clr) begin
      signature     <= '0;
      raw_signature <= '0;
    end else begin
      if (sig_shift_en)               signature     <= {signature[N-2:0], masked_bit};
      if (sig_shift_en || counter_en) raw_signature <= {raw_signature[N-2:0], sa_bit};
    end
  end

endmodule
