// sd_puf: STT-mCell write-delay PUF with automatic write-back and signature
// masking.
//
// Idea: in an all-spin circuit every gate is made of STT-mCells whose write delay
// varies from die to die. The buffers that follow the scan flip-flops of an
// existing scan chain are used as the PUF cells. A challenge written into all N
// SFFs at once drives every buffer towards '1' or '0'; a second clock edge, a
// fixed time later, writes each buffer's output current back into its own SFF
// (automatic write-back). Buffers fast enough to have switched give a full-size
// current, slow ones a small one, so the chain now holds N response values from a
// single write period. They are shifted out through an absolute value circuit and
// a sense amplifier, giving one response bit per clock.
//
// Two operations:
//   enroll: seed A -> challenge -> responses 'String A'; the 1s are counted and the
//           low MASK_W bits of the count are stored in the mCell memory at addr as
//           this die's mask.
//   auth:   seed B -> responses 'String B' (raw signature); the stored mask is
//           loaded into a shift register and XORed, rotating, onto the bits as they
//           leave the chain, giving the N-bit improved signature.
// Each takes N + 7 clock cycles from the accepted command to done.
//
// Interface: pulse cmd_enroll or cmd_auth for one cycle while busy is low, with
// seed, addr and t_ref valid in that cycle. t_ref is the interval, in ps, between
// the challenge edge and the write-back edge. signature is valid from done (auth);
// raw_signature holds the unmasked bits of the last operation. Bit i of both
// belongs to buffer i.
//
// The PUF cells, the absolute value circuit and the sense amplifier are
// behavioural models of analog parts (see their files); CHIP selects which
// simulated die the buffer models represent. The structure follows the design
// description; the cycle schedule, the current encoding and the memory size are
// this design's choices (see control_unit and sd_puf_pkg).
module sd_puf #(
  parameter int unsigned N         = sd_puf_pkg::N_BITS,
  parameter int unsigned M         = sd_puf_pkg::MASK_W,
  parameter int unsigned SEED_W    = sd_puf_pkg::SEED_W,
  parameter int unsigned MEM_DEPTH = 4,
  parameter int unsigned CHIP      = 0,
  parameter int unsigned I_REF     = sd_puf_pkg::I_REF,
  parameter int unsigned AW        = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cmd_enroll,
  input  logic                         cmd_auth,
  input  logic [SEED_W-1:0]            seed,
  input  logic [AW-1:0]                addr,
  input  logic [sd_puf_pkg::TIME_W-1:0] t_ref,
  output logic                         busy,
  output logic                         done,
  output logic [N-1:0]                 signature,
  output logic [N-1:0]                 raw_signature
);
  import sd_puf_pkg::*;

  localparam int unsigned W  = CUR_W;

  // Control signals.
  cu_state_e          state;
  logic [SEED_W-1:0]  seed_q;
  logic [AW-1:0]      mem_addr;
  logic [TIME_W-1:0]  t_write;
  logic lfsr_load, lfsr_en, sff_clr, te, s_closed, avc_en, count_en;
  logic counter_clr, counter_en, mask_load, mask_en, sig_clr, sig_shift_en;
  logic mem_en, mem_we;

  control_unit #(.N(N), .SEED_W(SEED_W), .TW(TIME_W), .AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_enroll, .cmd_auth,
    .seed_in(seed), .addr_in(addr), .t_ref_in(t_ref),
    .busy, .done, .state,
    .seed(seed_q), .mem_addr, .t_write,
    .lfsr_load, .lfsr_en, .sff_clr, .te, .s_closed, .avc_en, .count_en,
    .counter_clr, .counter_en, .mask_load, .mask_en, .sig_clr, .sig_shift_en,
    .mem_en, .mem_we
  );

  // Challenge generation.
  logic [N-1:0] ci;

  sd_puf_lfsr #(.SEED_W(SEED_W), .N(N)) u_lfsr (
    .clk, .rst_n,
    .load(lfsr_load), .seed(seed_q),
    .en  (lfsr_en),   .ci
  );

  // Scan chain and the buffers under test.
  logic signed [W-1:0] d_cur  [N];
  logic signed [W-1:0] wb_cur [N];
  logic signed [W-1:0] q_cur  [N];
  logic signed [W-1:0] so_cur;

  for (genvar i = 0; i < int'(N); i++) begin : g_cell
    // A challenge bit is a +/-10 uA write current.
    assign d_cur[i] = ci[i] ? W'(I_FULL) : -W'(I_FULL);

    mcell_buffer #(.CHIP(CHIP), .IDX(i), .W(W), .TW(TIME_W)) u_buf (
      .in_cur (q_cur[i]),
      .t_write(t_write),
      .out_cur(wb_cur[i])
    );
  end

  scan_chain #(.N(N), .W(W)) u_chain (
    .clk, .rst_n,
    .clr     (sff_clr),
    .te, .s_closed,
    .d       (d_cur),
    .wb      (wb_cur),
    .si_in   ('0),
    .q       (q_cur),
    .so_q    (so_cur)
  );

  // Read-out: absolute value circuit and sense amplifier.
  logic [W-1:0] abs_cur;
  logic         sa_bit;

  abs_value_circuit #(.W(W)) u_avc (
    .en     (avc_en),
    .in_cur (so_cur),
    .out_cur(abs_cur)
  );

  sense_amp #(.W(W)) u_sa (
    .i_r      (abs_cur),
    .i_ref    (W'(I_REF)),
    .noise_bit(1'b0),
    .bit_out  (sa_bit)
  );

  // Signature improvement and mask storage.
  logic [M-1:0] mask_data, mask_rd;
  logic [$clog2(N+1)-1:0] ones_count;

  signature_improvement #(.N(N), .M(M)) u_sim (
    .clk, .rst_n,
    .sa_bit, .count_en, .counter_clr, .counter_en,
    .mask_load, .mask_in(mask_rd), .mask_en,
    .sig_clr, .sig_shift_en,
    .mask_data, .ones_count,
    .signature, .raw_signature
  );

  mcell_memory #(.DEPTH(MEM_DEPTH), .W(M), .AW(AW)) u_mem (
    .clk, .rst_n,
    .en(mem_en), .we(mem_we), .addr(mem_addr),
    .data_in(mask_data), .data_out(mask_rd)
  );

endmodule
