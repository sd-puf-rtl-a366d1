// control_unit: control and processing unit of the PUF.
//
// Runs the two operations of the PUF as one fixed sequence of clock cycles.
//   enroll (mask generation, 'String A'):
//     CLEAR SEED GEN CHAL WB SHIFT x N STORE DONE                 (N + 7 cycles)
//   auth (improved signature generation, 'String B'):
//     CLEAR SEED GEN CHAL WB MASK_LD SHIFT x N DONE               (N + 7 cycles)
// CLEAR writes zero into the scan chain (all buffers start from zero current) and
// clears the counter and the signature register. SEED loads the external seed into
// the LFSR, GEN lets it produce the 64-bit challenge. CHAL is the first capture edge
// (TE = 1, challenge through D), WB the second (TE = 0, switch S open: every buffer
// output is written back into its own SFF). The time between those two edges is
// the write-delay threshold; in this model it is the number t_write handed to the
// buffer models, latched from t_ref_in with the command. In WB of an auth the mask
// is read from the mCell memory; MASK_LD puts it in the shift register. SHIFT
// closes S and shifts the N responses out through the absolute value circuit and
// the sense amplifier, into the counter (enroll) or through the XOR (auth). STORE
// writes the counter value to the memory. DONE wipes the scan chain again, so no
// response is left in it once the PUF mode is left, and pulses done.
//
// The order of the steps follows the design description (seed, challenge, write-
// back on the second edge, shift-out, count/store or load/XOR, reset of the SFFs
// when leaving PUF mode). The cycle-level schedule, the command handshake (a
// one-cycle cmd_* pulse accepted only when not busy; enroll wins if both) and
// latching seed, address and threshold at the command are this design's choices.
module control_unit #(
  parameter int unsigned N      = sd_puf_pkg::N_BITS,
  parameter int unsigned SEED_W = sd_puf_pkg::SEED_W,
  parameter int unsigned TW     = sd_puf_pkg::TIME_W,
  parameter int unsigned AW     = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_enroll,
  input  logic              cmd_auth,
  input  logic [SEED_W-1:0] seed_in,
  input  logic [AW-1:0]     addr_in,
  input  logic [TW-1:0]     t_ref_in,
  output logic              busy,
  output logic              done,
  output sd_puf_pkg::cu_state_e state,
  output logic [SEED_W-1:0] seed,
  output logic [AW-1:0]     mem_addr,
  output logic [TW-1:0]     t_write,
  output logic              lfsr_load,
  output logic              lfsr_en,
  output logic              sff_clr,
  output logic              te,
  output logic              s_closed,
  output logic              avc_en,
  output logic              count_en,
  output logic              counter_clr,
  output logic              counter_en,
  output logic              mask_load,
  output logic              mask_en,
  output logic              sig_clr,
  output logic              sig_shift_en,
  output logic              mem_en,
  output logic              mem_we
);
  import sd_puf_pkg::*;

  localparam int unsigned CW = $clog2(N);

  cu_state_e      state_q, state_d;
  logic           enroll_q;
  logic [CW-1:0]  bit_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_IDLE;
      enroll_q  <= 1'b0;
      bit_cnt_q <= '0;
      seed      <= '0;
      mem_addr  <= '0;
      t_write   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == ST_IDLE && (cmd_enroll || cmd_auth)) begin
        enroll_q <= cmd_enroll;
        seed     <= seed_in;
        mem_addr <= addr_in;
        t_write  <= t_ref_in;
      end
      if (state_q == ST_SHIFT) bit_cnt_q <= bit_cnt_q + 1'b1;
      else                     bit_cnt_q <= '0;
    end
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:    if (cmd_enroll || cmd_auth) state_d = ST_CLEAR;
      ST_CLEAR:   state_d = ST_SEED;
      ST_SEED:    state_d = ST_GEN;
      ST_GEN:     state_d = ST_CHAL;
      ST_CHAL:    state_d = ST_WB;
      ST_WB:      state_d = enroll_q ? ST_SHIFT : ST_MASK_LD;
      ST_MASK_LD: state_d = ST_SHIFT;
      ST_SHIFT:   if (bit_cnt_q == CW'(N - 1)) state_d = enroll_q ? ST_STORE : ST_DONE;
      ST_STORE:   state_d = ST_DONE;
      ST_DONE:    state_d = ST_IDLE;
      default:    state_d = ST_IDLE;
    endcase
  end

  always_comb begin
    lfsr_load    = (state_q == ST_SEED);
    lfsr_en      = (state_q == ST_GEN);
    sff_clr      = (state_q == ST_CLEAR) || (state_q == ST_DONE);
    te           = (state_q == ST_CHAL);
    s_closed     = (state_q == ST_SHIFT);
    avc_en       = (state_q == ST_SHIFT);
    count_en     = enroll_q;
    counter_clr  = (state_q == ST_CLEAR);
    counter_en   = (state_q == ST_SHIFT) && enroll_q;
    mask_load    = (state_q == ST_MASK_LD);
    mask_en      = (state_q == ST_SHIFT) && !enroll_q;
    sig_clr      = (state_q == ST_CLEAR);
    sig_shift_en = (state_q == ST_SHIFT) && !enroll_q;
    mem_en       = ((state_q == ST_WB) && !enroll_q) || (state_q == ST_STORE);
    mem_we       = (state_q == ST_STORE);
    busy         = (state_q != ST_IDLE);
    done         = (state_q == ST_DONE);
  end

  assign state = state_q;

  // Handshake and phase rules.
  a_we_needs_en:  assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> mem_en);
  a_te_not_shift: assert property (@(posedge clk) disable iff (!rst_n) !(te && s_closed));
  a_one_sink:     assert property (@(posedge clk) disable iff (!rst_n) !(counter_en && sig_shift_en));
  a_wb_after_chal: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state_q == ST_CHAL) |=> (state_q == ST_WB));

endmodule
