// mcell_buffer: behavioural model of one STT-mCell buffer selected as a PUF cell.
// This is a model of an analog spintronic gate, not synthesizable logic.
//
// A buffer built from a pull-up and a pull-down mCell copies the sign of its input
// current to its output, but only after a write delay: the domain wall has to move
// before the output reaches the full +/-10 uA. Process variation in MTJ length, RA
// and TMR makes that delay different for every buffer, and different for writing
// '1' (positive current) and writing '0' (negative current). The PUF samples the
// output a fixed time t_write after the challenge was applied; a fast buffer is
// fully switched, a slow one is not.
//
// Model: the delay is sd_puf_pkg::cell_delay_ps(CHIP, IDX, direction), fixed at
// elaboration (one CHIP number = one manufactured die). The output grows linearly
// from 0 to I_FULL over the delay and then stays there:
//   out = sign(in) * I_FULL * min(1, t_write / delay).
// Zero input current (the initialised state) gives zero output. The sign/delay
// behaviour follows the design description; the linear ramp, the delay
// distribution and the hash are this model's own choices.
//
// Interface: combinational; out_cur is the current seen on the write-back wire
// when the second clock edge comes t_write ps after the first.
module mcell_buffer #(
  parameter int unsigned CHIP = 0,
  parameter int unsigned IDX  = 0,
  parameter int unsigned W    = sd_puf_pkg::CUR_W,
  parameter int unsigned TW   = sd_puf_pkg::TIME_W
) (
  input  logic signed [W-1:0] in_cur,
  input  logic [TW-1:0]       t_write,
  output logic signed [W-1:0] out_cur
);
  import sd_puf_pkg::*;

  localparam int unsigned D1 = cell_delay_ps(CHIP, IDX, 1'b1);
  localparam int unsigned D0 = cell_delay_ps(CHIP, IDX, 1'b0);

  logic [31:0] delay;
  logic [W-1:0] mag;

  always_comb begin
    delay = (in_cur > 0) ? D1 : D0;
    if (32'(t_write) >= delay) mag = W'(I_FULL);
    else                       mag = W'((32'(t_write) * 32'(I_FULL)) / delay);
    if (in_cur > 0)      out_cur = mag;
    else if (in_cur < 0) out_cur = -mag;
    else                 out_cur = '0;
  end

endmodule
