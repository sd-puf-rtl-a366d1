// scan_chain: the DFT scan chain reused as the PUF's response register.
//
// N scan flip-flops (scan_ff) stitched SFF[0] -> SFF[1] -> ... -> SFF[N-1]; the
// scan output is SFF[N-1]. Each SFF drives one selected buffer under test
// (q[i] -> buffer i) and the buffer's output comes back on wb[i], the write-back
// wire. Three uses, set by te and the switch S (s_closed):
//   te = 1             : capture d[i] (the challenge current)        - 1st edge
//   te = 0, S open     : capture wb[i] (automatic write-back)        - 2nd edge
//   te = 0, S closed   : capture q[i-1], SFF[0] takes si_in (shift)  - read-out
// Opening S isolates the stages so a write-back cannot disturb the neighbour. The
// design description draws one switch S in the chain and says it prevents
// interference between every two stages; here every stage link has one, all
// driven by the same s_closed.
//
// Timing: one stage per rising edge; so_q is SFF[N-1] and is valid in the same
// cycle, so the first bit shifted out is buffer N-1's response.
module scan_chain #(
  parameter int unsigned N = sd_puf_pkg::N_BITS,
  parameter int unsigned W = sd_puf_pkg::CUR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                te,
  input  logic                s_closed,
  input  logic signed [W-1:0] d    [N],
  input  logic signed [W-1:0] wb   [N],
  input  logic signed [W-1:0] si_in,
  output logic signed [W-1:0] q    [N],
  output logic signed [W-1:0] so_q
);

  for (genvar i = 0; i < int'(N); i++) begin : g_sff
    logic signed [W-1:0] si;
    if (i == 0) begin : g_first
      assign si = s_closed ? si_in : wb[i];
    end else begin : g_next
      assign si = s_closed ? q[i-1] : wb[i];
    end
    scan_ff #(.W(W)) u_sff (
      .clk, .rst_n, .clr, .te,
      .d (d[i]),
      .si(si),
      .q (q[i])
    );
  end

  assign so_q = q[N-1];

endmodule
