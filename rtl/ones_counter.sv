// ones_counter: counter of the signature improvement module.
//
// During mask generation the response bits of 'String A' arrive one per clock from
// the sense amplifier; this counter adds up the 1s. Its binary value, cut to the
// mask width by the caller, becomes the mask. It is wide enough to count all N bits
// ($clog2(N+1) bits), so the count itself never wraps. Counting the 1s follows the
// design description; the width and the synchronous clear are this design's
// choices. Interface: clr has priority; with en high, in_bit is added on the rising
// edge.
module ones_counter #(
  parameter int unsigned N     = sd_puf_pkg::N_BITS,
  parameter int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             in_bit,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (clr)            count <= '0;
    else if (en && in_bit)   count <= count + 1'b1;
  end

endmodule
