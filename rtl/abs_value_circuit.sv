// abs_value_circuit: behavioural model of the absolute value circuit that sits
// between the scan-out of the chain and the sense amplifier. The real part is an
// analog current circuit; this model works on the signed current words of
// sd_puf_pkg.
//
// A buffer that finished its write gives a large current of either sign (written
// towards '1' or towards '0'); one that did not gives a small current. Taking the
// magnitude turns "did the write complete in time" into a single comparison
// against I_ref, independent of the challenge bit. When en (AVC_en) is low the
// circuit is off and passes no current. Combinational.
module abs_value_circuit #(
  parameter int unsigned W = sd_puf_pkg::CUR_W
) (
  input  logic                en,
  input  logic signed [W-1:0] in_cur,
  output logic        [W-1:0] out_cur
);

  always_comb begin
    if (!en)             out_cur = '0;
    else if (in_cur < 0) out_cur = W'(-in_cur);
    else                 out_cur = W'(in_cur);
  end

endmodule
