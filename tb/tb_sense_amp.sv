// tb_sense_amp: an ideal comparator (margin 0) and one with a 20-unit margin are
// driven with currents around the 9.56 uA reference; inside the margin the output
// must follow the noise input, outside it the comparison.
module tb_sense_amp;
  localparam int W = 12;
  logic [W-1:0] i_r, i_ref;
  logic noise_bit, b0, b20;
  int checks = 0, failures = 0;

  sense_amp #(.W(W))               u0  (.i_r, .i_ref, .noise_bit, .bit_out(b0));
  sense_amp #(.W(W), .MARGIN(20))  u20 (.i_r, .i_ref, .noise_bit, .bit_out(b20));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, ref_v, gap;
    bit e0, e20;
    for (int i = 0; i < 500; i++) begin
      ref_v = (i % 2) ? 956 : $urandom_range(100, 1500);
      r = (i % 3 == 0) ? ref_v + $urandom_range(0, 60) - 30 : $urandom_range(0, 2000);
      i_r = W'(r); i_ref = W'(ref_v); noise_bit = $urandom_range(0, 1);
      #1;
      gap = (r > ref_v) ? r - ref_v : ref_v - r;
      e0  = r > ref_v;
      e20 = (gap < 20) ? noise_bit : (r > ref_v);
      checks += 2;
      if (b0  !== e0)  begin failures++; $display("FAIL ideal r=%0d ref=%0d", r, ref_v); end
      if (b20 !== e20) begin failures++; $display("FAIL margin r=%0d ref=%0d", r, ref_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
