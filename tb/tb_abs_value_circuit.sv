// tb_abs_value_circuit: random and corner currents in, magnitude expected out;
// zero output when disabled.
module tb_abs_value_circuit;
  localparam int W = 12;
  logic en;
  logic signed [W-1:0] in_cur;
  logic [W-1:0] out_cur;
  int checks = 0, failures = 0;

  abs_value_circuit #(.W(W)) dut (.en, .in_cur, .out_cur);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, e;
    for (int i = 0; i < 400; i++) begin
      v = (i < 4) ? (i == 0 ? 1000 : i == 1 ? -1000 : i == 2 ? 0 : -2047) : $urandom_range(0, 4094) - 2047;
      en = (i % 5) != 4;
      in_cur = W'(v);
      #1;
      e = en ? (v < 0 ? -v : v) : 0;
      checks++;
      if (int'(out_cur) != e) begin failures++; $display("FAIL in=%0d en=%0b got %0d", v, en, out_cur); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
