// tb_ones_counter: streams random 64-bit strings, one bit per enabled clock with
// random idle cycles, and checks the count of 1s after each string and after clear.
module tb_ones_counter;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, in_bit = 0;
  logic [6:0] count;
  int checks = 0, failures = 0;

  ones_counter dut (.clk, .rst_n, .clr, .en, .in_bit, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      v = (t == 0) ? '1 : (t == 1) ? '0 : {$urandom, $urandom};
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      checks++;
      if (count !== 0) begin failures++; $display("FAIL clear"); end
      for (int k = 0; k < 64; k++) begin
        while ($urandom_range(0, 3) == 0) begin en = 0; in_bit = 1; @(negedge clk); end
        en = 1; in_bit = v[k]; @(negedge clk);
      end
      en = 0;
      checks++;
      if (int'(count) != ref_popcount(v)) begin failures++; $display("FAIL count %0d expected %0d", count, ref_popcount(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
