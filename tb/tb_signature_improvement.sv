// tb_signature_improvement: for random 64-bit strings, runs a mask-generation
// pass (bits steered to the counter; the mask must be the low 6 bits of the count
// of 1s) and a signature pass with that mask loaded (each bit XORed with the
// rotating mask), and checks mask, raw string and improved signature against the
// reference. Also checks that 11 masking rounds are applied (ceil(64/6)).
module tb_signature_improvement;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sa_bit = 0, count_en = 0, counter_clr = 0, counter_en = 0, mask_load = 0, mask_en = 0;
  logic sig_clr = 0, sig_shift_en = 0;
  logic [5:0] mask_in = '0, mask_data;
  logic [6:0] ones_count;
  logic [63:0] signature, raw_signature;
  int checks = 0, failures = 0;
  int rounds;

  signature_improvement #(.N(64), .M(6)) dut (
    .clk, .rst_n, .sa_bit, .count_en, .counter_clr, .counter_en, .mask_load, .mask_in,
    .mask_en, .sig_clr, .sig_shift_en, .mask_data, .ones_count, .signature, .raw_signature);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // Bits leave the scan chain from position 63 down to 0.
  task automatic stream(input logic [63:0] v, input bit enroll);
    count_en = enroll;
    for (int k = 63; k >= 0; k--) begin
      sa_bit = v[k]; counter_en = enroll; mask_en = !enroll; sig_shift_en = !enroll;
      if (!enroll && k != 63 && ((63 - k) % 6) == 0) rounds++;
      @(negedge clk);
    end
    counter_en = 0; mask_en = 0; sig_shift_en = 0;
  endtask

  initial begin
    logic [63:0] a, b;
    logic [5:0] m;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 20; t++) begin
      a = (t == 0) ? '1 : {$urandom, $urandom};
      b = {$urandom, $urandom};
      // Mask generation.
      @(negedge clk); counter_clr = 1; sig_clr = 1; @(negedge clk); counter_clr = 0; sig_clr = 0;
      stream(a, 1'b1);
      m = 6'(ref_popcount(a));
      chk(64'(ones_count), 64'(ref_popcount(a)), "count");
      chk(64'(mask_data), 64'(m), "mask");
      chk(raw_signature, a, "raw string A");
      chk(signature, '0, "signature untouched while counting");
      // Signature generation with the stored mask.
      @(negedge clk); sig_clr = 1; mask_load = 1; mask_in = m; @(negedge clk); sig_clr = 0; mask_load = 0;
      rounds = 1;
      stream(b, 1'b0);
      chk(raw_signature, b, "raw string B");
      chk(signature, ref_mask(b, m), "improved signature");
      checks++;
      if (rounds != 11) begin failures++; $display("FAIL rounds %0d", rounds); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
