// tb_sd_puf_lfsr: loads seeds into the LFSR and checks three successive 64-bit
// challenges against a bit-serial reference, that a held LFSR does not move, and
// that one challenge is produced per enabled clock.
module tb_sd_puf_lfsr;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, en = 0;
  logic [15:0] seed = '0;
  logic [63:0] ci;
  int checks = 0, failures = 0;

  sd_puf_lfsr dut (.clk, .rst_n, .load, .seed, .en, .ci);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] s;
    logic [63:0] hold;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 20; t++) begin
      s = (t < 16) ? (16'h1 << t) : 16'($urandom);
      @(negedge clk); load = 1; seed = s;
      @(negedge clk); load = 0;
      for (int w = 0; w < 3; w++) begin
        en = 1;
        @(negedge clk); en = 0;
        check(ci, ref_challenge(s, w), $sformatf("seed %h word %0d", s, w));
      end
      hold = ci;
      repeat (3) @(negedge clk);
      check(ci, hold, "hold without en");
    end
    // Two different one-hot seeds must give different challenges.
    checks++;
    if (ref_challenge(16'h0001, 0) == ref_challenge(16'h0002, 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
