// tb_mask_shift_reg: loads random 6-bit masks and checks that the register
// replays them bit by bit, least significant first, over and over for 64 bits,
// holding when not shifted.
module tb_mask_shift_reg;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [5:0] mask_in = '0;
  logic mask_bit;
  int checks = 0, failures = 0;

  mask_shift_reg #(.M(6)) dut (.clk, .rst_n, .load, .mask_in, .shift, .mask_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] m;
    int k;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      m = 6'($urandom);
      @(negedge clk); load = 1; mask_in = m; @(negedge clk); load = 0;
      k = 0;
      while (k < 64) begin
        shift = $urandom_range(0, 3) != 0;
        checks++;
        if (mask_bit !== m[k % 6]) begin failures++; $display("FAIL mask %b bit %0d", m, k); end
        @(negedge clk);
        if (shift) k++;
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
