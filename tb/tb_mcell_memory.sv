// tb_mcell_memory: writes every word, reads all back in random order with the
// one-cycle latency, and checks that a read port holds its value when idle.
module tb_mcell_memory;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [1:0] addr = '0;
  logic [5:0] data_in = '0, data_out;
  logic [5:0] model [4];
  int checks = 0, failures = 0;

  mcell_memory #(.DEPTH(4), .W(6)) dut (.clk, .rst_n, .en, .we, .addr, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] held;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 10; r++) begin
      for (int a = 0; a < 4; a++) begin
        @(negedge clk); en = 1; we = 1; addr = 2'(a); data_in = 6'($urandom); model[a] = data_in;
      end
      for (int i = 0; i < 12; i++) begin
        @(negedge clk); en = 1; we = 0; addr = 2'($urandom);
        @(negedge clk); en = 0;
        checks++;
        if (data_out !== model[addr]) begin failures++; $display("FAIL addr %0d", addr); end
        held = data_out;
        @(negedge clk); we = 1; data_in = ~held;  // en low: no write, no read
        @(negedge clk); we = 0;
        checks++;
        if (data_out !== held) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
