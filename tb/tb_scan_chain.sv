// tb_scan_chain: drives an 8-stage chain through its three uses - capture on D
// (te = 1), write-back from the buffers (te = 0, S open) and shifting (S closed) -
// plus clear, and checks every stage against a model kept in the testbench.
module tb_scan_chain;
  localparam int N = 8, W = 12;
  logic clk = 0, rst_n = 0, clr = 0, te = 0, s_closed = 0;
  logic signed [W-1:0] d [N], wb [N], q [N], model [N];
  logic signed [W-1:0] si_in = '0, so_q;
  int checks = 0, failures = 0;

  scan_chain #(.N(N), .W(W)) dut (.clk, .rst_n, .clr, .te, .s_closed, .d, .wb, .si_in, .q, .so_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== model[i]) begin
        failures++;
        $display("FAIL %s stage %0d: got %0d expected %0d", what, i, q[i], model[i]);
      end
    end
    checks++;
    if (so_q !== model[N-1]) begin failures++; $display("FAIL %s so", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin d[i] = '0; wb[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); compare("reset");
    for (int it = 0; it < 50; it++) begin
      int op;
      op = $urandom_range(0, 3);
      for (int i = 0; i < N; i++) begin d[i] = W'($urandom); wb[i] = W'($urandom); end
      si_in = W'($urandom);
      clr = 0; te = 0; s_closed = 0;
      case (op)
        0: begin te = 1; s_closed = $urandom_range(0, 1); for (int i = 0; i < N; i++) model[i] = d[i]; end
        1: begin for (int i = 0; i < N; i++) model[i] = wb[i]; end
        2: begin s_closed = 1; for (int i = N-1; i > 0; i--) model[i] = model[i-1]; model[0] = si_in; end
        default: begin clr = 1; te = $urandom_range(0, 1); for (int i = 0; i < N; i++) model[i] = '0; end
      endcase
      @(negedge clk);
      compare($sformatf("op %0d it %0d", op, it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
