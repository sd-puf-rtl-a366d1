// tb_mcell_buffer: sweeps the sampling time of three buffer models (different
// dies and positions) for both write directions and checks the output current
// against the reference delay model, including zero input and full switching.
module tb_mcell_buffer;
  import tb_ref_pkg::*;
  localparam int W = 12;
  logic signed [W-1:0] in_cur;
  logic [15:0]         t_write;
  logic signed [W-1:0] out_a, out_b, out_c;
  int checks = 0, failures = 0;
  int partial = 0, full = 0;

  mcell_buffer #(.CHIP(0), .IDX(0))  u_a (.in_cur, .t_write, .out_cur(out_a));
  mcell_buffer #(.CHIP(7), .IDX(13)) u_b (.in_cur, .t_write, .out_cur(out_b));
  mcell_buffer #(.CHIP(2), .IDX(63)) u_c (.in_cur, .t_write, .out_cur(out_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_cur(input int chip, input int idx, input int in_v, input int t);
    if (in_v == 0) return 0;
    return (in_v > 0) ? ref_current(chip, idx, 1'b1, t) : -ref_current(chip, idx, 1'b0, t);
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int vals[3] = '{1000, -1000, 0};
    foreach (vals[v]) begin
      for (int t = 0; t <= 4000; t += 50) begin
        in_cur = W'(vals[v]); t_write = 16'(t);
        #1;
        chk(int'(out_a), expect_cur(0, 0, vals[v], t),   $sformatf("a in=%0d t=%0d", vals[v], t));
        chk(int'(out_b), expect_cur(7, 13, vals[v], t),  $sformatf("b in=%0d t=%0d", vals[v], t));
        chk(int'(out_c), expect_cur(2, 63, vals[v], t),  $sformatf("c in=%0d t=%0d", vals[v], t));
        if (vals[v] != 0 && out_a != 0 && out_a != 1000 && out_a != -1000) partial++;
        if (out_a == 1000 || out_a == -1000) full++;
      end
    end
    // Long enough after the write every buffer is fully switched; write '0' and
    // write '1' delays differ for at least one of the three cells.
    checks++;
    if (partial == 0 || full == 0) begin failures++; $display("FAIL ramp not exercised"); end
    checks++;
    if (ref_delay(0, 0, 1) == ref_delay(0, 0, 0) && ref_delay(7, 13, 1) == ref_delay(7, 13, 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
