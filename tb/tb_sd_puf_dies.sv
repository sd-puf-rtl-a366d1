// tb_sd_puf_dies: sixteen simulated dies (buffer delay sets 1..16) side by side,
// all given the same enrollment seed and the same signature seed. Every die's raw
// and improved signature is checked against the reference model, and the
// population statistics are printed: uniformity (share of 1s) and
// uniqueness (mean pairwise Hamming distance) of raw and masked signatures. Then
// die 1 answers the 16 one-hot seeds and the mean pairwise distance between those
// answers is printed (similar challenges should give unrelated signatures).
module tb_sd_puf_dies;
  import tb_ref_pkg::*;
  localparam int N = 64, DIES = 16;
  localparam logic [15:0] SEED_A = 16'h5A3C, SEED_B = 16'hC0DE;

  logic clk = 0, rst_n = 0, cmd_enroll = 0, cmd_auth = 0;
  logic [15:0] seed = '0, t_ref = 16'd2390;
  logic [1:0]  addr = '0;
  logic [DIES-1:0] busy, done;
  logic [63:0] sig [DIES], raw [DIES];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < DIES; d++) begin : g_die
    sd_puf #(.CHIP(d + 1)) u_puf (.clk, .rst_n, .cmd_enroll, .cmd_auth, .seed, .addr, .t_ref,
                                  .busy(busy[d]), .done(done[d]), .signature(sig[d]),
                                  .raw_signature(raw[d]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit enroll, input logic [15:0] s);
    @(negedge clk); cmd_enroll = enroll; cmd_auth = !enroll; seed = s; addr = 2'd0;
    @(negedge clk); cmd_enroll = 0; cmd_auth = 0;
    while (!done[0]) @(negedge clk);
    checks++;
    if (done !== '1) begin failures++; $display("FAIL dies out of step"); end
    @(negedge clk);
  endtask

  function automatic real pct(input real x); return 100.0 * x; endfunction

  initial begin
    logic [5:0]  mask [DIES];
    logic [63:0] rr, oh [16];
    real u_raw, u_sig, hw_raw, hw_sig, oh_hd;
    int pairs;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    op(1'b1, SEED_A);
    for (int d = 0; d < DIES; d++) mask[d] = 6'(ref_popcount(ref_raw(d + 1, SEED_A, 2390)));
    op(1'b0, SEED_B);
    for (int d = 0; d < DIES; d++) begin
      rr = ref_raw(d + 1, SEED_B, 2390);
      checks += 2;
      if (raw[d] !== rr) begin failures++; $display("FAIL die %0d raw", d + 1); end
      if (sig[d] !== ref_mask(rr, mask[d])) begin failures++; $display("FAIL die %0d signature", d + 1); end
    end

    // Population statistics.
    u_raw = 0; u_sig = 0; pairs = 0; hw_raw = 0; hw_sig = 0;
    for (int a = 0; a < DIES; a++) begin
      hw_raw += real'(ref_popcount(raw[a])) / N;
      hw_sig += real'(ref_popcount(sig[a])) / N;
      for (int b = a + 1; b < DIES; b++) begin
        u_raw += real'(ref_hd(raw[a], raw[b], N)) / N;
        u_sig += real'(ref_hd(sig[a], sig[b], N)) / N;
        pairs++;
      end
    end
    $display("dies=%0d uniformity raw=%.2f%% masked=%.2f%%", DIES, pct(hw_raw / DIES), pct(hw_sig / DIES));
    $display("dies=%0d uniqueness raw=%.2f%% masked=%.2f%%", DIES, pct(u_raw / pairs), pct(u_sig / pairs));
    checks++;
    if (u_sig / pairs < 0.2) begin failures++; $display("FAIL masked signatures of dies too alike"); end

    // One-hot challenges on die 1.
    for (int k = 0; k < 16; k++) begin
      op(1'b0, 16'h1 << k);
      oh[k] = sig[0];
      checks++;
      if (oh[k] !== ref_mask(ref_raw(1, 16'h1 << k, 2390), mask[0])) begin
        failures++; $display("FAIL one-hot %0d", k);
      end
    end
    oh_hd = 0; pairs = 0;
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin oh_hd += real'(ref_hd(oh[a], oh[b], N)) / N; pairs++; end
    $display("one-hot challenges: mean pairwise HD of signatures %.2f%%", pct(oh_hd / pairs));
    checks++;
    if (oh_hd / pairs < 0.2) begin failures++; $display("FAIL one-hot responses too alike"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
