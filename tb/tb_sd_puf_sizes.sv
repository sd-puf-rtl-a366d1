// tb_sd_puf_sizes: the signature/mask length pairs (n, m) = (8,2) (16,2) (16,3)
// (32,4) (32,5) (48,5) (64,4) (64,6), each as its own PUF instance. For each, one
// enrollment and one signature generation are run and checked against the
// reference, as are the latency n + 7 and the number of masking rounds
// ceil(n/m).
module tb_sd_puf_sizes;
  import tb_ref_pkg::*;
  localparam int K = 8;
  localparam int NS [K] = '{8, 16, 16, 32, 32, 48, 64, 64};
  localparam int MS [K] = '{2, 2, 3, 4, 5, 5, 4, 6};
  localparam logic [15:0] SEED_A = 16'h1234, SEED_B = 16'hA5A5;

  logic clk = 0, rst_n = 0, cmd_enroll = 0, cmd_auth = 0;
  logic [15:0] seed = '0, t_ref = 16'd2390;
  logic [1:0]  addr = '0;
  logic [K-1:0] done;
  logic [63:0] sig [K], raw [K];
  int lat [K], rounds [K];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < K; c++) begin : g_cfg
    logic busy_c;
    logic [NS[c]-1:0] s_c, r_c;
    sd_puf #(.N(NS[c]), .M(MS[c]), .CHIP(3)) u_puf (.clk, .rst_n, .cmd_enroll, .cmd_auth, .seed,
        .addr, .t_ref, .busy(busy_c), .done(done[c]), .signature(s_c), .raw_signature(r_c));
    assign sig[c] = 64'(s_c);
    assign raw[c] = 64'(r_c);
    // Count cycles to done and mask reloads of the rotating register (rounds).
    always @(posedge clk) begin
      if (cmd_enroll || cmd_auth) begin lat[c] = 0; rounds[c] = 0; end
      else if (busy_c && !done[c]) lat[c]++;
      if (u_puf.mask_en && (u_puf.u_ctrl.bit_cnt_q % MS[c]) == 0) rounds[c]++;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit enroll, input logic [15:0] s);
    @(negedge clk); cmd_enroll = enroll; cmd_auth = !enroll; seed = s;
    @(negedge clk); cmd_enroll = 0; cmd_auth = 0;
    while (done[K-1] !== 1'b1) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [63:0] ra, rb, nmask;
    logic [15:0] mask;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    op(1'b1, SEED_A);
    op(1'b0, SEED_B);
    for (int c = 0; c < K; c++) begin
      nmask = (64'h1 << NS[c]) - 1;
      ra = ref_raw(3, SEED_A, 2390) & nmask;
      rb = ref_raw(3, SEED_B, 2390) & nmask;
      mask = 16'(ref_popcount(ra)) & 16'((1 << MS[c]) - 1);
      checks += 4;
      if (raw[c] !== rb) begin failures++; $display("FAIL n=%0d raw", NS[c]); end
      if (sig[c] !== ref_mask_nm(rb, mask, NS[c], MS[c])) begin failures++; $display("FAIL n=%0d m=%0d signature", NS[c], MS[c]); end
      if (lat[c] != NS[c] + 6) begin failures++; $display("FAIL n=%0d latency %0d", NS[c], lat[c] + 1); end
      if (rounds[c] != (NS[c] + MS[c] - 1) / MS[c]) begin failures++; $display("FAIL n=%0d m=%0d rounds %0d", NS[c], MS[c], rounds[c]); end
      $display("n=%0d m=%0d latency=%0d masking rounds=%0d HW(masked)=%0d/%0d", NS[c], MS[c], lat[c] + 1,
               rounds[c], ref_popcount(sig[c]), NS[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
