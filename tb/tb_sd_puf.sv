// tb_sd_puf: end-to-end test of the PUF at its default size (64 buffers, 6-bit
// mask, 4 mask slots, die 0). It enrolls masks, generates improved signatures and
// checks against the reference model: the raw strings, the stored mask (count of
// 1s, low 6 bits), the masked signature, repeatability of a signature, the N + 7
// cycle latency, that a command while busy is ignored and that the scan chain is
// wiped after every operation. Each mechanism of the design is counted and must
// occur at least once.
module tb_sd_puf;
  import tb_ref_pkg::*;
  localparam int N = 64;
  localparam int CHIP = 0;

  logic clk = 0, rst_n = 0, cmd_enroll = 0, cmd_auth = 0;
  logic [15:0] seed = '0;
  logic [1:0]  addr = '0;
  logic [15:0] t_ref = 16'd2390;
  logic busy, done;
  logic [63:0] signature, raw_signature;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_enroll = 0, n_auth = 0, n_capture = 0, n_writeback = 0, n_partial = 0, n_full = 0;
  int n_shift = 0, n_mask_round = 0, n_mem_wr = 0, n_mem_rd = 0, n_wiped = 0, n_ignored = 0;

  sd_puf dut (.clk, .rst_n, .cmd_enroll, .cmd_auth, .seed, .addr, .t_ref, .busy, .done,
              .signature, .raw_signature);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the mechanisms inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.te) n_capture++;
    if (dut.state == sd_puf_pkg::ST_WB) begin
      n_writeback++;
      for (int i = 0; i < N; i++) begin
        if (dut.wb_cur[i] == 1000 || dut.wb_cur[i] == -1000) n_full++;
        else n_partial++;
      end
    end
    if (dut.s_closed) n_shift++;
    if (dut.mask_en && dut.u_ctrl.bit_cnt_q != 0 && (dut.u_ctrl.bit_cnt_q % 6) == 0) n_mask_round++;
    if (dut.mem_en && dut.mem_we) n_mem_wr++;
    if (dut.mem_en && !dut.mem_we) n_mem_rd++;
    if (dut.state == sd_puf_pkg::ST_DONE) begin
      #1;
      begin
        bit clean = 1;
        for (int i = 0; i < N; i++) if (dut.q_cur[i] != 0) clean = 0;
        checks++;
        if (!clean) begin failures++; $display("FAIL scan chain not wiped"); end
        else n_wiped++;
      end
    end
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // One operation; returns the cycle count from command to done.
  task automatic op(input bit enroll, input logic [15:0] s, input logic [1:0] a, input logic [15:0] t, input bit poke);
    int cycles;
    @(negedge clk);
    cmd_enroll = enroll; cmd_auth = !enroll; seed = s; addr = a; t_ref = t;
    @(negedge clk);
    cmd_enroll = 0; cmd_auth = 0; seed = ~s; addr = ~a; t_ref = 16'd0;
    cycles = 1;
    while (!done) begin
      if (poke && cycles == 20) begin cmd_enroll = 1; n_ignored++; end
      @(negedge clk);
      cmd_enroll = 0;
      cycles++;
    end
    chk(64'(cycles), 64'(N + 7), "latency");
    @(negedge clk);
    if (enroll) n_enroll++; else n_auth++;
  endtask

  initial begin
    logic [15:0] sa [4], sb;
    logic [5:0]  mask [4];
    logic [63:0] raw, sig1;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // Enroll a mask into every slot with its own seed (String A).
    foreach (sa[k]) begin
      sa[k] = 16'($urandom) | 16'h1;
      op(1'b1, sa[k], 2'(k), 16'd2390, k == 1);
      raw = ref_raw(CHIP, sa[k], 2390);
      mask[k] = 6'(ref_popcount(raw));
      chk(raw_signature, raw, $sformatf("String A slot %0d", k));
      chk(64'(dut.u_mem.mem[k]), 64'(mask[k]), $sformatf("stored mask slot %0d", k));
    end

    // Improved signatures (String B) with each mask, each generated twice.
    for (int r = 0; r < 6; r++) begin
      int k;
      k = r % 4;
      sb = 16'($urandom) ^ sa[k];
      op(1'b0, sb, 2'(k), 16'd2390, r == 2);
      raw = ref_raw(CHIP, sb, 2390);
      chk(raw_signature, raw, "String B raw");
      chk(signature, ref_mask(raw, mask[k]), "improved signature");
      sig1 = signature;
      op(1'b0, sb, 2'(k), 16'd2390, 1'b0);
      chk(signature, sig1, "signature repeats");
    end

    // A longer write-back interval: every buffer has fully switched, raw is all 1s.
    op(1'b0, 16'hBEEF, 2'd0, 16'd4000, 1'b0);
    chk(raw_signature, '1, "all switched at 4 ns");
    chk(signature, ref_mask('1, mask[0]), "signature at 4 ns");
    // A very short interval: nothing reaches the threshold, raw is all 0s.
    op(1'b0, 16'hBEEF, 2'd0, 16'd1000, 1'b0);
    chk(raw_signature, '0, "nothing switched at 1 ns");

    // Every mechanism must have happened.
    begin
      int cnt[string];
      cnt["enroll"] = n_enroll;       cnt["auth"] = n_auth;
      cnt["challenge capture"] = n_capture; cnt["write-back"] = n_writeback;
      cnt["partially switched buffer"] = n_partial; cnt["fully switched buffer"] = n_full;
      cnt["scan shift"] = n_shift;    cnt["mask replay round"] = n_mask_round;
      cnt["mask store"] = n_mem_wr;   cnt["mask load"] = n_mem_rd;
      cnt["chain wiped"] = n_wiped;   cnt["busy command ignored"] = n_ignored;
      foreach (cnt[s]) begin
        $display("mechanism %-26s %0d", s, cnt[s]);
        checks++;
        if (cnt[s] == 0) begin failures++; $display("FAIL mechanism %s never happened", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
