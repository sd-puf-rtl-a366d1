// tb_control_unit: issues enroll and auth commands (and commands while busy,
// which must be ignored) and checks the state sequence, every control strobe in
// every state, the latched seed/address/threshold and the N + 7 cycle latency.
module tb_control_unit;
  import sd_puf_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, cmd_enroll = 0, cmd_auth = 0;
  logic [15:0] seed_in = '0, seed;
  logic [1:0]  addr_in = '0, mem_addr;
  logic [15:0] t_ref_in = '0, t_write;
  logic busy, done;
  cu_state_e state;
  logic lfsr_load, lfsr_en, sff_clr, te, s_closed, avc_en, count_en, counter_clr, counter_en;
  logic mask_load, mask_en, sig_clr, sig_shift_en, mem_en, mem_we;
  int checks = 0, failures = 0;

  control_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  // Expected strobes for a given phase.
  task automatic check_outputs(input cu_state_e s, input bit enr);
    chk(lfsr_load    == (s == ST_SEED), "lfsr_load");
    chk(lfsr_en      == (s == ST_GEN), "lfsr_en");
    chk(sff_clr      == (s == ST_CLEAR || s == ST_DONE), "sff_clr");
    chk(te           == (s == ST_CHAL), "te");
    chk(s_closed     == (s == ST_SHIFT), "s_closed");
    chk(avc_en       == (s == ST_SHIFT), "avc_en");
    chk(counter_clr  == (s == ST_CLEAR), "counter_clr");
    chk(counter_en   == (s == ST_SHIFT && enr), "counter_en");
    chk(mask_load    == (s == ST_MASK_LD), "mask_load");
    chk(mask_en      == (s == ST_SHIFT && !enr), "mask_en");
    chk(sig_shift_en == (s == ST_SHIFT && !enr), "sig_shift_en");
    chk(mem_we       == (s == ST_STORE), "mem_we");
    chk(mem_en       == ((s == ST_WB && !enr) || s == ST_STORE), "mem_en");
    chk(busy         == (s != ST_IDLE), "busy");
    chk(done         == (s == ST_DONE), "done");
    if (s != ST_IDLE) chk(count_en == enr, "count_en");
  endtask

  task automatic run(input bit enr);
    cu_state_e exp[$];
    logic [15:0] sd, tr;
    logic [1:0] ad;
    int cycles;
    sd = 16'($urandom); tr = 16'($urandom); ad = 2'($urandom);
    exp = '{ST_CLEAR, ST_SEED, ST_GEN, ST_CHAL, ST_WB};
    if (!enr) exp.push_back(ST_MASK_LD);
    repeat (N) exp.push_back(ST_SHIFT);
    if (enr) exp.push_back(ST_STORE);
    exp.push_back(ST_DONE);
    @(negedge clk);
    cmd_enroll = enr; cmd_auth = !enr; seed_in = sd; addr_in = ad; t_ref_in = tr;
    @(negedge clk);
    cmd_enroll = 0; cmd_auth = 0; seed_in = ~sd; addr_in = ~ad; t_ref_in = ~tr;
    cycles = 0;
    foreach (exp[i]) begin
      chk(state == exp[i], $sformatf("step %0d expected %s", i, exp[i].name()));
      check_outputs(state, enr);
      chk(seed == sd && mem_addr == ad && t_write == tr, "latched operands");
      // A command while busy is ignored.
      if (i == 10) begin cmd_auth = 1; cmd_enroll = 1; end
      @(negedge clk);
      cmd_auth = 0; cmd_enroll = 0;
      cycles++;
    end
    chk(state == ST_IDLE, "back to idle");
    check_outputs(ST_IDLE, enr);
    chk(cycles == N + 7, $sformatf("latency %0d", cycles));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check_outputs(ST_IDLE, 1'b0);
    for (int i = 0; i < 6; i++) run(i % 2 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
