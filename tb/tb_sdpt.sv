// Self-checking testbench of the selective dependency/forwarding prediction
// table.  Three copies of a small table (16 entries, 4 ways) run the same
// training: one with the selective policy, one with plain store-load pair
// prediction and one with pre-load.  Directed steps walk the classify and
// filter counters through their thresholds (expected values worked out by
// hand); a random phase then compares the selective table with a reference
// model of the counter rules.
module tb_sdpt;
  import smau_pkg::*;
  localparam int unsigned ENTRIES = 16, WAYS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PC_W-1:0] lk_pc, tr_pc, tr_store_pc;
  logic tr_valid, tr_dep, tr_fwd, tr_mispred;
  logic ready;
  logic s_hit, s_dep, s_flt, s_fwd, d_hit, d_dep, d_flt, d_fwd, p_hit, p_dep, p_flt, p_fwd;
  logic [PC_W-1:0] s_spc, d_spc, p_spc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sdpt #(.ENTRIES(ENTRIES), .WAYS(WAYS), .POLICY(POL_SDP)) u_s (.clk, .rst_n, .lk_pc,
    .lk_hit(s_hit), .lk_dep(s_dep), .lk_filtered(s_flt), .lk_fwd(s_fwd), .lk_fwd_pc(s_spc), .ready,
    .tr_valid, .tr_pc, .tr_dep, .tr_fwd, .tr_store_pc, .tr_mispred);
  sdpt #(.ENTRIES(ENTRIES), .WAYS(WAYS), .POLICY(POL_DP)) u_d (.clk, .rst_n, .lk_pc,
    .lk_hit(d_hit), .lk_dep(d_dep), .lk_filtered(d_flt), .lk_fwd(d_fwd), .lk_fwd_pc(d_spc), .ready(),
    .tr_valid, .tr_pc, .tr_dep, .tr_fwd, .tr_store_pc, .tr_mispred);
  sdpt #(.ENTRIES(ENTRIES), .WAYS(WAYS), .POLICY(POL_PL)) u_p (.clk, .rst_n, .lk_pc,
    .lk_hit(p_hit), .lk_dep(p_dep), .lk_filtered(p_flt), .lk_fwd(p_fwd), .lk_fwd_pc(p_spc), .ready(),
    .tr_valid, .tr_pc, .tr_dep, .tr_fwd, .tr_store_pc, .tr_mispred);

  task automatic train(input logic [PC_W-1:0] pc, input logic dep, input logic fwd,
                       input logic [PC_W-1:0] spc, input logic mis);
    @(negedge clk);
    tr_valid = 1; tr_pc = pc; tr_dep = dep; tr_fwd = fwd; tr_store_pc = spc; tr_mispred = mis;
    @(negedge clk); tr_valid = 0;
  endtask
  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic look(input logic [PC_W-1:0] pc, input logic hit, input logic dep, input logic flt,
                      input logic fwd, input logic [PC_W-1:0] spc, input string what);
    lk_pc = pc; #1;
    chk(s_hit, hit, {what, " hit"});
    chk(s_dep, dep, {what, " dep"});
    chk(s_flt, flt, {what, " filtered"});
    if (hit) begin
      chk(s_fwd, fwd, {what, " fwd"});
      checks++;
      if (s_spc !== spc) begin failures++; $display("FAIL %s: store pc %h exp %h", what, s_spc, spc); end
    end
    // store-load pair policy: a hit is always dependent, never filtered
    chk(d_hit, hit, {what, " DP hit"});
    chk(d_dep, hit, {what, " DP dep"});
    chk(d_flt, 1'b0, {what, " DP filtered"});
    // pre-load: never dependent
    chk(p_hit, 1'b0, {what, " PL hit"});
    chk(p_dep, 1'b0, {what, " PL dep"});
  endtask

  // reference model (no evictions: PCs spread over the sets)
  logic       m_v [8], m_fwd [8];
  logic [1:0] m_c [8], m_f [8];
  logic [PC_W-1:0] m_s [8];

  initial begin
    tr_valid = 0; tr_pc = '0; tr_dep = 0; tr_fwd = 0; tr_store_pc = '0; tr_mispred = 0; lk_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    look(32'h40, 0, 0, 0, 0, '0, "empty");
    train(32'h40, 0, 0, 32'h0, 0);                       // independent miss: no allocation
    look(32'h40, 0, 0, 0, 0, '0, "no allocation");
    train(32'h40, 1, 1, 32'h77, 1);                      // violation: allocate c=1 f=0
    look(32'h40, 1, 1, 0, 1, 32'h77, "allocated");
    train(32'h40, 0, 0, 32'h0, 1);                       // c=2 f=1
    look(32'h40, 1, 0, 0, 1, 32'h77, "classify 2");
    train(32'h40, 0, 0, 32'h0, 1);                       // c=3 f=2
    look(32'h40, 1, 0, 1, 1, 32'h77, "filter 2");
    train(32'h40, 0, 0, 32'h0, 0);                       // c=3 f=1
    look(32'h40, 1, 0, 0, 1, 32'h77, "filter back to 1");
    train(32'h40, 1, 0, 32'h99, 1);                      // c=2 f=2, pair 99 no-forward
    look(32'h40, 1, 0, 1, 0, 32'h99, "new pair");
    train(32'h40, 1, 1, 32'h99, 0);                      // c=1 f=1
    look(32'h40, 1, 1, 0, 1, 32'h99, "dependent again");
    train(32'h40, 1, 1, 32'h99, 0);                      // c=0 f=0
    train(32'h40, 1, 1, 32'h99, 0);                      // saturate at 0
    train(32'h40, 0, 0, 32'h0, 0);                       // c=1
    look(32'h40, 1, 1, 0, 1, 32'h99, "classify saturates at 0");

    rst_n = 1'b0; #1; rst_n = 1'b1;
    @(posedge clk); wait (ready);
    for (int p = 0; p < 8; p++) m_v[p] = 0;
    for (int it = 0; it < 500; it++) begin
      int p;
      logic [PC_W-1:0] pc, spc;
      logic dep, fwd, mis;
      p   = $urandom % 8;
      pc  = 32'h300 + 32'(p % 4) + 32'((p / 4) * 8);
      dep = $urandom % 2; fwd = $urandom % 2; mis = $urandom % 2; spc = $urandom;
      look(pc, m_v[p], m_v[p] && !m_c[p][1], m_v[p] && m_f[p][1], m_fwd[p], m_s[p], "random");
      train(pc, dep, fwd, spc, mis);
      if (!m_v[p]) begin
        if (dep) begin m_v[p] = 1; m_c[p] = 1; m_f[p] = 0; m_fwd[p] = fwd; m_s[p] = spc; end
      end else begin
        m_c[p] = dep ? (m_c[p] == 0 ? 2'd0 : m_c[p] - 1) : (m_c[p] == 3 ? 2'd3 : m_c[p] + 1);
        m_f[p] = mis ? (m_f[p] == 3 ? 2'd3 : m_f[p] + 1) : (m_f[p] == 0 ? 2'd0 : m_f[p] - 1);
        if (dep) begin m_fwd[p] = fwd; m_s[p] = spc; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
