// Self-checking testbench of the 2-stride address prediction table.
// A small table (16 entries, 4 ways, 4 sets) is trained with directed
// address sequences whose predictions are worked out by hand (first
// allocation, a stride seen once, the same stride seen twice, a stride
// change), then with random strides against a reference model of the
// stride rule, and finally with five PCs in one set to check replacement.
module tb_apt;
  import smau_pkg::*;
  localparam int unsigned ENTRIES = 16, WAYS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PC_W-1:0] lk_pc, up_pc;
  logic lk_hit, up_valid;
  logic ready;
  logic [ADDR_W-1:0] lk_addr, up_addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apt #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);

  task automatic train(input logic [PC_W-1:0] pc, input logic [ADDR_W-1:0] a);
    @(negedge clk); up_valid = 1; up_pc = pc; up_addr = a;
    @(negedge clk); up_valid = 0;
  endtask
  task automatic expect_pred(input logic [PC_W-1:0] pc, input logic hit, input logic [ADDR_W-1:0] a, input string what);
    lk_pc = pc; #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_addr !== a)) begin
      failures++;
      $display("FAIL %s: pc %h hit %0d addr %h, expected hit %0d addr %h", what, pc, lk_hit, lk_addr, hit, a);
    end
  endtask

  // reference model for PCs that never get evicted
  logic [ADDR_W-1:0] m_last [8], m_s1 [8], m_s2 [8];
  logic              m_v [8];

  initial begin
    up_valid = 0; up_pc = '0; up_addr = '0; lk_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);
    expect_pred(32'h100, 0, '0, "empty table");
    train(32'h100, 32'h2000);
    expect_pred(32'h100, 1, 32'h2000, "after allocation");
    train(32'h100, 32'h2004);
    expect_pred(32'h100, 1, 32'h2000 + 32'h4, "stride seen once");   // stride1 still 0
    train(32'h100, 32'h2008);
    expect_pred(32'h100, 1, 32'h200c, "stride seen twice");
    train(32'h100, 32'h2014);
    expect_pred(32'h100, 1, 32'h2018, "stride changed once");        // stride1 stays 4
    train(32'h100, 32'h2020);
    expect_pred(32'h100, 1, 32'h202c, "new stride confirmed");       // stride1 = 12
    expect_pred(32'h104, 0, '0, "other pc same set");

    // random strides, 8 PCs spread two per set: no evictions
    for (int p = 0; p < 8; p++) m_v[p] = 0;
    for (int it = 0; it < 400; it++) begin
      int p;
      logic [PC_W-1:0] pc;
      logic [ADDR_W-1:0] a, ns;
      p  = $urandom % 8;
      pc = 32'h8000 + 32'(p % 4) + 32'((p / 4) * 64);
      if (!m_v[p]) a = $urandom;
      else begin
        case ($urandom % 3)
          0: a = m_last[p] + m_s2[p];
          1: a = m_last[p] + m_s1[p];
          default: a = m_last[p] + ($urandom % 64);
        endcase
      end
      expect_pred(pc, m_v[p], m_last[p] + m_s1[p], "random stride");
      train(pc, a);
      if (!m_v[p]) begin
        m_v[p] = 1; m_last[p] = a; m_s1[p] = '0; m_s2[p] = '0;
      end else begin
        ns = a - m_last[p];
        if (ns == m_s2[p]) m_s1[p] = ns;
        m_s2[p] = ns; m_last[p] = a;
      end
    end

    // replacement: five PCs in set 1 of a fresh table
    rst_n = 1'b0; #1; rst_n = 1'b1;
    @(posedge clk); wait (ready);
    for (int p = 0; p < 5; p++) train(32'h1 + 32'(p * 4), 32'(p * 16));
    expect_pred(32'h1, 0, '0, "oldest way evicted");
    for (int p = 1; p < 5; p++) expect_pred(32'h1 + 32'(p * 4), 1, 32'(p * 16), "kept after replacement");

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
