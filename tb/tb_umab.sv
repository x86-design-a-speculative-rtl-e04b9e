// Self-checking testbench of the unified memory access buffer: runs the
// random-prediction stimulus once with aggressive and once with conservative
// send-back and reports the combined result.
module tb_umab;
  import smau_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c_a, f_a, c_c, f_c;
  logic d_a, d_c;
  always #5 clk = ~clk;

  umab_stim #(.SB(SB_ASB), .SEED(11)) u_asb (.clk, .rst_n, .checks(c_a), .failures(f_a), .done(d_a));
  umab_stim #(.SB(SB_CSB), .SEED(23)) u_csb (.clk, .rst_n, .checks(c_c), .failures(f_c), .done(d_c));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d_a && d_c);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_c, f_a + f_c);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired (committed %0d/%0d, %0d/%0d)", u_asb.committed, u_asb.next, u_csb.committed, u_csb.next);
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_c, f_a + f_c + 1);
    $finish;
  end
endmodule
