// Workload testbench: the same loop program (see tb_smau_top) run on the
// unit under each evaluated configuration - the dependency policies PL, DP,
// CDP and SDP, each with and without address prediction, with aggressive
// send-back, and SDP with address prediction under conservative send-back.
// Every run is checked against the golden model (committed load values,
// commit order, final memory); the cycle counts are printed for comparison.
// They depend on this synthetic program and on the testbench's recovery
// model, so no ordering between configurations is asserted.
module tb_policies;
  import smau_pkg::*;
  localparam int NR = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c [NR], f [NR], cy [NR];
  logic d [NR];
  always #5 clk = ~clk;

  smau_run #(.POLICY(POL_PL),  .USE_AP(1'b0)) r0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .cycles(cy[0]), .done(d[0]));
  smau_run #(.POLICY(POL_DP),  .USE_AP(1'b0)) r1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .cycles(cy[1]), .done(d[1]));
  smau_run #(.POLICY(POL_CDP), .USE_AP(1'b0)) r2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .cycles(cy[2]), .done(d[2]));
  smau_run #(.POLICY(POL_SDP), .USE_AP(1'b0)) r3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .cycles(cy[3]), .done(d[3]));
  smau_run #(.POLICY(POL_PL),  .USE_AP(1'b1)) r4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .cycles(cy[4]), .done(d[4]));
  smau_run #(.POLICY(POL_DP),  .USE_AP(1'b1)) r5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .cycles(cy[5]), .done(d[5]));
  smau_run #(.POLICY(POL_CDP), .USE_AP(1'b1)) r6 (.clk, .rst_n, .checks(c[6]), .failures(f[6]), .cycles(cy[6]), .done(d[6]));
  smau_run #(.POLICY(POL_SDP), .USE_AP(1'b1)) r7 (.clk, .rst_n, .checks(c[7]), .failures(f[7]), .cycles(cy[7]), .done(d[7]));
  smau_run #(.POLICY(POL_SDP), .USE_AP(1'b1), .SEND_BACK(SB_CSB)) r8 (.clk, .rst_n, .checks(c[8]), .failures(f[8]), .cycles(cy[8]), .done(d[8]));

  function automatic logic all_done();
    for (int i = 0; i < NR; i++) if (!d[i]) return 1'b0;
    return 1'b1;
  endfunction

  int checks, failures;
  initial begin
    string names [NR] = '{"PL", "DP", "CDP", "SDP", "PL_AP", "DP_AP", "CDP_AP", "SDP_AP", "SDP_AP (CSB)"};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin
      checks += c[i]; failures += f[i];
      $display("%-13s %0d cycles", names[i], cy[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
