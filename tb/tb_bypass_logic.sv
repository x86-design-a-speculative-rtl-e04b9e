// Self-checking testbench of the bypass logic: all sixteen input
// combinations against the decision table written out independently.
module tb_bypass_logic;
  import smau_pkg::*;
  logic pred_dep, pred_filtered, pred_fwd, pair_hit, forwarding;
  ld_mode_e mode, exp_mode;
  int checks = 0, failures = 0;

  bypass_logic dut (.*);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {pred_dep, pred_filtered, pred_fwd, pair_hit} = 4'(v);
      #1;
      case ({pred_filtered, pred_dep, pair_hit, pred_fwd})
        4'b1000, 4'b1001, 4'b1010, 4'b1011,
        4'b1100, 4'b1101, 4'b1110, 4'b1111: exp_mode = MODE_CONS;
        4'b0111:                            exp_mode = MODE_FORWARD;
        4'b0110:                            exp_mode = MODE_WAIT;
        default:                            exp_mode = MODE_BYPASS;
      endcase
      checks += 2;
      if (mode !== exp_mode) begin
        failures++; $display("FAIL inputs %b: mode %0d expected %0d", 4'(v), mode, exp_mode);
      end
      if (forwarding !== (pred_fwd && pair_hit)) begin
        failures++; $display("FAIL inputs %b: forwarding %0d", 4'(v), forwarding);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
