// Self-checking testbench for spsit_detect.
// Checks close / carr_ctrl / sign outputs for the four sign-extension
// patterns and for random MSPs, against a reference that adds the MSPs and
// tests whether the upper part could be predicted.
module tb_spsit_detect;
  import spsit_pkg::*;
  logic [7:0]  a_msp, b_msp;
  spsit_ctrl_t ctrl;
  int checks = 0, failures = 0;

  spsit_detect #(.MSP_W(8)) dut (.a_msp(a_msp), .b_msp(b_msp), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pat [6] = '{8'h00, 8'hFF, 8'h01, 8'hFE, 8'h80, 8'h7F};
    for (int n = 0; n < 3000; n++) begin
      logic exp_close;
      if (n < 36) begin
        a_msp = pat[n / 6];
        b_msp = pat[n % 6];
      end else begin
        a_msp = ($urandom % 3 == 0) ? {8{1'($urandom)}} : 8'($urandom);
        b_msp = ($urandom % 3 == 0) ? {8{1'($urandom)}} : 8'($urandom);
      end
      #1;
      exp_close = (a_msp inside {8'h00, 8'hFF}) && (b_msp inside {8'h00, 8'hFF});
      checks++;
      if (ctrl.close !== exp_close || ctrl.carr_ctrl !== exp_close ||
          ctrl.sign_a !== a_msp[7] || ctrl.sign_b !== b_msp[7]) begin
        failures++;
        $display("FAIL a=%h b=%h ctrl=%b exp close=%b", a_msp, b_msp, ctrl, exp_close);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
