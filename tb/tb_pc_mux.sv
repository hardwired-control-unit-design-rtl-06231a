// tb_pc_mux: self-checking test of the four-input PCMUX and its IR[11]
// select. For random data it tries every pcmux code with ir11_sel low, and
// both IR[11] values with ir11_sel high (JSR takes the adder, JSRR the SR1
// input, whatever the pcmux field says).
module tb_pc_mux;
  import lc3_ctrl_pkg::*;
  logic [15:0] pc, bus, adder, sr1, pc_next, exp;
  pcmux_e      pcmux, pcmux_eff;
  logic        ir11_sel, ir11;
  int unsigned checks = 0, failures = 0;

  pc_mux dut (.pc, .bus, .adder, .sr1, .pcmux, .ir11_sel, .ir11, .pc_next, .pcmux_eff);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      pc = 16'($urandom); bus = 16'($urandom); adder = 16'($urandom); sr1 = 16'($urandom);
      if (i == 0) pc = 16'hFFFF;  // wrap of PC + 1
      for (int sel = 0; sel < 8; sel++) begin
        ir11_sel = sel[2];
        ir11     = sel[0];
        pcmux    = pcmux_e'(2'($urandom));
        if (!ir11_sel) pcmux = pcmux_e'(sel[1:0]);
        #1;
        if (ir11_sel) exp = ir11 ? adder : sr1;
        else case (sel[1:0])
          2'd0: exp = 16'(pc + 16'd1);
          2'd1: exp = bus;
          2'd2: exp = adder;
          default: exp = sr1;
        endcase
        checks++;
        if (pc_next !== exp) begin
          failures++;
          $display("FAIL sel=%0d ir11=%b pcmux=%0d pc_next=%h expected %h",
                   ir11_sel, ir11, pcmux, pc_next, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
