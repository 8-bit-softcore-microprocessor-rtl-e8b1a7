// zasua_dec_tb -- exhaustive test of DEC against the addressing-mode table:
// 00 direct, 01 immediate, 10 indirect via A, 11 indirect via B.
module zasua_dec_tb;
  import zasua_pkg::*;
  addr_mode_e mode;
  logic mux1_imm, mux4_b, mux5_ind;
  int checks = 0, failures = 0;
  // expected {mux1_imm, mux4_b, mux5_ind} for codes 00, 01, 10, 11
  logic [2:0] want [4] = '{3'b000, 3'b100, 3'b001, 3'b011};

  zasua_dec dut (.*);

  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      mode = addr_mode_e'(i);
      #1;
      checks++;
      if ({mux1_imm, mux4_b, mux5_ind} !== want[i]) begin
        failures++; $display("FAIL mode=%b got %b want %b", mode, {mux1_imm, mux4_b, mux5_ind}, want[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
