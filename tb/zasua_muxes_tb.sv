// zasua_muxes_tb -- self-checking test of MUX1..MUX5 with random data and
// every combination of the five selects.
module zasua_muxes_tb;
  logic [7:0] general, ram_rdata, alu_result, port_in, a, b;
  logic mux1_imm, mux2_in, mux3_b, mux4_b, mux5_ind;
  logic [7:0] alu_y, acc_din, src_data, index, addr;
  logic [7:0] e_idx;
  int checks = 0, failures = 0;

  zasua_muxes dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++)
      for (int s = 0; s < 32; s++) begin
        general = 8'($urandom); ram_rdata = 8'($urandom); alu_result = 8'($urandom);
        port_in = 8'($urandom); a = 8'($urandom); b = 8'($urandom);
        {mux1_imm, mux2_in, mux3_b, mux4_b, mux5_ind} = 5'(s);
        #1;
        e_idx = (s[1] == 1'b1) ? b : a;
        checks++;
        if (alu_y   !== ((s[4] == 1'b1) ? general : ram_rdata) ||
            acc_din !== ((s[3] == 1'b1) ? port_in : alu_result) ||
            src_data !== ((s[2] == 1'b1) ? b : a) ||
            index   !== e_idx ||
            addr    !== ((s[0] == 1'b1) ? e_idx : general)) begin
          failures++; $display("FAIL sel=%b", 5'(s));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
