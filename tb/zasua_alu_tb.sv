// zasua_alu_tb -- self-checking test of the ZA-SUA ALU.
// Runs all 16 operations on corner and random operands with both carry
// values and compares result, ZERO, CARRY and the flag write enables with a
// reference computed here with integer arithmetic.
module zasua_alu_tb;
  import zasua_pkg::*;

  alu_op_e    op;
  logic [7:0] x, y, result;
  logic       c_in, z_out, c_out, c_we;
  int checks = 0, failures = 0;

  zasua_alu dut (.*);

  task automatic check_one();
    int xi, yi, ci, r;
    logic       ec, ecwe;
    logic [7:0] er;
    xi = int'(x); yi = int'(y); ci = int'(c_in);
    ec = c_in; ecwe = 1'b0;
    case (op)
      ALU_ADD:  begin r = xi + yi;      er = 8'(r); ec = (r > 255); ecwe = 1; end
      ALU_ADDC: begin r = xi + yi + ci; er = 8'(r); ec = (r > 255); ecwe = 1; end
      ALU_SUB:  begin r = xi - yi;      er = 8'(r); ec = (r < 0);   ecwe = 1; end
      ALU_SUBC: begin r = xi - yi - ci; er = 8'(r); ec = (r < 0);   ecwe = 1; end
      ALU_INC:  begin r = xi + 1;       er = 8'(r); ec = (r > 255); ecwe = 1; end
      ALU_DEC:  begin r = xi - 1;       er = 8'(r); ec = (r < 0);   ecwe = 1; end
      ALU_SHL:  er = 8'((xi * 2) % 256);
      ALU_SHR:  er = 8'(xi / 2);
      ALU_ROL:  begin er = 8'(((xi * 2) % 256) + ci);  ec = (xi >= 128); ecwe = 1; end
      ALU_ROR:  begin er = 8'((xi / 2) + ci * 128);    ec = (xi % 2 == 1); ecwe = 1; end
      ALU_AND:  er = x & y;
      ALU_OR:   er = x | y;
      ALU_XOR:  er = x ^ y;
      ALU_NOT:  er = 8'(255 - xi);
      ALU_LOAD: er = y;
      default:  er = x;  // MOVE
    endcase
    #1;
    checks++;
    if (result !== er || z_out !== (er == 0) || c_we !== ecwe ||
        (ecwe && c_out !== ec)) begin
      failures++;
      $display("FAIL op=%s x=%h y=%h c=%b : got r=%h z=%b c=%b cwe=%b, want r=%h c=%b cwe=%b",
               op.name(), x, y, c_in, result, z_out, c_out, c_we, er, ec, ecwe);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] corners [6] = '{8'h00, 8'h01, 8'h7f, 8'h80, 8'hfe, 8'hff};
    for (int o = 0; o < 16; o++) begin
      op = alu_op_e'(o);
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          for (int c = 0; c < 2; c++) begin
            x = corners[i]; y = corners[j]; c_in = c[0];
            check_one();
          end
      for (int k = 0; k < 200; k++) begin
        x = 8'($urandom); y = 8'($urandom); c_in = 1'($urandom);
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
