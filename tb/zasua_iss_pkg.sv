// zasua_iss_pkg -- instruction-set model of the ZA-SUA processor, used by the
// processor testbenches as an independent reference.
//
// The class zasua_iss holds the architectural state (A, B, ZERO, CARRY,
// interrupt enable, saved CARRY, PC, the 8-entry stack and its pointer, the
// data RAM) and a copy of the program. step() executes one instruction;
// interrupt() performs an interrupt entry. The model has no notion of clocks:
// the testbench calls it whenever the processor completes an instruction or
// an interrupt entry and then compares the two states. It also counts how
// often each mechanism was used so a testbench can insist that all of them
// were exercised. The input-port device is port_device(): the value a port
// returns is a fixed function of its address, known to model and testbench.
package zasua_iss_pkg;

  function automatic logic [7:0] port_device(input logic [7:0] pa);
    return pa * 8'd3 + 8'd7;
  endfunction

  class zasua_iss;
    logic [7:0]  a, b;
    logic [7:0]  ram [256];
    logic        z, c, ie, cs;
    logic [12:0] pc;
    logic [12:0] stk [8];
    logic [2:0]  sp;
    logic [16:0] rom [];
    int          rom_depth;
    logic [12:0] vector;

    // the last instruction's port write
    logic        exp_wr;
    logic [7:0]  exp_paddr, exp_pdata;

    // mechanism counters
    int n_op [32];
    int n_mode [4];
    int n_jifz_t, n_jifz_n, n_jifc_t, n_jifc_n;
    int n_int, n_c_restored, n_ret_imm, n_nest2, n_port_wr, n_port_rd, n_jumpr;
    int n_stack_wrap;

    function new(input int depth, input logic [12:0] vec);
      rom_depth = depth;
      rom       = new[depth];
      vector    = vec;
    endfunction

    function void reset();
      a = 0; b = 0; z = 0; c = 0; ie = 0; cs = 0; pc = 0; sp = 0;
    endfunction

    function logic [7:0] acc(input logic s);
      return s ? b : a;
    endfunction

    function void write_acc(input logic d, input logic [7:0] v);
      if (d) b = v; else a = v;
    endfunction

    function void push(input logic [12:0] v);
      stk[sp] = v;
      if (sp == 3'd7) n_stack_wrap++;
      sp++;
    endfunction

    function void step();
      logic [16:0] w;
      logic [4:0]  op;
      logic [7:0]  g, addr, x, y, r;
      logic [1:0]  md;
      logic        s, d;
      int          t, xi, yi, ci, ia;
      ia = pc;
      w  = rom[ia % rom_depth];
      pc = pc + 13'd1;
      op = w[16:12]; g = w[11:4]; md = w[3:2]; s = w[1]; d = w[0];
      addr = md[1] ? acc(md[0]) : g;
      exp_wr = 1'b0;
      n_op[op]++;
      if (!w[16]) begin
        n_mode[md]++;
        x = acc(s);
        y = (md == 2'b01) ? g : ram[addr];
        xi = x; yi = y; ci = c;
        case (op[3:0])
          4'd0:  begin t = xi + yi;      c = t > 255; r = 8'(t); end
          4'd1:  begin t = xi + yi + ci; c = t > 255; r = 8'(t); end
          4'd2:  begin t = xi - yi;      c = t < 0;   r = 8'(t); end
          4'd3:  begin t = xi - yi - ci; c = t < 0;   r = 8'(t); end
          4'd4:  begin t = xi + 1;       c = t > 255; r = 8'(t); end
          4'd5:  begin t = xi - 1;       c = t < 0;   r = 8'(t); end
          4'd6:  r = {x[6:0], 1'b0};
          4'd7:  r = {1'b0, x[7:1]};
          4'd8:  begin r = {x[6:0], c}; c = x[7]; end
          4'd9:  begin r = {c, x[7:1]}; c = x[0]; end
          4'd10: r = x & y;
          4'd11: r = x | y;
          4'd12: r = x ^ y;
          4'd13: r = ~x;
          4'd14: r = y;
          default: r = x;
        endcase
        z = (r == 8'd0);
        write_acc(d, r);
      end else if (!w[15]) begin
        case (w[14:13])
          2'b00: if (z) begin pc = w[12:0]; n_jifz_t++; end else n_jifz_n++;
          2'b01: if (c) begin pc = w[12:0]; n_jifc_t++; end else n_jifc_n++;
          2'b10: pc = w[12:0];
          default: begin
            push(pc);
            pc = w[12:0];
            if (sp >= 2) n_nest2++;
          end
        endcase
      end else begin
        case (op)
          5'b11000: ram[addr] = acc(s);                       // STORE
          5'b11001, 5'b11110: begin                           // RETURN, RETI
            sp--;
            pc = stk[sp];
            if (md == 2'b01) begin write_acc(d, g); n_ret_imm++; end
            if (op == 5'b11110) begin
              if (c != cs) n_c_restored++;
              c  = cs;
              ie = 1'b1;
            end
          end
          5'b11010: begin write_acc(d, port_device(addr)); n_port_rd++; end  // INPUT
          5'b11011: begin                                                     // OUTPUT
            exp_wr = 1'b1; exp_paddr = addr; exp_pdata = acc(s); n_port_wr++;
          end
          5'b11100: ie = 1'b1;                                // EINT
          5'b11101: ie = 1'b0;                                // DINT
          default: begin pc = pc + {5'd0, acc(s)}; n_jumpr++; end  // JUMPR
        endcase
      end
    endfunction

    function void interrupt();
      push(pc);
      cs = c;
      ie = 1'b0;
      pc = vector;
      n_int++;
    endfunction
  endclass

endpackage
