// rv_iss_pkg: instruction-level reference model of RV32I for the testbenches.
//
// rv_iss executes one instruction per step() on its own copy of the
// architectural state (PC, x0..x31, instruction and data memories indexed
// by the low word-address bits, one CSR). It is written directly from the
// RV32I instruction definitions and shares no code with the RTL. FENCE,
// ECALL and EBREAK do nothing; the CSR behaves like the RTL's single
// register at address csr_addr.
package rv_iss_pkg;
  class rv_iss;
    int unsigned imem_words, dmem_words;
    logic [31:0] pc;
    logic [31:0] x [32];
    logic [31:0] imem [];
    logic [31:0] dmem [];
    logic [31:0] csr_val;
    logic [11:0] csr_addr;
    // facts about the last step, for timing and coverage models
    bit          redirect;   // taken branch or any jump
    bit          is_branch;
    bit          is_load;
    bit          is_store;
    bit          is_csr;
    int          wr_rd;      // destination written (0 if none)
    bit          uses1, uses2;
    int          src1, src2;

    function new(int unsigned iw, int unsigned dw, logic [31:0] reset_pc, logic [11:0] caddr);
      imem_words = iw; dmem_words = dw;
      imem = new[iw]; dmem = new[dw];
      pc = reset_pc; csr_val = '0; csr_addr = caddr;
      foreach (x[i]) x[i] = '0;
      foreach (imem[i]) imem[i] = 32'h0000_0013;
      foreach (dmem[i]) dmem[i] = '0;
    endfunction

    function automatic logic [31:0] rd_mem(logic [31:0] a);
      return dmem[(a >> 2) % dmem_words];
    endfunction

    function automatic void step();
      logic [31:0] in, a, b, res, npc, addr, w, immi, imms, immb, immu, immj, old;
      logic [6:0] opc; logic [2:0] f3; int rd, rs1, rs2; logic wr;
      in  = imem[(pc >> 2) % imem_words];
      opc = in[6:0]; f3 = in[14:12]; rd = in[11:7]; rs1 = in[19:15]; rs2 = in[24:20];
      a = x[rs1]; b = x[rs2];
      immi = {{20{in[31]}}, in[31:20]};
      imms = {{20{in[31]}}, in[31:25], in[11:7]};
      immb = {{20{in[31]}}, in[7], in[30:25], in[11:8], 1'b0};
      immu = {in[31:12], 12'b0};
      immj = {{12{in[31]}}, in[19:12], in[20], in[30:21], 1'b0};
      npc = pc + 4; wr = 0; res = 0;
      redirect = 0; is_branch = 0; is_load = 0; is_store = 0; is_csr = 0;
      src1 = rs1; src2 = rs2;
      uses1 = opc inside {7'b1100111, 7'b1100011, 7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011} ||
              (opc == 7'b1110011 && f3[1:0] != 0 && !f3[2]);
      uses2 = opc inside {7'b1100011, 7'b0100011, 7'b0110011};
      case (opc)
        7'b0110111: begin res = immu; wr = 1; end
        7'b0010111: begin res = pc + immu; wr = 1; end
        7'b1101111: begin res = pc + 4; wr = 1; npc = pc + immj; redirect = 1; end
        7'b1100111: begin res = pc + 4; wr = 1; npc = (a + immi) & ~32'd1; redirect = 1; end
        7'b1100011: begin
          logic t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = ($signed(a) < $signed(b));
            3'b101: t = ($signed(a) >= $signed(b));
            3'b110: t = (a < b);
            3'b111: t = (a >= b);
            default: t = 0;
          endcase
          if (t) npc = pc + immb;
          redirect = t; is_branch = 1;
        end
        7'b0000011: begin
          addr = a + immi; w = rd_mem(addr); wr = 1; is_load = 1;
          case (f3)
            3'b000: begin logic [7:0] v = w >> (8 * addr[1:0]); res = {{24{v[7]}}, v}; end
            3'b001: begin logic [15:0] v = w >> (16 * addr[1]); res = {{16{v[15]}}, v}; end
            3'b100: begin logic [7:0] v = w >> (8 * addr[1:0]); res = {24'b0, v}; end
            3'b101: begin logic [15:0] v = w >> (16 * addr[1]); res = {16'b0, v}; end
            default: res = w;
          endcase
        end
        7'b0100011: begin
          int idx; is_store = 1; addr = a + imms; idx = (addr >> 2) % dmem_words; w = dmem[idx];
          case (f3)
            3'b000: w[8*addr[1:0] +: 8] = b[7:0];
            3'b001: w[16*addr[1] +: 16] = b[15:0];
            default: w = b;
          endcase
          dmem[idx] = w;
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] o2; logic reg_op;
          reg_op = (opc == 7'b0110011);
          o2 = reg_op ? b : immi;
          wr = 1;
          case (f3)
            3'b000: res = (reg_op && in[30]) ? a - o2 : a + o2;
            3'b001: res = a << o2[4:0];
            3'b010: res = {31'b0, $signed(a) < $signed(o2)};
            3'b011: res = {31'b0, a < o2};
            3'b100: res = a ^ o2;
            3'b101: res = in[30] ? 32'($signed(a) >>> o2[4:0]) : a >> o2[4:0];
            3'b110: res = a | o2;
            default: res = a & o2;
          endcase
        end
        7'b1110011: begin
          if (f3[1:0] != 0) begin
            logic [31:0] src;
            src = f3[2] ? {27'b0, in[19:15]} : a;
            old = (in[31:20] == csr_addr) ? csr_val : 0;
            res = old; wr = 1; is_csr = 1;
            if (in[31:20] == csr_addr) begin
              case (f3[1:0])
                2'b01: csr_val = src;
                2'b10: csr_val = old | src;
                default: csr_val = old & ~src;
              endcase
            end
          end
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = res;
      wr_rd = (wr && rd != 0) ? rd : 0;
      pc = npc;
    endfunction
  endclass
endpackage
