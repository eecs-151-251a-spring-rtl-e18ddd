// rv_prog_pkg: test programs for the RV32I machines.
//
// gen_random builds a random but always-terminating program: a prologue
// that gives every register a known value and points x20 at the data area,
// then a body of instruction groups (register and immediate ALU operations,
// LUI/AUIPC, loads and stores of every width, load-use pairs, back-to-back
// dependent pairs, forward branches of all six kinds, JAL and an AUIPC+JALR
// pair, CSR accesses, FENCE/ECALL), and finally a JAL-to-itself loop.
// Branches and jumps only skip forward over whole groups, so control
// always reaches the final loop. gen_directed is a fixed program: an array
// sum loop with a subroutine called by JAL and returned from by JALR, byte
// and halfword accesses, and CSR reporting. Both return the address of the
// final loop in end_pc.
package rv_prog_pkg;
  import rv_asm_pkg::*;

  localparam int CSR_A = 12'h51E;

  function automatic int rreg();   // random working register x1..x15
    return 1 + ($urandom % 15);
  endfunction
  function automatic int sreg();   // random source: working registers, x0 or x20
    int k = $urandom % 18;
    return (k < 15) ? k + 1 : (k == 15 ? 0 : (k == 16 ? 20 : rreg()));
  endfunction

  // group kinds
  typedef enum int { G_ALU, G_ALUI, G_SHI, G_LUI, G_LOAD, G_STORE, G_LOADUSE, G_DEP,
                     G_BR, G_JAL, G_JALR, G_CSR, G_MISC, G_NKINDS } gkind_e;

  function automatic int gsize(gkind_e k);
    case (k)
      G_LOADUSE, G_DEP, G_JALR: return 2;
      default:                  return 1;
    endcase
  endfunction

  function automatic void gen_random(int n_groups, ref logic [31:0] prog[$], output logic [31:0] end_pc);
    gkind_e kinds[$];
    int     start[$];
    int     pc_words;
    prog.delete();
    // prologue
    for (int r = 1; r < 32; r++) begin
      prog.push_back(lui(r, $urandom));
      prog.push_back(addi(r, r, $signed(12'($urandom))));
    end
    prog.push_back(lui(20, 0));
    prog.push_back(addi(20, 20, 256));          // data base 0x100
    for (int g = 0; g < n_groups; g++) kinds.push_back(gkind_e'($urandom % int'(G_NKINDS)));
    pc_words = prog.size();
    foreach (kinds[g]) begin start.push_back(pc_words); pc_words += gsize(kinds[g]); end
    start.push_back(pc_words);                  // sentinel: first word after the body
    foreach (kinds[g]) begin
      int rd = rreg(), r1 = sreg(), r2 = sreg();
      int skip = 1 + $urandom % 3;
      int tgt  = (g + 1 + skip > kinds.size()) ? kinds.size() : g + 1 + skip;
      int off  = 4 * (start[tgt] - start[g]);
      logic [2:0] f3;
      case (kinds[g])
        G_ALU:   prog.push_back(op(3'($urandom), 1'($urandom), rd, r1, r2));
        G_ALUI:  begin
          f3 = $urandom; if (f3 == 3'b001 || f3 == 3'b101) f3 = 3'b000;
          prog.push_back(opi(f3, rd, r1, $signed(12'($urandom))));
        end
        G_SHI:   prog.push_back(opi(($urandom % 2) ? 3'b001 : 3'b101, rd, r1,
                                    (($urandom % 2) ? 1024 : 0) + $urandom % 32));
        G_LUI:   prog.push_back(($urandom % 2) ? lui(rd, $urandom) : auipc(rd, $urandom));
        G_LOAD, G_LOADUSE: begin
          logic [2:0] lt [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
          int sz, imm;
          f3 = lt[$urandom % 5];
          sz = (f3[1:0] == 2'b00) ? 1 : (f3[1:0] == 2'b01 ? 2 : 4);
          imm = sz * ($signed(6'($urandom)));
          prog.push_back(load(f3, rd, 20, imm));
          if (kinds[g] == G_LOADUSE)
            prog.push_back(($urandom % 2) ? add(rreg(), rreg(), rd) : store(3'b010, rd, 20, 4 * ($urandom % 16)));
        end
        G_STORE: begin
          int sz;
          f3 = $urandom % 3; sz = 1 << f3;
          prog.push_back(store(f3, r2, 20, sz * $signed(6'($urandom))));
        end
        G_DEP: begin
          prog.push_back(addi(rd, r1, $signed(12'($urandom))));
          prog.push_back(($urandom % 2) ? sub(rreg(), rd, rd) : op(3'($urandom), 1'b0, rreg(), sreg(), rd));
        end
        G_BR: begin
          logic [2:0] bt [6] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
          prog.push_back(br(bt[$urandom % 6], r1, ($urandom % 4 == 0) ? r1 : r2, off));
        end
        G_JAL:   prog.push_back(jal(($urandom % 2) ? rd : 0, off));
        G_JALR: begin
          // auipc x21 at this group's first word; jalr lands at the target group
          prog.push_back(auipc(21, 0));
          prog.push_back(jalr(rd, 21, off + (($urandom % 2) ? 1 : 0)));  // bit 0 is cleared
        end
        G_CSR: begin
          f3 = {1'($urandom), 2'(1 + $urandom % 3)};
          prog.push_back(csr(f3, rd, f3[2] ? int'($urandom % 32) : r1, ($urandom % 4 == 0) ? 12'h340 : CSR_A));
        end
        default: begin
          case ($urandom % 3)
            0: prog.push_back(32'h0ff0_000f);   // fence
            1: prog.push_back(32'h0000_0073);   // ecall
            default: prog.push_back(nop());
          endcase
        end
      endcase
    end
    end_pc = 4 * prog.size();
    prog.push_back(jal(0, 0));
  endfunction

  // Sum the words of an 8-entry array at 0x100 through a subroutine, store
  // the sum at 0x180, byte/halfword traffic at 0x1C0, report via the CSR.
  function automatic void gen_directed(ref logic [31:0] prog[$], output logic [31:0] end_pc);
    prog.delete();
    prog.push_back(addi(2, 0, 256));            // 0x00 x2 = array base
    prog.push_back(addi(3, 0, 8));              // 0x04 x3 = count
    prog.push_back(addi(5, 0, 0));              // 0x08 x5 = sum
    prog.push_back(jal(1, 16));                 // 0x0C call sub at 0x1C
    prog.push_back(store(3'b010, 5, 0, 384));   // 0x10 mem[0x180] = sum
    prog.push_back(csr(3'b001, 0, 5, CSR_A));   // 0x14 csrw sum
    prog.push_back(jal(0, 36));                 // 0x18 to byte tests at 0x3C
    // sub: loop
    prog.push_back(load(3'b010, 4, 2, 0));      // 0x1C lw  x4, 0(x2)
    prog.push_back(add(5, 5, 4));               // 0x20 add x5, x5, x4   (load-use)
    prog.push_back(addi(2, 2, 4));              // 0x24
    prog.push_back(addi(3, 3, -1));             // 0x28
    prog.push_back(br(3'b001, 3, 0, -16));      // 0x2C bne x3, x0, loop (bypass of x3)
    prog.push_back(jalr(0, 1, 0));              // 0x30 return
    prog.push_back(nop());                      // 0x34
    prog.push_back(nop());                      // 0x38
    // byte/halfword tests
    prog.push_back(addi(6, 0, -2));             // 0x3C x6 = 0xFFFFFFFE
    prog.push_back(store(3'b000, 6, 0, 449));   // 0x40 sb -> 0x1C1
    prog.push_back(store(3'b001, 6, 0, 450));   // 0x44 sh -> 0x1C2
    prog.push_back(load(3'b000, 7, 0, 449));    // 0x48 lb
    prog.push_back(load(3'b100, 8, 0, 449));    // 0x4C lbu
    prog.push_back(load(3'b001, 9, 0, 450));    // 0x50 lh
    prog.push_back(load(3'b101, 10, 0, 450));   // 0x54 lhu
    prog.push_back(op(3'b011, 1'b0, 11, 7, 8)); // 0x58 sltu
    prog.push_back(op(3'b010, 1'b0, 12, 7, 8)); // 0x5C slt
    prog.push_back(csr(3'b110, 13, 1, CSR_A));  // 0x60 csrrsi x13, 1
    end_pc = 4 * prog.size();
    prog.push_back(jal(0, 0));
  endfunction
endpackage
