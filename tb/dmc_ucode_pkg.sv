// dmc_ucode_pkg: the microprogram the testbenches load into each node's
// Local Memory, assembled from the field builders of dmc_pkg.
//
// Slot s occupies control-store addresses s*32 .. s*32+31 and Local Memory
// words UCODE_BASE + s*128 + 4*i + f (field f of microinstruction i).
//   slot 0  V2P translation and local/remote dispatch (entry of every shared
//           command from the local core): 11 microinstructions translate,
//           2 decide local/remote, 2 send the request (remote) or 2 jump to
//           the target microcode (local)
//   slot 1  remote entry: copy the physical address into A6, jump to target
//   slot 2  burst load of n words to the requester
//   slot 3  burst store of n words from the command data
//   slot 4  test-and-set of a lock with ll / sc
//   slot 5  lock release
//   slot 6  single load, slot 7 single store
// V2P table entry of logical page p (4 words at V2P_HADDR + 4p): word 0 =
// frame number, word 3 = owner node number.
package dmc_ucode_pkg;
  import dmc_pkg::*;

  localparam logic [SLOT_W-1:0] C_BLOAD = 5'd2, C_BSTORE = 5'd3, C_TAS = 5'd4,
                                C_REL   = 5'd5, C_LOAD   = 5'd6, C_STORE = 5'd7;
  localparam int NUSED = 8;

  function automatic int slot_len(int s);
    case (s)
      0: return 18; 1: return 2; 2: return 4; 3: return 4; 4: return 11;
      default: return 3;
    endcase
  endfunction

  function automatic uinstr_t ui(input au_field_t a, input lsu_field_t l,
                                 input cu_field_t c, input mpu_field_t m);
    ui = '{mpu: m, cu: c, lsu: l, au: a};
  endfunction

  function automatic uinstr_t ucode(int s, int i);
    au_field_t  an;
    lsu_field_t ln;
    cu_field_t  cn;
    mpu_field_t mn;
    logic [9:0] base;
    uinstr_t r;
    an   = f_au(AU_NOP, 0, 0, 0, 0, 0);
    ln   = f_lsu(LSU_NOP, 0, 0, 0, 0);
    cn   = f_cu(CU_NOP, 0, 0, 0, 0);
    mn   = f_mpu(MPU_NOP, 0, 0, 0, 0);
    base = 10'(s * SLOT_UI);
    r    = ui(an, ln, cn, mn);
    case (s)
      0: case (i)
        0:  r = ui(f_au(AU_SUB, 0, 0, SEL_LADDR, SEL_BADDR, 0), ln, cn, mn);
        2:  r = ui(f_au(AU_PFE, 0, 1, 5'd0, 5'd0, 0), ln, cn, mn);
        4:  r = ui(f_au(AU_ADD, 3, 0, 5'd0, SEL_V2P, 0), ln, cn, mn);
        6:  r = ui(f_au(AU_ADD, 7, 0, 5'd3, SEL_IMM, 3), ln, cn, mn);
        7:  r = ui(an, f_lsu(LSU_LFRW, 3, 2, 0, 0), cn, mn);
        8:  r = ui(an, f_lsu(LSU_LFRW, 7, 4, 0, 0), cn, mn);
        9:  r = ui(f_au(AU_SET, 5, 0, 0, SEL_IMM, 1), ln, cn, mn);
        10: r = ui(f_au(AU_PFM, 6, 0, 5'd2, 5'd1, 0), ln, cn, mn);
        11: r = ui(an, ln, f_cu(CU_BEQ, 4, SEL_SNODE, 0, base + 16), mn);
        13: r = ui(an, ln, cn, f_mpu(MPU_MP, 4, 5, 6, SEL_DATA));
        15: r = ui(an, ln, f_cu(CU_END, 0, 0, END_REMOTE, 0), mn);
        16: r = ui(an, ln, f_cu(CU_JMP, 0, SEL_START, 0, 0), mn);
        default: ;
      endcase
      1: if (i == 0) r = ui(f_au(AU_ADD, 6, 0, SEL_LADDR, SEL_IMM, 0), ln,
                            f_cu(CU_JMP, 0, SEL_START, 0, 0), mn);
      2, 3: case (i)
        0: r = ui(f_au(AU_SUB, 0, 0, SEL_NB, SEL_IMM, 1), ln, cn, mn);
        1: r = ui(f_au(AU_SUB, 0, 0, 5'd0, SEL_IMM, 1), ln, f_cu(CU_BNEQZ, 0, 0, 0, base + 1), mn);
        2: r = ui(f_au(AU_ADD, 6, 0, 5'd6, SEL_IMM, 4),
                  (s == 2) ? f_lsu(LSU_LW, 6, 0, 1, 0) : f_lsu(LSU_SW, 6, 0, 0, SEL_DATA), cn, mn);
        3: r = ui(an, ln, f_cu(CU_END, 0, 0, END_DONE, 0), mn);
        default: ;
      endcase
      4: case (i)
        0:  r = ui(an, f_lsu(LSU_LL, 6, 0, 0, 0), cn, mn);
        3:  r = ui(an, ln, f_cu(CU_BNEQZ, 0, 0, 0, base + 8), mn);
        5:  r = ui(an, f_lsu(LSU_SC, 6, 0, 0, SEL_ONE), cn, mn);
        7:  r = ui(an, ln, f_cu(CU_END, 0, 0, END_DONE, 0), mn);
        8:  r = ui(an, f_lsu(LSU_SC, 6, 0, 0, 5'd0), cn, mn);
        10: r = ui(an, ln, f_cu(CU_END, 0, 0, END_RETRY, 0), mn);
        default: ;
      endcase
      5, 6, 7: case (i)
        0: r = ui(an, (s == 5) ? f_lsu(LSU_SW, 6, 0, 0, SEL_ZERO) :
                      (s == 6) ? f_lsu(LSU_LW, 6, 0, 1, 0) : f_lsu(LSU_SW, 6, 0, 0, SEL_DATA), cn, mn);
        2: r = ui(an, ln, f_cu(CU_END, 0, 0, END_DONE, 0), mn);
        default: ;
      endcase
      default: ;
    endcase
    return r;
  endfunction

  // 32-bit word w of slot s as stored in Local Memory.
  function automatic logic [31:0] ucode_word(int s, int w);
    logic [127:0] b;
    b = ucode(s, w / 4);
    return b[32*(w%4) +: 32];
  endfunction
endpackage
