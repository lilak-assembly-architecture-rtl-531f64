// tb_lilak_cpu: end-to-end test of the LilaK processor at its default size.
//
// The testbench holds a small assembler that encodes LilaK instructions and,
// like the LilaK assembler, inserts no-ops for the hazards the hardware does
// not cover: four no-ops after every jump, jumpandlink and branch on equal;
// one before an instruction that uses a set or load result (or $ra after
// jumpandlink) right away; one when a value would be read exactly three
// instructions after its producer; and enough to keep the branch compare and
// its offset register (read in decode, not forwarded) four instructions away
// from their producers. An instruction-level reference model, written
// independently of the RTL, runs the same program sequentially.
//
// Program 1 is the workload class the processor is meant for: a loop inside
// a parameterised procedure. It reads N from the input register, calls
// sum(N) with jumpandlink, which loops with branch on equal and returns with
// jump, stores and reloads the result, runs every computational instruction
// with results forwarded at distance one and two, and provokes an overflow.
// Programs 2.. are random straight-line code with forward branches, loads
// and stores. After each program the register file, the data memory words
// that were written and the output port are compared with the model, and
// the cycle on which the final jump reaches writeback is compared with the
// retired-instruction count plus the four-cycle pipeline fill (one
// instruction per clock). Every mechanism (both forwarding paths, taken and
// untaken branches, jump, jumpandlink, load, store, input, output,
// overflow) is counted and must occur.
module tb_lilak_cpu;
  import lilak_pkg::*;

  logic       clk = 0, rst = 1, imem_we = 0, zero, overflow;
  word_t      in_value = '0, out_value, pc, imem_data = '0;
  logic [8:0] imem_addr = '0;
  int         checks = 0, failures = 0;

  lilak_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- assembler
  word_t prog [$];
  // hazard window: destination (-1 none), producer kind of the last three
  int    h_dst  [3];
  int    h_kind [3];   // 0: ALU op, 1: set/load (distance 2 only), 2: jal (none)

  function automatic word_t enc(opcode_e op, int a, int b, int r);
    return {op, 4'(a), 4'(b), 4'(r)};
  endfunction

  function automatic void hist_push(int dst, int kind);
    h_dst[2] = h_dst[1]; h_kind[2] = h_kind[1];
    h_dst[1] = h_dst[0]; h_kind[1] = h_kind[0];
    h_dst[0] = dst;      h_kind[0] = kind;
  endfunction

  function automatic void asm_reset();
    prog.delete();
    foreach (h_dst[i]) begin h_dst[i] = -1; h_kind[i] = 0; end
  endfunction

  function automatic logic hazard(int r, logic fwd_ok);
    if (r == 0) return 0;
    for (int d = 0; d < 3; d++)
      if (h_dst[d] == r) begin
        if (!fwd_ok || d == 2 || h_kind[d] == 2) return 1;
        if (d == 0 && h_kind[d] != 0) return 1;
        return 0;
      end
    return 0;
  endfunction

  function automatic void emit(word_t w);
    opcode_e op;
    int a, b, r, dst, kind;
    logic hz;
    op = opcode_e'(w[15:12]); a = w[11:8]; b = w[7:4]; r = w[3:0];
    do begin
      case (op)
        OP_SET, OP_NOP: hz = 0;
        OP_LOAD, OP_JUMP, OP_JAL: hz = hazard(a, 1);
        OP_BEQ:  hz = hazard(a, 0) || hazard(b, 0) || hazard(r, 0);
        default: hz = hazard(a, 1) || hazard(b, 1);
      endcase
      if (hz) begin prog.push_back({OP_NOP, 12'h000}); hist_push(-1, 0); end
    end while (hz);
    prog.push_back(w);
    dst = -1; kind = 0;
    case (op)
      OP_SET, OP_LOAD: begin dst = r; kind = 1; end
      OP_JAL:          begin dst = 1; kind = 2; end
      OP_STORE, OP_JUMP, OP_BEQ, OP_NOP: dst = -1;
      default:         dst = r;
    endcase
    hist_push(dst, kind);
    if (op inside {OP_JUMP, OP_JAL, OP_BEQ})
      repeat (4) begin prog.push_back({OP_NOP, 12'h000}); hist_push(-1, 0); end
  endfunction

  function automatic void a_op(opcode_e op, int a, int b, int r); emit(enc(op, a, b, r)); endfunction
  function automatic void a_set(int v, int r); emit({OP_SET, 8'(v), 4'(r)}); endfunction
  function automatic void a_store(int addr_r, int data_r); emit(enc(OP_STORE, addr_r, data_r, 0)); endfunction
  function automatic void a_load(int addr_r, int r); emit(enc(OP_LOAD, addr_r, 0, r)); endfunction
  function automatic void a_jump(int r); emit(enc(OP_JUMP, r, 0, 0)); endfunction
  function automatic void a_jal(int r); emit(enc(OP_JAL, r, 0, 0)); endfunction
  function automatic void a_beq(int a, int b, int off_r); emit(enc(OP_BEQ, a, b, off_r)); endfunction
  // fixed-length constant load through the assembler register $a0 (6)
  function automatic void a_li(int v, int r);
    a_set(v >> 4, r); a_set(16, 6); a_op(OP_MUL, r, 6, r); a_set(v & 15, 6); a_op(OP_ADD, r, 6, r);
  endfunction
  function automatic int here(); return prog.size(); endfunction

  // ---------------------------------------------------------- reference model
  word_t ref_regs [16];
  word_t ref_mem  [int];
  int    ref_retired;

  function automatic word_t ref_alu(opcode_e op, word_t x, word_t y);
    int sx, sy;
    sx = int'(signed'(x)); sy = int'(signed'(y));
    case (op)
      OP_ADD: return word_t'(sx + sy);
      OP_SUB: return word_t'(sx - sy);
      OP_MUL: return word_t'(sx * sy);
      OP_DIV: return (sy == 0) ? 16'hFFFF : word_t'(sx / sy);
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_LT:  return word_t'(sx < sy);
      OP_GT:  return word_t'(sx > sy);
      default: return word_t'(x == y);
    endcase
  endfunction

  // Runs until the instruction at index stop_idx has executed.
  task automatic ref_run(int stop_idx);
    int idx = 0, steps = 0;
    foreach (ref_regs[i]) ref_regs[i] = '0;
    ref_retired = 0;
    forever begin
      word_t w;
      opcode_e op;
      int a, b, r, next;
      word_t va, vb, vc;
      ref_regs[5] = in_value;
      w = prog[idx];
      op = opcode_e'(w[15:12]); a = w[11:8]; b = w[7:4]; r = w[3:0];
      va = ref_regs[a]; vb = ref_regs[b]; vc = ref_regs[r];
      next = idx + 1;
      ref_retired++;
      case (op)
        OP_SET:   if (r != 0 && r != 5) ref_regs[r] = word_t'(signed'(w[11:4]));
        OP_STORE: ref_mem[int'(va[9:1])] = vb;
        OP_LOAD:  if (r != 0 && r != 5) ref_regs[r] = ref_mem.exists(int'(va[9:1])) ? ref_mem[int'(va[9:1])] : 16'hDEAD;
        OP_JUMP:  next = int'(va) / 2;
        OP_JAL:   begin ref_regs[1] = word_t'(2 * idx + 2); next = int'(va) / 2; end
        OP_BEQ:   if (va == vb) next = idx + 1 + int'(signed'(vc));
        OP_NOP:   ;
        default:  if (r != 0 && r != 5) ref_regs[r] = ref_alu(op, va, vb);
      endcase
      if (idx == stop_idx) break;
      if (next != idx + 1) ref_retired += 4;   // delay slots executed by the pipeline
      idx = next;
      steps++;
      if (steps > 100000) begin failures++; $display("reference model did not halt"); break; end
    end
    ref_regs[5] = in_value;
  endtask

  // -------------------------------------------------------- mechanism counts
  int n_fwd_xm = 0, n_fwd_mw = 0, n_br_taken = 0, n_br_not = 0, n_jump = 0, n_jal = 0;
  int n_load = 0, n_store = 0, n_ovf = 0, n_in = 0, n_out = 0;
  word_t last_out = '0;

  always @(negedge clk) if (!rst) begin
    if (dut.u_execute.forward_a == FWD_XM || dut.u_execute.forward_b == FWD_XM) n_fwd_xm++;
    if (dut.u_execute.forward_a == FWD_MW || dut.u_execute.forward_b == FWD_MW) n_fwd_mw++;
    if (dut.mw_q.ctrl.branch &&  dut.mw_q.taken) n_br_taken++;
    if (dut.mw_q.ctrl.branch && !dut.mw_q.taken) n_br_not++;
    if (dut.mw_q.ctrl.pc_src && !dut.mw_q.ctrl.reg_write) n_jump++;
    if (dut.mw_q.ctrl.pc_src &&  dut.mw_q.ctrl.reg_write) n_jal++;
    if (dut.mw_q.ctrl.mem_read) n_load++;
    if (dut.xm_q.ctrl.mem_write) n_store++;
    if (overflow) n_ovf++;
    if (dut.dx_q.ctrl.alu_op != ALU_ADD || dut.dx_q.ctrl.reg_write)
      if (dut.dx_q.ra == R_IN || dut.dx_q.rb == R_IN) n_in++;
    if (out_value != last_out) n_out++;
    last_out = out_value;
  end

  // ------------------------------------------------------------ run a program
  task automatic run_program(string name, int halt_idx, int li_idx);
    int cyc = 0, done_cyc = -1;
    rst = 1;
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1; imem_addr = 9'(i); imem_data = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    ref_run(halt_idx);
    rst = 0;
    while (cyc < ref_retired + 40 && done_cyc < 0) begin
      @(negedge clk);
      cyc++;
      if (dut.mw_q.ctrl.pc_src && dut.pc_target == word_t'(2 * li_idx)) done_cyc = cyc;
    end
    // the state is compared while the final jump is in writeback: everything
    // before it has completed and nothing after it has written yet
    checks++;
    if (done_cyc != ref_retired + 3) begin
      failures++;
      $display("FAIL %s: final jump in writeback after %0d cycles, expected %0d", name, done_cyc, ref_retired + 3);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dut.u_decode.u_regs.regs[i] !== ref_regs[i] && i != 0) begin
        failures++;
        $display("FAIL %s: r%0d = %h, expected %h", name, i, dut.u_decode.u_regs.regs[i], ref_regs[i]);
      end
    end
    foreach (ref_mem[k]) begin
      checks++;
      if (dut.u_dmem.mem[k] !== ref_mem[k]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %h, expected %h", name, k, dut.u_dmem.mem[k], ref_mem[k]);
      end
    end
    checks++;
    if (out_value !== ref_regs[9]) begin
      failures++;
      $display("FAIL %s: output %h, expected %h", name, out_value, ref_regs[9]);
    end
    $display("%s: %0d words, %0d retired, %0d cycles to final jump", name, prog.size(), ref_retired, done_cyc);
  endtask

  // --------------------------------------------------------------- programs
  int L_sum, L_loop, L_done, L_halt, L_li, L_b1, L_b2;

  // Registers: 7 $fa0 (N), 9 $fr0 (sum), 11 $v0, 12 $v1, 13-15 $sv0-2, 8 $fa1, 10 $fr1
  function automatic void build_prog1();
    asm_reset();
    // main
    a_op(OP_ADD, 5, 0, 7);            // $fa0 = $in  (N)
    a_li(2 * L_sum, 11);              // $v0 = &sum
    a_jal(11);                        // call sum($fa0) -> $fr0
    a_set(8, 13);                     // $sv0 = 8 (address)
    a_store(13, 9);                   // MEM[8] = sum
    a_load(13, 14);                   // $sv1 = MEM[8]
    a_set(100, 11);                   // $v0 = 100
    a_set(-7, 12);                    // $v1 = -7
    a_op(OP_ADD, 11, 14, 15);         // $sv2 = 100 + sum
    a_op(OP_SUB, 15, 12, 15);         // distance 1: X->M forward
    a_op(OP_MUL, 15, 12, 10);         // distance 1
    a_op(OP_DIV, 15, 12, 8);          // distance 2: M->W forward
    a_op(OP_AND, 10, 8, 13);
    a_op(OP_OR, 10, 8, 14);
    a_op(OP_LT, 12, 11, 15);
    a_op(OP_GT, 12, 11, 10);
    a_op(OP_EQ, 15, 15, 8);
    a_set(127, 11);                   // build 0x7FFF and add 1: overflow
    a_set(127, 12);
    a_set(2, 13);
    a_op(OP_MUL, 11, 12, 11);         // 16129
    a_op(OP_MUL, 11, 13, 11);         // 32258
    a_set(127, 12);
    a_op(OP_ADD, 11, 12, 11);
    a_set(127, 12);
    a_op(OP_ADD, 11, 12, 11);         // 32512
    a_set(127, 12);
    a_op(OP_ADD, 11, 12, 11);         // 32639
    a_set(127, 12);
    a_op(OP_ADD, 11, 12, 11);         // 32766
    a_set(1, 12);
    a_op(OP_ADD, 11, 12, 11);         // 32767
    a_op(OP_ADD, 11, 12, 12);         // 32767 + 1 overflows
    a_store(13, 12);                  // MEM[2] = 0x8000
    // halt: jump to itself
    L_halt = here();
    a_li(2 * L_halt, 10);
    L_li = L_halt;
    a_jump(10);
    L_halt = here() - 5;              // index of the jump
    // procedure sum(N): $fr0 = N + (N-1) + ... + 1, uses $sv0 (1), $fa1, $fr1
    while (here() < L_sum) emit({OP_NOP, 12'h000});
    a_set(0, 9);
    a_set(1, 13);
    a_li(L_done - (L_b1 + 1), 8);     // forward offset, in words from the next instruction
    a_li(L_loop - (L_b2 + 1), 10);    // backward offset
    L_loop = here();
    a_beq(7, 0, 8);                   // if N == 0 goto done
    L_b1 = here() - 5;
    a_op(OP_ADD, 9, 7, 9);
    a_op(OP_SUB, 7, 13, 7);
    a_beq(0, 0, 10);                  // goto loop
    L_b2 = here() - 5;
    L_done = here();
    a_jump(1);                        // return
  endfunction

  task automatic program1(int n);
    in_value = word_t'(n);
    // pass 1 finds the labels, pass 2 assembles with them
    L_sum = 160; L_loop = 0; L_done = 0; L_b1 = 0; L_b2 = 0;
    build_prog1();
    build_prog1();
    run_program($sformatf("loop+procedure N=%0d", n), L_halt, L_li);
    checks++;
    if (ref_regs[9] != word_t'(n * (n + 1) / 2)) begin
      failures++;
      $display("FAIL reference sum %0d for N=%0d", ref_regs[9], n);
    end
  endtask

  task automatic random_program(int seed_n);
    int len;
    asm_reset();
    // clear data words 0..15 so every load reads a known value
    for (int k = 0; k < 16; k++) begin a_set(2 * k, 6); a_store(6, 0); end
    for (int r = 7; r < 16; r++) a_set($urandom_range(0, 255), r);
    len = $urandom_range(30, 80);
    for (int i = 0; i < len; i++) begin
      int kind, a, b, r;
      kind = $urandom_range(0, 9);
      a = $urandom_range(7, 15); b = $urandom_range(7, 15); r = $urandom_range(7, 15);
      if ($urandom_range(0, 7) == 0) a = 5;
      case (kind)
        0, 1, 2, 3: a_op(opcode_e'($urandom_range(0, 9) == 7 ? 0 : $urandom_range(0, 9)), a, b, r);
        4: a_set($urandom_range(0, 255), r);
        5: begin a_set(2 * $urandom_range(0, 15), 6); a_store(6, b); end
        6: begin a_set(2 * $urandom_range(0, 15), 6); a_load(6, r); end
        7: begin
             int skip;
             skip = $urandom_range(0, 3);
             a_set(4 + skip, 6);
             a_beq(a, ($urandom_range(0, 1) == 0) ? a : b, 6);
             repeat (skip) a_op(OP_ADD, $urandom_range(7, 15), $urandom_range(7, 15), $urandom_range(7, 15));
           end
        default: a_op(OP_ADD, a, b, r);
      endcase
    end
    L_li = here();
    a_li(2 * L_li, 7);
    a_jump(7);
    L_halt = here() - 5;
    in_value = word_t'($urandom);
    run_program($sformatf("random program %0d", seed_n), L_halt, L_li);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    program1(10);
    program1(0);
    program1(37);
    for (int p = 0; p < 40; p++) random_program(p);
    checks += 11;
    if (n_fwd_xm == 0)   begin failures++; $display("FAIL forwarding from X->M never happened"); end
    if (n_fwd_mw == 0)   begin failures++; $display("FAIL forwarding from M->W never happened"); end
    if (n_br_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    if (n_br_not == 0)   begin failures++; $display("FAIL no untaken branch"); end
    if (n_jump == 0)     begin failures++; $display("FAIL no jump"); end
    if (n_jal == 0)      begin failures++; $display("FAIL no jumpandlink"); end
    if (n_load == 0)     begin failures++; $display("FAIL no load"); end
    if (n_store == 0)    begin failures++; $display("FAIL no store"); end
    if (n_ovf == 0)      begin failures++; $display("FAIL no overflow"); end
    if (n_in == 0)       begin failures++; $display("FAIL input register never read"); end
    if (n_out == 0)      begin failures++; $display("FAIL output never changed"); end
    $display("mechanisms: fwd X->M %0d, fwd M->W %0d, branch taken %0d, not taken %0d, jump %0d, jal %0d, load %0d, store %0d, overflow %0d, input read %0d, output change %0d",
             n_fwd_xm, n_fwd_mw, n_br_taken, n_br_not, n_jump, n_jal, n_load, n_store, n_ovf, n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
